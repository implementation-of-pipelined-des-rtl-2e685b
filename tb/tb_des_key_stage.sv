// tb_des_key_stage: self-checking test of the cascaded key schedule step.
//
// Chains sixteen stages, ROUND = 1..16, as the pipeline does, feeds the
// chain PC1 of a key (computed here from the standard's PC1 table) and
// compares each stage's subkey with the reference schedule: K(r) when
// encrypting, K(17-r) when decrypting. Also checks where C|D ends up after
// the sixteenth stage: back at the start when encrypting (28 left
// rotations), one position left of it when decrypting (27 right rotations).
module tb_des_key_stage;
  import des_ref_pkg::*;

  logic [55:0] cd [0:16];
  logic [47:0] sk [1:16];
  logic        decrypt;
  logic [47:0] ks [1:16];
  int checks = 0, failures = 0;

  for (genvar r = 1; r <= 16; r++) begin : g_chain
    des_key_stage #(.ROUND(r)) dut (.cd_in(cd[r-1]), .decrypt, .cd_out(cd[r]), .subkey(sk[r]));
  end

  function automatic logic [55:0] tb_pc1(input logic [63:0] key);
    logic [55:0] y;
    for (int i = 1; i <= 56; i++) y[56-i] = key[64-R_PC1[i]];
    return y;
  endfunction

  task automatic run(input logic [63:0] key);
    ref_subkeys(key, ks);
    cd[0] = tb_pc1(key);
    for (int m = 0; m < 2; m++) begin
      decrypt = m[0]; #1;
      for (int r = 1; r <= 16; r++) begin
        checks++;
        if (sk[r] !== ks[decrypt ? 17 - r : r]) begin
          failures++;
          $display("FAIL key=%h dec=%b round %0d: got %h expected %h", key, decrypt, r, sk[r],
                   ks[decrypt ? 17 - r : r]);
        end
      end
      // Encryption rotates left by 28 in all; decryption right by 27, which is
      // left by 1.
      checks++;
      if (cd[16] !== (decrypt ? {cd[0][54:28], cd[0][55], cd[0][26:0], cd[0][27]} : cd[0])) begin
        failures++;
        $display("FAIL key=%h dec=%b: C|D wrong after 16 rounds", key, decrypt);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(64'h133457799BBCDFF1);
    for (int t = 0; t < 30; t++) run(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
