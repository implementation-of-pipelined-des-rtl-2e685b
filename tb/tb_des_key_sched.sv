// tb_des_key_sched: self-checking test of the indexed key scheduler.
//
// For the standard's example key (K1 = 1B02EFFC7072, K16 = CB3D8B0E17F5)
// and random keys, asks for every key number in both modes and compares
// with the reference schedule: K(i+1) when encrypting, K(16-i) when
// decrypting.
module tb_des_key_sched;
  import des_ref_pkg::*;

  logic [63:0] key;
  logic [3:0]  num;
  logic        decrypt;
  logic [47:0] subkey;
  logic [47:0] ks [1:16];
  int checks = 0, failures = 0;

  des_key_sched dut (.key, .num, .decrypt, .subkey);

  task automatic check(input logic [47:0] exp, input string what);
    checks++;
    if (subkey !== exp) begin
      failures++;
      $display("FAIL %s: key=%h num=%0d dec=%b got %h expected %h", what, key, num, decrypt, subkey, exp);
    end
  endtask

  task automatic sweep(input logic [63:0] k);
    key = k;
    ref_subkeys(k, ks);
    for (int i = 0; i < 16; i++) begin
      num = 4'(i);
      decrypt = 1'b0; #1;
      check(ks[i+1], "encrypt order");
      decrypt = 1'b1; #1;
      check(ks[16-i], "decrypt order");
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
    key = 64'h133457799BBCDFF1; decrypt = 1'b0;
    num = 4'd0;  #1; check(48'h1B02EFFC7072, "example K1");
    num = 4'd15; #1; check(48'hCB3D8B0E17F5, "example K16");
    sweep(64'h133457799BBCDFF1);
    for (int t = 0; t < 20; t++) sweep(rand64());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
