// tb_des_round: self-checking test of one Feistel round.
//
// Checks round 1 of the standard's worked example (L0 = CC00CCFF,
// R0 = F0AAF0AA, K1 = 1B02EFFC7072 gives L1 = F0AAF0AA, R1 = EF4A6544) and
// random inputs against L' = R, R' = L xor F(R, K) from the reference model.
module tb_des_round;
  import des_ref_pkg::*;

  logic [31:0] l_in, r_in, l_out, r_out;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_round dut (.l_in, .r_in, .k, .l_out, .r_out);

  task automatic check(input logic [31:0] el, input logic [31:0] er, input string what);
    checks++;
    if (l_out !== el || r_out !== er) begin
      failures++;
      $display("FAIL %s: got %h %h expected %h %h", what, l_out, r_out, el, er);
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
    l_in = 32'hCC00CCFF;
    r_in = 32'hF0AAF0AA;
    k    = 48'h1B02EFFC7072; #1;
    check(32'hF0AAF0AA, 32'hEF4A6544, "worked example");
    for (int i = 0; i < 300; i++) begin
      l_in = $urandom;
      r_in = $urandom;
      k    = {$urandom, 16'($urandom)}; #1;
      check(r_in, l_in ^ ref_f(r_in, k), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
