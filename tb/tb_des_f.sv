// tb_des_f: self-checking test of the round function F(R, K).
//
// Checks the standard's worked example (R0 = F0AAF0AA, K1 = 1B02EFFC7072
// gives F = 234AA9BB) and random R, K pairs against the reference model.
module tb_des_f;
  import des_ref_pkg::*;

  logic [31:0] r, f;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_f dut (.r, .k, .f);

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s: r=%h k=%h got %h expected %h", what, r, k, f, exp);
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
    r = 32'hF0AAF0AA;
    k = 48'h1B02EFFC7072; #1;
    check(32'h234AA9BB, "worked example");
    for (int i = 0; i < 500; i++) begin
      r = $urandom;
      k = {$urandom, 16'($urandom)}; #1;
      check(ref_f(r, k), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
