// tb_des_fp: self-checking test of the final permutation.
//
// Checks every single-bit input and random blocks against the reference
// model, and that FP undoes the reference IP.
module tb_des_fp;
  import des_ref_pkg::*;

  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  des_fp dut (.din, .dout);

  task automatic check(input logic [63:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: din=%h got %h expected %h", what, din, dout, exp);
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
    logic [63:0] x;
    for (int i = 0; i < 64; i++) begin
      din = 64'd1 << i; #1;
      check(ref_fp(din), "single bit");
    end
    for (int i = 0; i < 200; i++) begin
      x = rand64();
      din = ref_ip(x); #1;
      check(x, "FP(IP(x)) = x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
