// tb_des_ip: self-checking test of the initial permutation.
//
// Checks the worked example of the standard (IP of 0123456789ABCDEF is
// CC00CCFFF0AAF0AA), every single-bit input (which pins down the whole
// permutation) and random blocks against the reference model.
module tb_des_ip;
  import des_ref_pkg::*;

  logic [63:0] din, dout;
  int checks = 0, failures = 0;

  des_ip dut (.din, .dout);

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
    din = 64'h0123456789ABCDEF; #1;
    check(64'hCC00CCFFF0AAF0AA, "worked example");
    for (int i = 0; i < 64; i++) begin
      din = 64'd1 << i; #1;
      check(ref_ip(din), "single bit");
    end
    for (int i = 0; i < 200; i++) begin
      din = rand64(); #1;
      check(ref_ip(din), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
