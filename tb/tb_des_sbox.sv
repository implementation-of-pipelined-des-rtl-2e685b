// tb_des_sbox: exhaustive test of the eight S-boxes.
//
// Instantiates S1..S8 and compares all 64 inputs of each with the
// reference tables; also checks the standard's example S1(011011) = 0101.
module tb_des_sbox;
  import des_ref_pkg::*;

  logic [5:0] din;
  logic [3:0] dout [1:8];
  int checks = 0, failures = 0;

  for (genvar b = 1; b <= 8; b++) begin : g_box
    des_sbox #(.BOX(b)) dut (.din(din), .dout(dout[b]));
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 6'b011011; #1;
    checks++;
    if (dout[1] !== 4'b0101) begin
      failures++;
      $display("FAIL S1 example: got %b", dout[1]);
    end
    for (int v = 0; v < 64; v++) begin
      din = 6'(v); #1;
      for (int b = 1; b <= 8; b++) begin
        checks++;
        if (dout[b] !== ref_sbox(b, din)) begin
          failures++;
          $display("FAIL S%0d(%b): got %h expected %h", b, din, dout[b], ref_sbox(b, din));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
