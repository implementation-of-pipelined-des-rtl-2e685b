// tb_des_single_block: the single-block case, on both engines.
//
// Encrypts one 64-bit block (decimal 123) under one 64-bit key (decimal
// 456) on the iterative and on the pipelined engine of des_top at default
// sizes, then decrypts each ciphertext on the same engine. Checks the
// ciphertext against the reference model, the round trip back to 123, that
// the two engines agree, and the cycle counts: sixteen clocks from start to
// done on the iterative engine, two clocks from input to output on the
// pipelined one.
module tb_des_single_block;
  import des_ref_pkg::*;

  localparam logic [63:0] KEY = 64'd456;
  localparam logic [63:0] PT  = 64'd123;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        np_start = 1'b0, np_decrypt = 1'b0;
  logic [63:0] np_key = '0, np_din = '0;
  logic        np_busy, np_done;
  logic [63:0] np_dout;
  logic        pl_in_valid = 1'b0, pl_decrypt = 1'b0;
  logic [63:0] pl_key = '0, pl_din = '0;
  logic        pl_out_valid;
  logic [63:0] pl_dout;
  int checks = 0, failures = 0;

  des_top dut (
    .clk, .rst_n,
    .np_start, .np_decrypt, .np_key, .np_din, .np_busy, .np_done, .np_dout,
    .pl_in_valid, .pl_decrypt, .pl_key, .pl_din, .pl_out_valid, .pl_dout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_np(input logic [63:0] d, input bit dec, output logic [63:0] res, output int cycles);
    @(negedge clk);
    np_start = 1'b1; np_key = KEY; np_din = d; np_decrypt = dec;
    @(negedge clk);
    np_start = 1'b0;
    cycles = 1;
    while (!np_done && cycles < 40) begin
      @(negedge clk);
      cycles++;
    end
    res = np_dout;
  endtask

  task automatic run_pl(input logic [63:0] d, input bit dec, output logic [63:0] res, output int cycles);
    @(negedge clk);
    pl_in_valid = 1'b1; pl_key = KEY; pl_din = d; pl_decrypt = dec;
    @(negedge clk);
    pl_in_valid = 1'b0;
    cycles = 1;
    while (!pl_out_valid && cycles < 40) begin
      @(negedge clk);
      cycles++;
    end
    res = pl_dout;
  endtask

  initial begin
    logic [63:0] ct_np, ct_pl, pt_np, pt_pl;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run_np(PT, 1'b0, ct_np, cyc);
    check(cyc == 16, "iterative encryption takes 16 clocks");
    check(ct_np === ref_des(PT, KEY, 1'b0), "iterative ciphertext");
    run_np(ct_np, 1'b1, pt_np, cyc);
    check(cyc == 16, "iterative decryption takes 16 clocks");
    check(pt_np === PT, "iterative round trip");

    run_pl(PT, 1'b0, ct_pl, cyc);
    check(cyc == 2, "pipelined encryption takes 2 clocks");
    check(ct_pl === ct_np, "engines agree on the ciphertext");
    run_pl(ct_pl, 1'b1, pt_pl, cyc);
    check(cyc == 2, "pipelined decryption takes 2 clocks");
    check(pt_pl === PT, "pipelined round trip");

    $display("key %0d, plaintext %0d -> ciphertext %0d (%h)", KEY, PT, ct_np, ct_np);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
