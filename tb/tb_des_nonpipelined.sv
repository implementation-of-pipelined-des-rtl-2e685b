// tb_des_nonpipelined: self-checking test of the iterative DES engine.
//
// Runs the published known-answer vectors both ways, random blocks and keys
// in both modes (each ciphertext decrypted again), checks that done comes
// exactly sixteen cycles after the start cycle, that the inputs need only be
// held in the start cycle, that start is ignored while busy, and that
// back-to-back blocks finish every sixteen cycles.
module tb_des_nonpipelined;
  import des_ref_pkg::*;

  localparam int LATENCY = 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        decrypt = 1'b0;
  logic [63:0] key = '0, din = '0;
  logic        busy, done;
  logic [63:0] dout;
  int checks = 0, failures = 0;

  des_nonpipelined dut (.clk, .rst_n, .start, .decrypt, .key, .din, .busy, .done, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic check_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One block: inputs valid only in the start cycle, scrambled afterwards;
  // a second start with other data is raised while the engine is busy.
  task automatic one_block(input logic [63:0] k, input logic [63:0] d, input bit dec,
                           output logic [63:0] res);
    int cycles;
    @(negedge clk);
    start = 1'b1; key = k; din = d; decrypt = dec;
    @(negedge clk);
    start = 1'b0; key = rand64(); din = rand64(); decrypt = ~dec;
    cycles = 1;
    while (!done && cycles < 40) begin
      if (cycles == 5) start = 1'b1;       // must be ignored: engine busy
      if (cycles == 6) start = 1'b0;
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low during rounds (cycle %0d)", cycles);
      end
      @(negedge clk);
      cycles++;
    end
    check_int(cycles, LATENCY, "start-to-done latency");
    res = dout;
  endtask

  initial begin
    logic [63:0] c, p, k, d;
    logic [63:0] exp_q [$];
    int t_done [$];
    int cyc;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < NKAT; i++) begin
      one_block(KAT[i][0], KAT[i][1], 1'b0, c);
      check64(c, KAT[i][2], "known-answer encryption");
      one_block(KAT[i][0], KAT[i][2], 1'b1, p);
      check64(p, KAT[i][1], "known-answer decryption");
    end

    for (int i = 0; i < 20; i++) begin
      k = rand64();
      d = rand64();
      one_block(k, d, 1'b0, c);
      check64(c, ref_des(d, k, 1'b0), "random encryption");
      one_block(k, c, 1'b1, p);
      check64(p, d, "decrypt(encrypt(x)) = x");
      one_block(k, d, 1'b1, p);
      check64(p, ref_des(d, k, 1'b1), "random decryption");
    end

    // Back to back: start held high, a new block is taken the cycle done is high.
    @(negedge clk);
    cyc = 0;
    for (int i = 0; i < 6; i++) begin
      k = rand64();
      d = rand64();
      start = 1'b1; key = k; din = d; decrypt = i[0];
      exp_q.push_back(ref_des(d, k, i[0]));
      do begin
        @(negedge clk);
        cyc++;
        if (done) begin
          check64(dout, exp_q.pop_front(), "back-to-back result");
          t_done.push_back(cyc);
        end
      end while (!done);
    end
    start = 1'b0;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      cyc++;
      if (done) begin
        check64(dout, exp_q.pop_front(), "back-to-back result");
        t_done.push_back(cyc);
      end
    end
    for (int i = 1; i < t_done.size(); i++)
      check_int(t_done[i] - t_done[i-1], LATENCY, "back-to-back interval");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
