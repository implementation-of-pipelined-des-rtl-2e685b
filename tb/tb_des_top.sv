// tb_des_top: end-to-end test of both DES engines at their default sizes.
//
// The pipelined engine gets a random stream (a block on most cycles, random
// keys, data and modes, known-answer vectors first); every output is
// checked against the reference model and must appear PIPE_STAGES = 2
// cycles after its input. Each ciphertext the pipeline produces is handed,
// with its key, to the iterative engine to be decrypted back (up to four
// waiting at a time, as the iterative engine is sixteen times slower), so the two
// engines check each other; when that queue is empty the iterative engine
// gets random work in either mode. Every iterative block must finish
// exactly sixteen cycles after its start cycle, new blocks are started in
// the cycle done is high, and a spurious start is raised while busy.
// Counted mechanisms, each of which must occur: pipeline back-to-back
// blocks, pipeline mode switches, pipeline key changes, iterative
// encryptions, iterative decryptions, starts ignored while busy,
// back-to-back iterative starts and cross-engine round trips.
module tb_des_top;
  import des_ref_pkg::*;

  localparam int PL_LAT = 2;
  localparam int NP_LAT = 16;
  localparam int NCYC   = 4000;

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
  int n_pl_blocks = 0, n_pl_b2b = 0, n_pl_switch = 0, n_pl_keychg = 0;
  int n_np_enc = 0, n_np_dec = 0, n_np_ignored = 0, n_np_b2b = 0, n_cross = 0;
  bit pl_done_flag = 0;

  logic        h_valid [0:NCYC+40];
  logic        h_dec   [0:NCYC+40];
  logic [63:0] h_key   [0:NCYC+40];
  logic [63:0] h_din   [0:NCYC+40];
  logic [63:0] h_exp   [0:NCYC+40];

  // ciphertexts from the pipeline waiting to be decrypted by the iterative engine
  logic [63:0] x_key [$];
  logic [63:0] x_ct  [$];
  logic [63:0] x_pt  [$];

  des_top dut (
    .clk, .rst_n,
    .np_start, .np_decrypt, .np_key, .np_din, .np_busy, .np_done, .np_dout,
    .pl_in_valid, .pl_decrypt, .pl_key, .pl_din, .pl_out_valid, .pl_dout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Pipelined engine: stimulus and scoreboard.
  initial begin
    bit prev_v = 0, prev_d = 0;
    logic [63:0] prev_k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC + 10; c++) begin
      @(negedge clk);
      if (c >= PL_LAT) begin
        check(pl_out_valid === h_valid[c-PL_LAT], "pipeline out_valid timing");
        if (pl_out_valid && h_valid[c-PL_LAT]) begin
          check(pl_dout === h_exp[c-PL_LAT], "pipeline result");
          if (!h_dec[c-PL_LAT] && x_ct.size() < 4) begin
            x_key.push_back(h_key[c-PL_LAT]);
            x_ct.push_back(pl_dout);
            x_pt.push_back(h_din[c-PL_LAT]);
          end
        end
      end
      if (c < NCYC) begin
        pl_in_valid = ($urandom % 6) != 0;
        pl_decrypt  = $urandom % 2;
        pl_key      = (($urandom % 3) == 0) ? prev_k : rand64();
        pl_din      = rand64();
        if (c < 2 * NKAT) begin
          pl_in_valid = 1'b1;
          pl_decrypt  = c[0];
          pl_key      = KAT[c/2][0];
          pl_din      = pl_decrypt ? KAT[c/2][2] : KAT[c/2][1];
        end
      end else begin
        pl_in_valid = 1'b0;
      end
      h_valid[c] = pl_in_valid;
      h_dec[c]   = pl_decrypt;
      h_key[c]   = pl_key;
      h_din[c]   = pl_din;
      h_exp[c]   = ref_des(pl_din, pl_key, pl_decrypt);
      if (c < 2 * NKAT)
        check(h_exp[c] == (pl_decrypt ? KAT[c/2][1] : KAT[c/2][2]), "reference model known answer");
      if (pl_in_valid) begin
        n_pl_blocks++;
        if (prev_v) n_pl_b2b++;
        if (n_pl_blocks > 1 && pl_decrypt != prev_d) n_pl_switch++;
        if (n_pl_blocks > 1 && pl_key != prev_k) n_pl_keychg++;
        prev_d = pl_decrypt;
        prev_k = pl_key;
      end
      prev_v = pl_in_valid;
    end
    pl_done_flag = 1;
  end

  // Iterative engine: one block at a time, next start in the done cycle.
  initial begin
    logic [63:0] k, d, e;
    bit dec, is_cross;
    int cycles, job;
    repeat (3) @(negedge clk);
    job = 0;
    @(negedge clk);
    while (!pl_done_flag || x_ct.size() > 0) begin
      if (x_ct.size() > 0 && (job % 3) != 2) begin
        k = x_key.pop_front();
        d = x_ct.pop_front();
        e = x_pt.pop_front();
        dec = 1'b1;
        is_cross = 1'b1;
      end else begin
        k = rand64();
        d = rand64();
        dec = $urandom % 2;
        e = ref_des(d, k, dec);
        is_cross = 1'b0;
      end
      if (np_done) n_np_b2b++;
      np_start = 1'b1; np_key = k; np_din = d; np_decrypt = dec;
      @(negedge clk);
      np_start = 1'b0; np_key = rand64(); np_din = rand64(); np_decrypt = ~dec;
      cycles = 1;
      while (!np_done && cycles < 40) begin
        if (cycles == 7) begin
          np_start = 1'b1;                   // engine busy: must be ignored
          n_np_ignored++;
        end
        if (cycles == 8) np_start = 1'b0;
        @(negedge clk);
        cycles++;
      end
      check(cycles == NP_LAT, "iterative start-to-done latency");
      check(np_dout === e, "iterative result");
      if (is_cross) n_cross++;
      if (dec) n_np_dec++; else n_np_enc++;
      job++;
    end
    np_start = 1'b0;
    @(negedge clk);

    $display("pipeline: blocks %0d, back-to-back %0d, mode switches %0d, key changes %0d",
             n_pl_blocks, n_pl_b2b, n_pl_switch, n_pl_keychg);
    $display("iterative: encryptions %0d, decryptions %0d, ignored starts %0d, back-to-back starts %0d, cross-engine round trips %0d",
             n_np_enc, n_np_dec, n_np_ignored, n_np_b2b, n_cross);
    check(n_pl_b2b > 0, "pipeline back-to-back blocks occurred");
    check(n_pl_switch > 0, "pipeline mode switch occurred");
    check(n_pl_keychg > 0, "pipeline key change occurred");
    check(n_np_enc > 0, "iterative encryption occurred");
    check(n_np_dec > 0, "iterative decryption occurred");
    check(n_np_ignored > 0, "start while busy occurred");
    check(n_np_b2b > 0, "back-to-back iterative start occurred");
    check(n_cross > 0, "cross-engine round trip occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
