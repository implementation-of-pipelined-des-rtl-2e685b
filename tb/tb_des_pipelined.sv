// tb_des_pipelined: self-checking test of the unrolled, pipelined engine.
//
// Drives three copies at once, with the default two stages, with sixteen
// stages (one round per stage) and with one stage, all from the same input
// stream: a new block on most cycles, each with a random key, random data
// and a random mode, including the published known-answer vectors. Every
// output is compared with the reference model, and must appear exactly
// STAGES cycles after its input with out_valid set; out_valid must stay low
// where no block went in. Counts back-to-back blocks, mode switches and key
// changes between consecutive blocks, and fails if any never happened.
module tb_des_pipelined;
  import des_ref_pkg::*;

  localparam int NCYC = 3000;
  localparam int NDUT = 3;
  localparam int ST [NDUT] = '{2, 16, 1};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        decrypt = 1'b0;
  logic [63:0] key = '0, din = '0;
  logic        out_valid [NDUT];
  logic [63:0] dout [NDUT];
  int checks = 0, failures = 0;

  logic        h_valid [0:NCYC+40];
  logic [63:0] h_exp   [0:NCYC+40];

  des_pipelined dut0 (.clk, .rst_n, .in_valid, .decrypt, .key, .din,
                      .out_valid (out_valid[0]), .dout (dout[0]));
  des_pipelined #(.STAGES(16)) dut1 (.clk, .rst_n, .in_valid, .decrypt, .key, .din,
                      .out_valid (out_valid[1]), .dout (dout[1]));
  des_pipelined #(.STAGES(1)) dut2 (.clk, .rst_n, .in_valid, .decrypt, .key, .din,
                      .out_valid (out_valid[2]), .dout (dout[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_blocks = 0, n_b2b = 0, n_switch = 0, n_keychg = 0, n_out = 0;
    bit prev_v = 0, prev_d = 0;
    logic [63:0] prev_k = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < NCYC + 20; c++) begin
      @(negedge clk);
      // check outputs due now
      for (int u = 0; u < NDUT; u++) begin
        if (c >= ST[u]) begin
          checks++;
          if (out_valid[u] !== h_valid[c-ST[u]]) begin
            failures++;
            $display("FAIL dut%0d cycle %0d: out_valid %b expected %b", u, c, out_valid[u], h_valid[c-ST[u]]);
          end else if (out_valid[u]) begin
            n_out++;
            checks++;
            if (dout[u] !== h_exp[c-ST[u]]) begin
              failures++;
              $display("FAIL dut%0d cycle %0d: dout %h expected %h", u, c, dout[u], h_exp[c-ST[u]]);
            end
          end
        end
      end
      // next input
      if (c < NCYC) begin
        in_valid = ($urandom % 8) != 0;
        decrypt  = $urandom % 2;
        key      = (($urandom % 4) == 0) ? prev_k : rand64();
        din      = rand64();
        if (c < 2 * NKAT) begin
          in_valid = 1'b1;
          decrypt  = c[0];
          key      = KAT[c/2][0];
          din      = decrypt ? KAT[c/2][2] : KAT[c/2][1];
        end
      end else begin
        in_valid = 1'b0;
      end
      h_valid[c] = in_valid;
      h_exp[c]   = ref_des(din, key, decrypt);
      if (c < 2 * NKAT)
        h_exp[c] = decrypt ? KAT[c/2][1] : KAT[c/2][2];
      if (in_valid) begin
        n_blocks++;
        if (prev_v) n_b2b++;
        if (n_blocks > 1 && decrypt != prev_d) n_switch++;
        if (n_blocks > 1 && key != prev_k) n_keychg++;
        prev_d = decrypt;
        prev_k = key;
      end
      prev_v = in_valid;
    end

    $display("blocks %0d, back-to-back %0d, mode switches %0d, key changes %0d, outputs checked %0d",
             n_blocks, n_b2b, n_switch, n_keychg, n_out);
    checks++;
    if (n_b2b == 0 || n_switch == 0 || n_keychg == 0 || n_out != NDUT * n_blocks) begin
      failures++;
      $display("FAIL a mechanism never happened or outputs were lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
