// des_pipelined: unrolled, pipelined DES engine.
//
// The sixteen rounds and the sixteen steps of the cascaded key schedule are
// laid out in a row and cut into STAGES register stages of 16/STAGES rounds
// each. Stage 1 applies IP to the input block and PC1 to the key; the last
// stage's register feeds FP. Every block carries its own key schedule state
// (C|D), mode bit and valid bit down the pipe, so a new block with any key
// and either mode can enter on every clock.
//
// Timing: a block presented with in_valid in cycle t appears on dout with
// out_valid in cycle t+STAGES; throughput is one block per clock. There is
// no back-pressure. The default of two stages matches the two clock cycles
// per result the document reports for its pipelined engine; how the rounds
// are split between register stages, the per-block key and mode, and the
// reset are choices of this design. Decryption rotates the key halves right,
// the alternative the document proposes.
module des_pipelined #(
  parameter int unsigned STAGES = 2     // 1, 2, 4, 8 or 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        decrypt,   // 1 = decrypt
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        out_valid,
  output logic [63:0] dout
);
  import des_pkg::*;

  localparam int unsigned RPS = NROUNDS / STAGES;   // rounds per stage

  logic [63:0] ip_out;
  des_stage_t  head;                     // stage 1 input
  des_stage_t  sreg [STAGES];            // stage output registers

  des_ip u_ip (.din(din), .dout(ip_out));

  always_comb begin
    head.valid   = in_valid;
    head.decrypt = decrypt;
    head.l       = ip_out[63:32];
    head.r       = ip_out[31:0];
    head.cd      = pc1(key);
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    des_stage_t  sin;
    logic [31:0] l [RPS+1];
    logic [31:0] r [RPS+1];
    logic [55:0] cd [RPS+1];

    if (s == 0) begin : g_first
      always_comb sin = head;
    end else begin : g_next
      always_comb sin = sreg[s-1];
    end

    always_comb begin
      l[0]  = sin.l;
      r[0]  = sin.r;
      cd[0] = sin.cd;
    end

    for (genvar j = 0; j < RPS; j++) begin : g_round
      logic [47:0] k;
      des_key_stage #(.ROUND(s*RPS + j + 1)) u_key (
        .cd_in (cd[j]), .decrypt (sin.decrypt), .cd_out (cd[j+1]), .subkey (k)
      );
      des_round u_round (
        .l_in (l[j]), .r_in (r[j]), .k (k), .l_out (l[j+1]), .r_out (r[j+1])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sreg[s] <= '0;
      end else begin
        sreg[s].valid   <= sin.valid;
        sreg[s].decrypt <= sin.decrypt;
        sreg[s].l       <= l[RPS];
        sreg[s].r       <= r[RPS];
        sreg[s].cd      <= cd[RPS];
      end
    end
  end

  des_fp u_fp (.din({sreg[STAGES-1].r, sreg[STAGES-1].l}), .dout(dout));

  always_comb out_valid = sreg[STAGES-1].valid;

  initial assert (STAGES >= 1 && STAGES <= NROUNDS && (NROUNDS % STAGES) == 0)
    else $error("des_pipelined: STAGES must divide 16");

endmodule
