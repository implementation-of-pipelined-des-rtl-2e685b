// des_ctrl: round controller of the iterative (non-pipelined) DES engine.
//
// A two-state FSM (IDLE, ROUND) with a 4-bit round counter that runs the
// sixteen DES rounds one per clock, and also holds the initial and final
// permutations. It owns the L and R registers. Each clock it hands the key
// and the key number i to the key scheduler, takes back the subkey K(i),
// passes R(i-1) and K(i) to the round function F, and forms
// L(i) = R(i-1), R(i) = L(i-1) xor F.
//
// Timing: the clock edge that accepts start (start high while not busy)
// already performs round 1 on IP(din), so rounds 1..16 take sixteen edges
// and done is high for one cycle, with dout valid, sixteen cycles after the
// start cycle. busy is high during rounds 2..16. A new start is accepted in
// the same cycle as done, giving one block every sixteen clocks. Key, mode
// and data need only be valid in the start cycle.
//
// The split into controller, key scheduler and F, the ports between them and
// the sixteen-cycle figure are the document's. The start/busy/done handshake,
// round 1 on the accepting edge and the asynchronous active-low reset are
// choices of this design.
module des_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  // block interface
  input  logic        start,
  input  logic        decrypt,
  input  logic [63:0] key_in,
  input  logic [63:0] din,
  output logic        busy,
  output logic        done,
  output logic [63:0] dout,
  // to / from the key scheduler
  output logic [63:0] ks_key,
  output logic [3:0]  ks_num,
  output logic        ks_decrypt,
  input  logic [47:0] ks_subkey,
  // to / from the round function F
  output logic [31:0] f_r,
  output logic [47:0] f_k,
  input  logic [31:0] f_in
);
  typedef enum logic {S_IDLE, S_ROUND} state_t;

  state_t      state;
  logic [3:0]  cnt;          // index of the round performed this cycle (0 = round 1)
  logic [31:0] l_q, r_q;     // L(i-1), R(i-1)
  logic [63:0] key_q;
  logic        dec_q;

  logic [63:0] ip_out;
  logic [63:0] fp_out;
  logic        accept;
  logic [31:0] l_cur, r_cur; // round inputs this cycle
  logic [31:0] l_nxt, r_nxt; // round outputs this cycle

  des_ip u_ip (.din(din), .dout(ip_out));
  des_fp u_fp (.din({r_nxt, l_nxt}), .dout(fp_out));

  always_comb begin
    accept     = (state == S_IDLE) && start;
    l_cur      = (state == S_IDLE) ? ip_out[63:32] : l_q;
    r_cur      = (state == S_IDLE) ? ip_out[31:0]  : r_q;
    ks_key     = (state == S_IDLE) ? key_in  : key_q;
    ks_decrypt = (state == S_IDLE) ? decrypt : dec_q;
    ks_num     = (state == S_IDLE) ? 4'd0    : cnt;
    f_r        = r_cur;
    f_k        = ks_subkey;
    l_nxt      = r_cur;
    r_nxt      = l_cur ^ f_in;
    busy       = (state == S_ROUND);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      l_q   <= '0;
      r_q   <= '0;
      key_q <= '0;
      dec_q <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          l_q   <= l_nxt;
          r_q   <= r_nxt;
          key_q <= key_in;
          dec_q <= decrypt;
          cnt   <= 4'd1;
          state <= S_ROUND;
        end
        S_ROUND: begin
          l_q <= l_nxt;
          r_q <= r_nxt;
          if (cnt == 4'd15) begin
            dout  <= fp_out;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The round counter only runs while the FSM is in ROUND, and done never
  // coincides with a block in flight.
  a_cnt_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               (state == S_ROUND) |-> (cnt != 4'd0));
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> (state == S_IDLE));

endmodule
