// des_top: the two DES engines side by side.
//
// Holds the iterative engine (des_nonpipelined: one round per clock, one
// 64-bit block every sixteen clocks) and the unrolled pipelined engine
// (des_pipelined: PIPE_STAGES register stages, one block per clock, result
// PIPE_STAGES clocks after the input) with separate ports, prefixed np_ and
// pl_. They share only clock and reset. Both encrypt or decrypt a 64-bit
// block under a 64-bit key (parity bits ignored), the mode chosen per block.
// Presenting the two engines as the pair to compare is the document's;
// the shared top with one mode input per engine is this design's choice.
module des_top #(
  parameter int unsigned PIPE_STAGES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // iterative engine
  input  logic        np_start,
  input  logic        np_decrypt,
  input  logic [63:0] np_key,
  input  logic [63:0] np_din,
  output logic        np_busy,
  output logic        np_done,
  output logic [63:0] np_dout,
  // pipelined engine
  input  logic        pl_in_valid,
  input  logic        pl_decrypt,
  input  logic [63:0] pl_key,
  input  logic [63:0] pl_din,
  output logic        pl_out_valid,
  output logic [63:0] pl_dout
);
  des_nonpipelined u_np (
    .clk, .rst_n, .start (np_start), .decrypt (np_decrypt), .key (np_key),
    .din (np_din), .busy (np_busy), .done (np_done), .dout (np_dout)
  );

  des_pipelined #(.STAGES(PIPE_STAGES)) u_pl (
    .clk, .rst_n, .in_valid (pl_in_valid), .decrypt (pl_decrypt), .key (pl_key),
    .din (pl_din), .out_valid (pl_out_valid), .dout (pl_dout)
  );

endmodule
