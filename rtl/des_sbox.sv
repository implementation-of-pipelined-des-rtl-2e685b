// des_sbox: one of the eight DES substitution boxes.
//
// A 64-entry, 4-bit look-up table selected by the parameter BOX (1..8 for
// S1..S8). The outer input bits din[5] and din[0] pick the row, the four
// inner bits din[4:1] the column. Combinational, no clock. The document
// shows eight boxes each with "its own look up table" but does not print
// the tables; their contents are those of FIPS 46-3.
module des_sbox #(
  parameter int unsigned BOX = 1        // 1..8
) (
  input  logic [5:0] din,
  output logic [3:0] dout
);
  import des_pkg::*;

  localparam logic [2:0] BOX_IDX = 3'(BOX - 1);

  always_comb dout = sbox(BOX_IDX, din);

  initial assert (BOX >= 1 && BOX <= 8) else $error("des_sbox: BOX must be 1..8");

endmodule
