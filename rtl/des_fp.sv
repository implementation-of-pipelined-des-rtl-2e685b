// des_fp: the DES final permutation FP, the inverse of IP.
//
// Applied to the pre-output block {R(16), L(16)} (halves swapped after the
// last round, as the standard does) to give the ciphertext. Pure wiring, no
// clock. Bit 1 of the [1:64] numbering is din[63]. The table is the
// standard's; the document only states that IP and FP undo each other.
module des_fp (
  input  logic [63:0] din,   // {R(16), L(16)}
  output logic [63:0] dout   // FP(din)
);
  import des_pkg::*;

  always_comb dout = fp(din);

endmodule
