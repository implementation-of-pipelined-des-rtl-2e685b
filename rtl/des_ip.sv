// des_ip: the DES initial permutation IP.
//
// Reorders the 64 plaintext bits by the standard IP table before the sixteen
// rounds; the upper half of the result is L(0) and the lower half R(0). The
// permutation is pure wiring with no logic and no clock. Bit 1 of the
// [1:64] numbering is din[63]. The block itself is the one the document
// draws first in its algorithm diagram; the table is the standard's.
module des_ip (
  input  logic [63:0] din,   // plaintext (or ciphertext when decrypting)
  output logic [63:0] dout   // IP(din) = {L(0), R(0)}
);
  import des_pkg::*;

  always_comb dout = ip(din);

endmodule
