// des_key_sched: indexed DES key scheduler for the iterative engine.
//
// Given the 64-bit key and the key number i (0..15 for rounds 1..16) it
// returns the round's 48-bit subkey: PC1 drops the parity bits and splits
// the key into C and D, both halves are rotated left by the total shift of
// all rounds up to the requested one (the document's chain of single
// rotations collapsed into one), and PC2 selects 48 bits. In decryption the
// subkeys are used in reverse order, so round i+1 gets subkey 16-i.
// Combinational; the controller changes i once per clock. The port set
// (KEY, key number i[3:0], KEY(i)) is the document's; the collapsed rotation
// and the use of a 0-based key number are choices of this design. The parity
// bits (key bits 8, 16, ..., 64) are ignored.
module des_key_sched (
  input  logic [63:0] key,      // key, parity bits included
  input  logic [3:0]  num,      // key number i: 0 = round 1
  input  logic        decrypt,  // 1 = subkeys in decryption order
  output logic [47:0] subkey    // K for the round
);
  import des_pkg::*;

  logic [55:0] cd0;
  logic [3:0]  sel;             // 0-based index of the subkey to produce

  always_comb begin
    cd0    = pc1(key);
    sel    = decrypt ? 4'(15 - num) : num;
    subkey = pc2(rotl_cd(cd0, cum_shift(32'(sel) + 1)));
  end

endmodule
