// des_f: the DES round function F(R, K).
//
// Expands the 32-bit right half R(i-1) to 48 bits with E, xors it with the
// 48-bit subkey K(i), passes each 6-bit slice through its S-box S1..S8 (S1
// takes the most significant slice) and permutes the 32 S-box output bits
// with P. Purely combinational. The structure is the one the document draws;
// the E, P and S-box tables are the standard's.
module des_f (
  input  logic [31:0] r,   // R(i-1)
  input  logic [47:0] k,   // K(i)
  output logic [31:0] f    // F(R(i-1), K(i))
);
  import des_pkg::*;

  logic [47:0] x;          // E(R) xor K
  logic [31:0] s;          // S-box outputs, S1 in bits 31:28

  always_comb x = expand(r) ^ k;

  for (genvar b = 0; b < 8; b++) begin : g_sbox
    des_sbox #(.BOX(b + 1)) u_sbox (
      .din  (x[47-6*b -: 6]),
      .dout (s[31-4*b -: 4])
    );
  end

  always_comb f = pperm(s);

endmodule
