// des_round: one Feistel round of DES.
//
// L(i) = R(i-1) and R(i) = L(i-1) xor F(R(i-1), K(i)), with F computed by
// des_f. Purely combinational; the unrolled engine chains sixteen of these.
// This is exactly the round the document describes.
module des_round (
  input  logic [31:0] l_in,   // L(i-1)
  input  logic [31:0] r_in,   // R(i-1)
  input  logic [47:0] k,      // K(i)
  output logic [31:0] l_out,  // L(i)
  output logic [31:0] r_out   // R(i)
);
  logic [31:0] f;

  des_f u_f (.r(r_in), .k(k), .f(f));

  always_comb begin
    l_out = r_in;
    r_out = l_in ^ f;
  end

endmodule
