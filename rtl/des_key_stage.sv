// des_key_stage: one step of the cascaded DES key schedule.
//
// Position ROUND (1..16) in the chain: rotates both 28-bit halves of C|D and
// applies PC2 to the result to give that round's subkey. In encryption the
// halves rotate left by the standard shift of the round. In decryption they
// rotate right instead, by nothing in round 1 and by the shift of
// encryption round 18-ROUND afterwards, which walks the schedule backwards
// from C16|D16 (= C0|D0) and so hands out K(16) first. Combinational. The
// rotate-right alternative for decryption is the one the document proposes;
// the schedule of shift amounts is the standard's.
module des_key_stage #(
  parameter int unsigned ROUND = 1      // 1..16
) (
  input  logic [55:0] cd_in,    // C(i-1)|D(i-1) (decryption: walking backwards)
  input  logic        decrypt,
  output logic [55:0] cd_out,   // C(i)|D(i)
  output logic [47:0] subkey    // PC2(cd_out)
);
  import des_pkg::*;

  localparam int unsigned LSH = 32'(SHIFT_T[ROUND-1]);
  localparam int unsigned RSH = dec_shift(ROUND);

  always_comb begin
    cd_out = decrypt ? rotr_cd(cd_in, RSH) : rotl_cd(cd_in, LSH);
    subkey = pc2(cd_out);
  end

  initial assert (ROUND >= 1 && ROUND <= NROUNDS) else $error("des_key_stage: ROUND must be 1..16");

endmodule
