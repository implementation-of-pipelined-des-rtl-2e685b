// des_ref_pkg: behavioural DES reference model for the testbenches.
//
// A straightforward software-style model of FIPS 46-3, written separately
// from the RTL: bits are held in 1-based arrays numbered as in the standard
// (bit 1 = most significant), each table is applied with a loop, the key
// schedule is generated round by round with single rotations and, for
// decryption, the subkey list is simply reversed. The testbenches compare
// the RTL with this model and check the model itself against published
// known-answer vectors. Not synthesizable, not meant to be.
package des_ref_pkg;


  localparam int R_IP [1:64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7
  };
  localparam int R_FP [1:64] = '{
    40, 8, 48, 16, 56, 24, 64, 32, 39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30, 37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28, 35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26, 33, 1, 41, 9, 49, 17, 57, 25
  };
  localparam int R_E [1:48] = '{
    32, 1, 2, 3, 4, 5, 4, 5, 6, 7, 8, 9, 8, 9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32, 1
  };
  localparam int R_P [1:32] = '{
    16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
    2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25
  };
  localparam int R_PC1 [1:56] = '{
    57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18, 10, 2,
    59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36, 63, 55, 47, 39,
    31, 23, 15, 7, 62, 54, 46, 38, 30, 22, 14, 6, 61, 53, 45, 37,
    29, 21, 13, 5, 28, 20, 12, 4
  };
  localparam int R_PC2 [1:48] = '{
    14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10, 23, 19, 12, 4,
    26, 8, 16, 7, 27, 20, 13, 2, 41, 52, 31, 37, 47, 55, 30, 40,
    51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };
  localparam int R_SH [1:16] = '{
    1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1
  };
  localparam int R_S [1:8][0:63] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7,
      0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8,
      4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0,
      15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10,
      3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5,
      0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15,
      13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8,
      13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1,
      13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7,
      1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15,
      13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9,
      10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4,
      3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9,
      14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6,
      4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14,
      11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11,
      10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8,
      9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6,
      4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1,
      13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6,
      1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2,
      6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7,
      1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2,
      7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8,
      2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}
  };

  // Vector to 1-based bit array and back (bit 1 = MSB).
  function automatic void unpack64(input logic [63:0] v, output bit b [1:64]);
    for (int i = 1; i <= 64; i++) b[i] = v[64-i];
  endfunction

  function automatic logic [63:0] pack64(input bit b [1:64]);
    logic [63:0] v;
    for (int i = 1; i <= 64; i++) v[64-i] = b[i];
    return v;
  endfunction

  function automatic logic [63:0] ref_ip(input logic [63:0] x);
    bit a [1:64];
    bit b [1:64];
    unpack64(x, a);
    for (int i = 1; i <= 64; i++) b[i] = a[R_IP[i]];
    return pack64(b);
  endfunction

  function automatic logic [63:0] ref_fp(input logic [63:0] x);
    bit a [1:64];
    bit b [1:64];
    unpack64(x, a);
    for (int i = 1; i <= 64; i++) b[i] = a[R_FP[i]];
    return pack64(b);
  endfunction

  function automatic logic [3:0] ref_sbox(input int box, input logic [5:0] v);
    int row, col;
    row = 2 * int'(v[5]) + int'(v[0]);
    col = int'(v[4:1]);
    return 4'(R_S[box][16*row + col]);
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [47:0] k);
    bit rb [1:32];
    bit eb [1:48];
    bit sb [1:32];
    bit pb [1:32];
    logic [31:0] res;
    for (int i = 1; i <= 32; i++) rb[i] = r[32-i];
    for (int i = 1; i <= 48; i++) eb[i] = rb[R_E[i]] ^ k[48-i];
    for (int box = 1; box <= 8; box++) begin
      logic [5:0] six;
      logic [3:0] four;
      for (int j = 0; j < 6; j++) six[5-j] = eb[6*(box-1) + j + 1];
      four = ref_sbox(box, six);
      for (int j = 0; j < 4; j++) sb[4*(box-1) + j + 1] = four[3-j];
    end
    for (int i = 1; i <= 32; i++) pb[i] = sb[R_P[i]];
    for (int i = 1; i <= 32; i++) res[32-i] = pb[i];
    return res;
  endfunction

  // The sixteen encryption subkeys K(1)..K(16), returned in ks[1..16].
  function automatic void ref_subkeys(input logic [63:0] key, output logic [47:0] ks [1:16]);
    bit kb [1:64];
    bit c [1:28];
    bit d [1:28];
    bit cd [1:56];
    unpack64(key, kb);
    for (int i = 1; i <= 28; i++) begin
      c[i] = kb[R_PC1[i]];
      d[i] = kb[R_PC1[i+28]];
    end
    for (int rnd = 1; rnd <= 16; rnd++) begin
      for (int s = 0; s < R_SH[rnd]; s++) begin
        bit c1, d1;
        c1 = c[1];
        d1 = d[1];
        for (int i = 1; i < 28; i++) begin
          c[i] = c[i+1];
          d[i] = d[i+1];
        end
        c[28] = c1;
        d[28] = d1;
      end
      for (int i = 1; i <= 28; i++) begin
        cd[i]    = c[i];
        cd[i+28] = d[i];
      end
      for (int i = 1; i <= 48; i++) ks[rnd][48-i] = cd[R_PC2[i]];
    end
  endfunction

  // Full DES of one block; dec = 1 applies the subkeys in reverse.
  function automatic logic [63:0] ref_des(input logic [63:0] blk, input logic [63:0] key, input bit dec);
    logic [47:0] ks [1:16];
    logic [63:0] x;
    logic [31:0] l, r, t;
    ref_subkeys(key, ks);
    x = ref_ip(blk);
    l = x[63:32];
    r = x[31:0];
    for (int rnd = 1; rnd <= 16; rnd++) begin
      t = r;
      r = l ^ ref_f(r, ks[dec ? 17 - rnd : rnd]);
      l = t;
    end
    return ref_fp({r, l});
  endfunction

  // Published known-answer vectors: {key, plaintext, ciphertext}.
  localparam int NKAT = 3;
  localparam logic [63:0] KAT [NKAT][3] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000}
  };

  function automatic logic [63:0] rand64();
    return {$urandom, $urandom};
  endfunction

endpackage
