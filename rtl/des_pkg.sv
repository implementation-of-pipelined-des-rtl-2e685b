// des_pkg: constants, types and bit-level helpers shared by the DES datapath.
//
// Holds the fixed tables of the Data Encryption Standard (FIPS 46-3): the
// initial and final permutations, the expansion E, the permutation P, the two
// key permutations PC1 and PC2, the per-round left-shift schedule and the
// eight S-boxes. Permutation tables list, for each output bit, the 1-based
// input bit it takes, with bit 1 the most significant bit, matching the
// [1:64] numbering of the block diagram. Everything here is combinational
// wiring once elaborated: a permutation costs no logic, an S-box is a 64-entry
// 4-bit ROM. The document names these tables but does not print them; their
// contents are the standard's.
package des_pkg;

  // Number of Feistel rounds.
  localparam int unsigned NROUNDS = 16;

  // Initial permutation (output bit n <- input bit IP_T[n-1]).
  localparam byte unsigned IP_T [64] = '{
    58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4,
    62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8,
    57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3,
    61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7
  };
  // Final permutation, the inverse of IP.
  localparam byte unsigned FP_T [64] = '{
    40, 8, 48, 16, 56, 24, 64, 32, 39, 7, 47, 15, 55, 23, 63, 31,
    38, 6, 46, 14, 54, 22, 62, 30, 37, 5, 45, 13, 53, 21, 61, 29,
    36, 4, 44, 12, 52, 20, 60, 28, 35, 3, 43, 11, 51, 19, 59, 27,
    34, 2, 42, 10, 50, 18, 58, 26, 33, 1, 41, 9, 49, 17, 57, 25
  };
  // Expansion E: 32 -> 48 bits.
  localparam byte unsigned E_T [48] = '{
    32, 1, 2, 3, 4, 5, 4, 5, 6, 7, 8, 9, 8, 9, 10, 11,
    12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21,
    22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32, 1
  };
  // Permutation P applied to the S-box outputs.
  localparam byte unsigned P_T [32] = '{
    16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
    2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25
  };
  // Permuted choice 1: 64-bit key -> 56-bit C|D (parity bits dropped).
  localparam byte unsigned PC1_T [56] = '{
    57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18, 10, 2,
    59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36, 63, 55, 47, 39,
    31, 23, 15, 7, 62, 54, 46, 38, 30, 22, 14, 6, 61, 53, 45, 37,
    29, 21, 13, 5, 28, 20, 12, 4
  };
  // Permuted choice 2: 56-bit C|D -> 48-bit subkey.
  localparam byte unsigned PC2_T [48] = '{
    14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10, 23, 19, 12, 4,
    26, 8, 16, 7, 27, 20, 13, 2, 41, 52, 31, 37, 47, 55, 30, 40,
    51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32
  };
  // Left rotation of C and D before round 1..16.
  localparam byte unsigned SHIFT_T [16] = '{
    1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1
  };
  // S-boxes S1..S8, 64 entries each, indexed by row*16 + column.
  localparam byte unsigned SBOX_T [8][64] = '{
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

  // State carried by one pipeline register of the unrolled engine.
  typedef struct packed {
    logic        valid;
    logic        decrypt;
    logic [31:0] l;
    logic [31:0] r;
    logic [55:0] cd;      // C (bits 55:28) and D (bits 27:0) of the key schedule
  } des_stage_t;

  // Apply IP to a 64-bit block.
  function automatic logic [63:0] ip(input logic [63:0] x);
    logic [63:0] y;
    for (int n = 0; n < 64; n++) y[63-n] = x[64-int'(IP_T[n])];
    return y;
  endfunction

  // Apply FP (= IP^-1) to a 64-bit block.
  function automatic logic [63:0] fp(input logic [63:0] x);
    logic [63:0] y;
    for (int n = 0; n < 64; n++) y[63-n] = x[64-int'(FP_T[n])];
    return y;
  endfunction

  // Expansion E.
  function automatic logic [47:0] expand(input logic [31:0] x);
    logic [47:0] y;
    for (int n = 0; n < 48; n++) y[47-n] = x[32-int'(E_T[n])];
    return y;
  endfunction

  // Permutation P.
  function automatic logic [31:0] pperm(input logic [31:0] x);
    logic [31:0] y;
    for (int n = 0; n < 32; n++) y[31-n] = x[32-int'(P_T[n])];
    return y;
  endfunction

  // Permuted choice 1.
  function automatic logic [55:0] pc1(input logic [63:0] x);
    logic [55:0] y;
    for (int n = 0; n < 56; n++) y[55-n] = x[64-int'(PC1_T[n])];
    return y;
  endfunction

  // Permuted choice 2.
  function automatic logic [47:0] pc2(input logic [55:0] x);
    logic [47:0] y;
    for (int n = 0; n < 48; n++) y[47-n] = x[56-int'(PC2_T[n])];
    return y;
  endfunction

  // S-box lookup: box is 0..7 (S1..S8), the outer bits select the row, the inner four the column.
  function automatic logic [3:0] sbox(input logic [2:0] box, input logic [5:0] b);
    logic [5:0] idx;
    idx = {b[5], b[0], b[4:1]};
    return SBOX_T[box][idx][3:0];
  endfunction

  // Rotate both 28-bit halves of C|D left by n (0..27).
  function automatic logic [55:0] rotl_cd(input logic [55:0] cd, input int unsigned n);
    logic [27:0] c, d;
    c = cd[55:28];
    d = cd[27:0];
    return {(c << n) | (c >> (28 - n)), (d << n) | (d >> (28 - n))};
  endfunction

  // Rotate both 28-bit halves of C|D right by n (0..27).
  function automatic logic [55:0] rotr_cd(input logic [55:0] cd, input int unsigned n);
    return rotl_cd(cd, (28 - n) % 28);
  endfunction

  // Total left rotation applied to C|D after round r (1..16) of encryption.
  function automatic int unsigned cum_shift(input int unsigned r);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j < NROUNDS; j++) if (j < r) s += 32'(SHIFT_T[j]);
    return s;
  endfunction

  // Right rotation done before decryption round r (1..16) when the key schedule
  // runs backwards: none before round 1 (C16|D16 = C0|D0), then the shift of
  // encryption round 18-r.
  function automatic int unsigned dec_shift(input int unsigned r);
    return (r <= 1) ? 0 : 32'(SHIFT_T[17 - r]);
  endfunction

endpackage
