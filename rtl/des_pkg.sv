// des_pkg: the Data Encryption Standard (FIPS 46) as combinational functions.
//
// Holds the DES permutation and substitution tables and the functions the
// pipelined cipher is built from: initial and final permutation, the round
// function f(R,K) and the per-round subkey generator. Bit numbering follows the
// standard: DES bit 1 is the most significant bit of each vector.
//
// The pipelined cipher carries a 56-bit key through its stages. That key is
// the 64-bit DES key with its eight parity bits (DES bits 8, 16, ..., 64)
// removed, most significant first; des_subkey() maps it through PC-1, applies
// the cumulative left rotations for the round and selects the 48 bits of PC-2.
// All functions are pure wiring plus the eight 6-to-4 S-box lookups, so each
// pipeline stage holds one round of logic.
package des_pkg;

  localparam int ROUNDS = 16;

  localparam logic [6:0] IP_T [64] = '{58, 50, 42, 34, 26, 18, 10, 2, 60, 52, 44, 36, 28, 20, 12, 4, 62, 54, 46, 38, 30, 22, 14, 6, 64, 56, 48, 40, 32, 24, 16, 8, 57, 49, 41, 33, 25, 17, 9, 1, 59, 51, 43, 35, 27, 19, 11, 3, 61, 53, 45, 37, 29, 21, 13, 5, 63, 55, 47, 39, 31, 23, 15, 7};
  localparam logic [5:0] E_T [48] = '{32, 1, 2, 3, 4, 5, 4, 5, 6, 7, 8, 9, 8, 9, 10, 11, 12, 13, 12, 13, 14, 15, 16, 17, 16, 17, 18, 19, 20, 21, 20, 21, 22, 23, 24, 25, 24, 25, 26, 27, 28, 29, 28, 29, 30, 31, 32, 1};
  localparam logic [5:0] P_T [32] = '{16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10, 2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25};
  localparam logic [6:0] PC1_T [56] = '{57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18, 10, 2, 59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36, 63, 55, 47, 39, 31, 23, 15, 7, 62, 54, 46, 38, 30, 22, 14, 6, 61, 53, 45, 37, 29, 21, 13, 5, 28, 20, 12, 4};
  localparam logic [5:0] PC2_T [48] = '{14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10, 23, 19, 12, 4, 26, 8, 16, 7, 27, 20, 13, 2, 41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48, 44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};
  localparam logic [3:0] SBOX [8][64] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7, 0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8, 4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0, 15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10, 3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5, 0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15, 13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8, 13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1, 13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7, 1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15, 13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9, 10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4, 3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9, 14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6, 4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14, 11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11, 10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8, 9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6, 4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1, 13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6, 1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2, 6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7, 1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2, 7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8, 2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}
  };
  // Left rotations of C and D before each round, and their running sum.
  localparam int SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  function automatic int cum_shift(input int round);
    int s;
    s = 0;
    for (int i = 0; i <= round; i++) s += SHIFTS[i];
    return s;
  endfunction

  // Initial permutation IP.
  function automatic logic [63:0] des_ip(input logic [63:0] x);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[63-i] = x[64-int'(IP_T[i])];
    return o;
  endfunction

  // Final permutation IP^-1: output bit IP_T[i] takes input bit i+1.
  function automatic logic [63:0] des_fp(input logic [63:0] x);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) o[64-int'(IP_T[i])] = x[63-i];
    return o;
  endfunction

  // Position (1..64) in the 64-bit key of bit n (1..56) of the parity-free key.
  function automatic int key56_pos(input int p64);
    return p64 - (p64 - 1) / 8;
  endfunction

  // Subkey K(round+1), round = 0..15, from the parity-free 56-bit key.
  function automatic logic [47:0] des_subkey(input logic [55:0] key, input int round);
    logic [55:0] cd;
    logic [27:0] c, d;
    logic [47:0] k;
    int          s;
    for (int i = 0; i < 56; i++) cd[55-i] = key[56-key56_pos(int'(PC1_T[i]))];
    c = cd[55:28];
    d = cd[27:0];
    s = cum_shift(round) % 28;
    c = (c << s) | (c >> (28 - s));
    d = (d << s) | (d >> (28 - s));
    cd = {c, d};
    for (int i = 0; i < 48; i++) k[47-i] = cd[56-int'(PC2_T[i])];
    return k;
  endfunction

  // Round function f(R, K): expansion, key mix, S-boxes, permutation P.
  function automatic logic [31:0] des_f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    logic [31:0] o;
    logic [5:0]  b;
    for (int i = 0; i < 48; i++) e[47-i] = r[32-int'(E_T[i])];
    e = e ^ k;
    for (int j = 0; j < 8; j++) begin
      b = e[47-6*j -: 6];
      s[31-4*j -: 4] = SBOX[j][{b[5], b[0], b[4:1]}];
    end
    for (int i = 0; i < 32; i++) o[31-i] = s[32-int'(P_T[i])];
    return o;
  endfunction

endpackage
