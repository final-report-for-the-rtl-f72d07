// tb_model_pkg: reference models used by the testbenches.
//
// An iterative (one round at a time) DES built from the des_pkg round and
// key-schedule functions, whose composition the pipeline test checks against
// FIPS known answers; a counter-mode key stream model; the state vector
// stepping rules written out field by field; and a CRC-10 computed by
// polynomial long division over an explicit bit list, independent of the
// register formulation used in the RTL.
//
// The DES tables are the standard's; the SV stepping and resync layout mirror
// this implementation's choices, written independently of the RTL.
package tb_model_pkg;
  import des_pkg::*;
  import atm_pkg::*;

  function automatic logic [63:0] des_ref(input logic [55:0] key, input logic [63:0] pt);
    logic [63:0] x;
    logic [31:0] l, r, t;
    x = des_ip(pt);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ des_f(r, des_subkey(key, i));
      l = t;
    end
    return des_fp({r, l});
  endfunction

  // Key stream of one cell: DES of the SV with segment numbers 0..5.
  function automatic logic [383:0] keystream(input logic [55:0] key, input logic [63:0] sv);
    logic [383:0] ks;
    for (int j = 0; j < 6; j++) ks[383-64*j -: 64] = des_ref(key, {sv[63:3], 3'(j)});
    return ks;
  endfunction

  // SV after one user cell: seq+1, LFSR (taps 21,19) stepped, segment 0.
  function automatic logic [63:0] sv_after_cell(input logic [63:0] sv);
    logic [20:0] lf;
    logic [30:0] seq;
    lf  = sv[63:43];
    lf  = {lf[19:0], lf[20] ^ lf[18]};
    seq = sv[33:3] + 1;
    return {lf, sv[42], sv[41:34], seq, 3'b000};
  endfunction

  // SV after a resync with jump number jn and I/R bit ir.
  function automatic logic [63:0] sv_after_jump(input logic [7:0] jn, input logic ir);
    return {21'h1FFFFF, ir, jn, 31'd0, 3'd0};
  endfunction

  // CRC-10 (x^10+x^9+x^5+x^4+x+1) of the first 374 payload bits by long division.
  function automatic logic [9:0] crc10_ref(input logic [383:0] p);
    bit  m [384];
    bit  g [11] = '{1,1,0,0,0,1,1,0,0,1,1};   // x^10 .. x^0
    logic [9:0] c;
    for (int i = 0; i < 374; i++) m[i] = p[383-i];
    for (int i = 374; i < 384; i++) m[i] = 0;   // multiply by x^10
    for (int i = 0; i < 374; i++)
      if (m[i]) for (int j = 0; j < 11; j++) m[i+j] ^= g[j];
    for (int i = 0; i < 10; i++) c[9-i] = m[374+i];
    return c;
  endfunction

  // Resync payload as the receiver expects it, CRC included.
  function automatic logic [383:0] resync_cell_ref(input logic [63:0] sv);
    logic [383:0] p;
    p = '0;
    p[383:376] = 8'hA5;
    p[375:312] = sv;
    for (int i = 0; i < 37; i++) p[311-8*i -: 8] = 8'h6A;
    p[9:0] = crc10_ref(p);
    return p;
  endfunction

  function automatic logic [383:0] rand_payload();
    logic [383:0] p;
    for (int i = 0; i < 12; i++) p[32*i +: 32] = $urandom;
    return p;
  endfunction

  function automatic logic [55:0] rand_key();
    return {$urandom, 24'($urandom)};
  endfunction
endpackage
