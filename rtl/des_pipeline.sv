// des_pipeline: fully pipelined, key-agile DES encryptor.
//
// Sixteen des_round stages, each with its own subkey generator, are chained
// with a register after every round, so a new 64-bit block with its own 56-bit
// key enters every clock and leaves 16 clocks later. Because the key moves down
// the pipeline beside the data, consecutive blocks may belong to different
// connections without emptying the pipeline. The bypass control bit travels
// with each block; a bypassed block skips every round and also the initial and
// final permutations, and leaves the pipeline exactly as it entered.
//
// Interface: in_* is sampled when en=1; out_* shows the block that entered 16
// enabled cycles earlier, with the key it was encrypted under. en=0 freezes
// every stage (used for back-pressure). The key is the 64-bit DES key without
// its parity bits (see des_pkg).
//
// The 16-stage structure with the key and bypass bit carried beside the data
// follows the design; skipping the permutations for bypassed blocks and the
// enable for back-pressure are this implementation's choices.
module des_pipeline
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic        in_bypass,
  input  logic [55:0] in_key,
  input  logic [63:0] in_data,     // plaintext block
  output logic        out_valid,
  output logic        out_bypass,
  output logic [55:0] out_key,
  output logic [63:0] out_data     // ciphertext block
);
  logic        v  [ROUNDS+1];
  logic        bp [ROUNDS+1];
  logic [55:0] k  [ROUNDS+1];
  logic [63:0] lr [ROUNDS+1];

  assign v[0]  = in_valid;
  assign bp[0] = in_bypass;
  assign k[0]  = in_key;
  assign lr[0] = in_bypass ? in_data : des_ip(in_data);

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    des_round #(.ROUND(r)) u_round (
      .clk, .rst_n, .en,
      .in_valid (v[r]),   .in_bypass (bp[r]),   .in_key (k[r]),   .in_lr (lr[r]),
      .out_valid(v[r+1]), .out_bypass(bp[r+1]), .out_key(k[r+1]), .out_lr(lr[r+1])
    );
  end

  // After round 16 the halves are swapped back before the final permutation.
  assign out_valid  = v[ROUNDS];
  assign out_bypass = bp[ROUNDS];
  assign out_key    = k[ROUNDS];
  assign out_data   = bp[ROUNDS] ? lr[ROUNDS]
                                 : des_fp({lr[ROUNDS][31:0], lr[ROUNDS][63:32]});
endmodule
