// key_generator: counter-mode key stream generator.
//
// SLICES copies of the pipelined DES run side by side, one per 64-bit slice of
// the key generator's input word. Each beat carries SLICES counter blocks
// (state vectors that differ in their segment number) and is encrypted under
// the connection's key; the enciphered counters are the key stream. With the
// default SLICES=2 the interface is 128 bits wide and a 384-bit payload takes
// three beats; SLICES=6 covers a whole payload per beat.
//
// Timing: the cell processor presents a beat and, in the same cycle, the CV
// index to the CV memory. The beat is held one register stage here so that it
// meets the key word, which arrives from the synchronous CV memory one cycle
// later, at the DES inputs. The key stream appears 1+16 enabled cycles after
// the beat. en=0 freezes the whole generator. The bypass bit travels with the
// beat and tells the mixer to leave that cell's payload alone.
//
// Counter mode, the 128-bit interface and the use of full DES pipelines per slice
// follow the design; the alignment register and the bypass handling are this
// implementation's way of meeting the CV memory's timing.
module key_generator #(
  parameter int SLICES = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   in_valid,
  input  logic                   in_bypass,
  input  logic [SLICES*64-1:0]   in_blocks,   // slice 0 in the top 64 bits
  input  logic [55:0]            cv_key,      // from CV memory, one cycle after in_*
  output logic                   out_valid,
  output logic                   out_bypass,
  output logic [SLICES*64-1:0]   out_ks
);
  logic                 s0_valid, s0_bypass;
  logic [SLICES*64-1:0] s0_blocks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_valid  <= 1'b0;
      s0_bypass <= 1'b0;
    end else if (en) begin
      s0_valid  <= in_valid;
      s0_bypass <= in_bypass;
    end
  end

  always_ff @(posedge clk) begin
    if (en) s0_blocks <= in_blocks;
  end

  logic [SLICES-1:0] v_out, bp_out;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    logic [55:0] key_unused;
    des_pipeline u_des (
      .clk, .rst_n, .en,
      .in_valid  (s0_valid),
      .in_bypass (s0_bypass),
      .in_key    (cv_key),
      .in_data   (s0_blocks[(SLICES-s)*64-1 -: 64]),
      .out_valid (v_out[s]),
      .out_bypass(bp_out[s]),
      .out_key   (key_unused),
      .out_data  (out_ks[(SLICES-s)*64-1 -: 64])
    );
  end

  // All slices move in lock step; slice 0's flags speak for the beat.
  assign out_valid  = v_out[0];
  assign out_bypass = bp_out[0];

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (v_out == {SLICES{v_out[0]}}) && (bp_out == {SLICES{bp_out[0]}}));
endmodule
