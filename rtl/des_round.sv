// des_round: one stage of the pipelined DES.
//
// A stage generates its own subkey from the 56-bit key that travels with the
// data, computes one Feistel round (L,R) -> (R, L xor f(R,K)) and registers the
// result together with the key, the valid flag and the bypass control bit.
// When the bypass bit is set the stage's switch passes the 64-bit word on
// unchanged, so cells that must not be enciphered keep their place in the
// pipeline. Following the pipelined DES structure of the design, every stage
// has its own subkey generator instead of a shared key schedule; the valid flag
// and the stall enable are this implementation's additions.
//
// Timing: one register stage; new input accepted every cycle in which en=1.
module des_round
  import des_pkg::*;
#(
  parameter int ROUND = 0          // 0..15, selects the key schedule rotation
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // advance the pipeline
  input  logic        in_valid,
  input  logic        in_bypass,
  input  logic [55:0] in_key,
  input  logic [63:0] in_lr,       // {L, R}
  output logic        out_valid,
  output logic        out_bypass,
  output logic [55:0] out_key,
  output logic [63:0] out_lr
);
  logic [47:0] subkey;
  logic [63:0] round_lr;

  always_comb begin
    subkey   = des_subkey(in_key, ROUND);
    round_lr = {in_lr[31:0], in_lr[63:32] ^ des_f(in_lr[31:0], subkey)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_bypass <= 1'b0;
    end else if (en) begin
      out_valid  <= in_valid;
      out_bypass <= in_bypass;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      out_key <= in_key;
      out_lr  <= in_bypass ? in_lr : round_lr;
    end
  end
endmodule
