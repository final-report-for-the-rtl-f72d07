// cell_router: the shell's cell router.
//
// Sends each real-time cell (user, bypass, resync) to the cryptographic module
// that owns its connection, ctx mod N_CRYPTO, so all cells of one connection
// meet the same state vector memory and keep their order. Cells classed
// non-real-time are diverted to the non-real-time control. The non-real-time
// control may also insert cells (a bypass cell, or a request to insert a resync
// cell on a connection); these are routed by the same rule. When both sources
// have a cell, they take turns. Which module serves which connection and the
// turn-taking are this implementation's choices.
//
// Timing: combinational; one cell per cycle when the chosen destination is
// ready.
module cell_router
  import atm_pkg::*;
#(
  parameter int N_CRYPTO = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rt_valid,        // from identification & association
  output logic                 rt_ready,
  input  tcell_t               rt_tcell,
  input  logic                 ins_valid,       // inserted by non-real-time control
  output logic                 ins_ready,
  input  tcell_t               ins_tcell,
  output logic [N_CRYPTO-1:0]  cm_valid,        // to the cryptographic modules
  input  logic [N_CRYPTO-1:0]  cm_ready,
  output tcell_t               cm_tcell,
  output logic                 nrt_valid,       // to non-real-time control
  input  logic                 nrt_ready,
  output tcell_t               nrt_tcell
);
  logic   pick_ins;     // this cycle serves the inserted stream
  logic   ins_turn;     // inserted stream goes first on the next conflict
  logic   src_valid;
  logic   dst_ready;
  tcell_t sel;
  int     dst;

  assign pick_ins  = ins_valid && (!rt_valid || ins_turn);
  assign sel       = pick_ins ? ins_tcell : rt_tcell;
  assign src_valid = pick_ins ? ins_valid : rt_valid;
  assign dst       = int'(sel.ctx) % N_CRYPTO;

  always_comb begin
    cm_valid  = '0;
    nrt_valid = 1'b0;
    if (sel.cls == CLS_NRT) begin
      nrt_valid = src_valid;
      dst_ready = nrt_ready;
    end else begin
      cm_valid[dst] = src_valid;
      dst_ready     = cm_ready[dst];
    end
  end

  assign cm_tcell  = sel;
  assign nrt_tcell = sel;
  assign rt_ready  = !pick_ins && dst_ready;
  assign ins_ready = pick_ins && dst_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ins_turn <= 1'b0;
    else if (rt_valid && ins_valid && src_valid && dst_ready) ins_turn <= !pick_ins;
  end
endmodule
