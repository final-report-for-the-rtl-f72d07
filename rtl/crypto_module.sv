// crypto_module: one cryptographic module of the security module.
//
// Wires together the parts of a counter-mode cryptographic module: the cell
// processor, the state vector memory, the dual-port CV (key) memory, the key
// generator (SLICES pipelined DES units), the FIFO that holds cells while their
// key stream is produced, and the key/plaintext mixer. The arrangement of these
// parts and the rule that the CV never passes through the cell processor follow
// the design; the cell-level handshakes are this implementation's.
//
// Interface: tagged cells in (valid/ready), finished cells out (valid/ready).
// The key management module owns CV memory port A (km_*); the non-real-time
// control loads SVs through init_*. Back-pressure: the whole module advances
// only when its output register is free (en = !out_valid || out_ready).
//
// Timing: a user cell is accepted every 1 + 6/SLICES cycles (4 at SLICES=2)
// and is on out_* 6/SLICES + 17 clock edges after the edge that accepted it
// (20 at SLICES=2): issue beats, one alignment stage, sixteen DES rounds and
// the mixer register.
module crypto_module
  import atm_pkg::*;
#(
  parameter int SLICES     = 2,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  tcell_t            in_tcell,
  output logic              out_valid,
  input  logic              out_ready,
  output cell_t             out_cell,
  input  logic              init_valid,
  output logic              init_ready,
  input  logic [CTX_W-1:0]  init_ctx,
  input  sv_t               init_sv,
  input  logic              role_ir,
  input  logic              km_en,
  input  logic              km_we,
  input  logic [CTX_W-1:0]  km_addr,
  input  logic [55:0]       km_wdata,
  output logic [55:0]       km_rdata,
  output logic              ev_resync_tx,
  output logic              ev_resync_ok,
  output logic              ev_resync_bad
);
  logic en;
  assign en = !out_valid || out_ready;

  logic                 sv_rd_en, sv_wr_en;
  logic [CTX_W-1:0]     sv_rd_addr, sv_wr_addr;
  sv_t                  sv_rd_data, sv_wr_data;
  logic                 cv_rd_en;
  logic [CTX_W-1:0]     cv_rd_addr;
  logic [55:0]          cv_key;
  logic                 kg_valid, kg_bypass;
  logic [SLICES*64-1:0] kg_blocks;
  logic                 ks_valid, ks_bypass;
  logic [SLICES*64-1:0] ks;
  logic                 fifo_push, fifo_pop, fifo_empty, fifo_full;
  cell_t                fifo_cell, fifo_head;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  cell_processor #(.SLICES(SLICES)) u_cp (
    .clk, .rst_n, .en,
    .in_valid, .in_ready, .in_tcell,
    .init_valid, .init_ready, .init_ctx, .init_sv, .role_ir,
    .sv_rd_en, .sv_rd_addr, .sv_rd_data, .sv_wr_en, .sv_wr_addr, .sv_wr_data,
    .cv_rd_en, .cv_rd_addr,
    .kg_valid, .kg_bypass, .kg_blocks,
    .fifo_push, .fifo_cell, .fifo_full,
    .ev_resync_tx, .ev_resync_ok, .ev_resync_bad
  );

  sv_memory #(.DEPTH(NUM_CTX), .WIDTH(64)) u_svm (
    .clk, .rd_en(sv_rd_en), .rd_addr(sv_rd_addr), .rd_data(sv_rd_data),
    .wr_en(sv_wr_en), .wr_addr(sv_wr_addr), .wr_data(sv_wr_data)
  );

  cv_memory #(.DEPTH(NUM_CTX), .WIDTH(56)) u_cvm (
    .clk,
    .a_en(km_en), .a_we(km_we), .a_addr(km_addr), .a_wdata(km_wdata), .a_rdata(km_rdata),
    .b_en(cv_rd_en), .b_addr(cv_rd_addr), .b_rdata(cv_key)
  );

  key_generator #(.SLICES(SLICES)) u_kg (
    .clk, .rst_n, .en,
    .in_valid(kg_valid), .in_bypass(kg_bypass), .in_blocks(kg_blocks), .cv_key,
    .out_valid(ks_valid), .out_bypass(ks_bypass), .out_ks(ks)
  );

  cell_fifo #(.WIDTH($bits(cell_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(fifo_cell), .pop(fifo_pop),
    .dout(fifo_head), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  mixer #(.SLICES(SLICES)) u_mix (
    .clk, .rst_n, .en,
    .ks_valid, .ks_bypass, .ks,
    .fifo_head, .fifo_empty, .fifo_pop,
    .out_valid, .out_cell, .out_ready
  );
endmodule
