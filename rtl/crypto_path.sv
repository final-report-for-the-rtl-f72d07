// crypto_path: one direction of the encryptor.
//
// The real-time path of one direction: identification & association, cell
// router, N_CRYPTO cryptographic modules and the cell combiner. The shell
// (identification, router, combiner) surrounds the security module's
// cryptographic modules. Cells arrive from the input physical I/O on in_* and
// leave for the output physical I/O on out_*. Non-real-time cells leave on
// nrt_out_*; the non-real-time control inserts cells and resync requests on
// nrt_in_*, writes the connection table (tw_*) and loads state vectors
// (init_*). The key management module writes keys into every module's CV memory
// through km_* (each module keeps a full copy; read-back comes from module 0).
// SV loads go only to the module that owns the context (ctx mod N_CRYPTO).
//
// Timing: a user cell needs one cycle in identification, then the
// cryptographic module's latency (6/SLICES + 17 cycles); the combiner adds none.
//
// The chain of blocks follows the design's shell and security module; the
// broadcast of key writes and the ctx mod N_CRYPTO mapping are this
// implementation's choices.
module crypto_path
  import atm_pkg::*;
#(
  parameter int N_CRYPTO   = 2,
  parameter int SLICES     = 2,
  parameter int TBL_AW     = 10,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              role_ir,
  input  logic              in_valid,
  output logic              in_ready,
  input  cell_t             in_cell,
  output logic              out_valid,
  input  logic              out_ready,
  output cell_t             out_cell,
  output logic              nrt_out_valid,
  input  logic              nrt_out_ready,
  output tcell_t            nrt_out_tcell,
  input  logic              nrt_in_valid,
  output logic              nrt_in_ready,
  input  tcell_t            nrt_in_tcell,
  input  logic              tw_en,
  input  logic              tw_valid,
  input  logic [7:0]        tw_vpi,
  input  logic [15:0]       tw_vci,
  input  logic [CTX_W-1:0]  tw_ctx,
  input  logic              tw_crypt,
  input  logic              init_valid,
  output logic              init_ready,
  input  logic [CTX_W-1:0]  init_ctx,
  input  sv_t               init_sv,
  input  logic              km_en,
  input  logic              km_we,
  input  logic [CTX_W-1:0]  km_addr,
  input  logic [55:0]       km_wdata,
  output logic [55:0]       km_rdata,
  output logic [N_CRYPTO-1:0] ev_resync_tx,
  output logic [N_CRYPTO-1:0] ev_resync_ok,
  output logic [N_CRYPTO-1:0] ev_resync_bad
);
  logic                id_valid, id_ready;
  tcell_t              id_tcell;
  logic [N_CRYPTO-1:0] cm_in_valid, cm_in_ready;
  tcell_t              cm_tcell;
  logic [N_CRYPTO-1:0] cm_out_valid, cm_out_ready;
  cell_t               cm_out_cell [N_CRYPTO];
  logic [N_CRYPTO-1:0] cm_init_ready;
  logic [55:0]         cm_km_rdata [N_CRYPTO];
  int                  init_dst;

  id_assoc #(.TBL_AW(TBL_AW)) u_id (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_cell,
    .out_valid(id_valid), .out_ready(id_ready), .out_tcell(id_tcell),
    .tw_en, .tw_valid, .tw_vpi, .tw_vci, .tw_ctx, .tw_crypt
  );

  cell_router #(.N_CRYPTO(N_CRYPTO)) u_router (
    .clk, .rst_n,
    .rt_valid(id_valid), .rt_ready(id_ready), .rt_tcell(id_tcell),
    .ins_valid(nrt_in_valid), .ins_ready(nrt_in_ready), .ins_tcell(nrt_in_tcell),
    .cm_valid(cm_in_valid), .cm_ready(cm_in_ready), .cm_tcell,
    .nrt_valid(nrt_out_valid), .nrt_ready(nrt_out_ready), .nrt_tcell(nrt_out_tcell)
  );

  assign init_dst   = int'(init_ctx) % N_CRYPTO;
  assign init_ready = cm_init_ready[init_dst];
  assign km_rdata   = cm_km_rdata[0];

  for (genvar m = 0; m < N_CRYPTO; m++) begin : g_cm
    crypto_module #(.SLICES(SLICES), .FIFO_DEPTH(FIFO_DEPTH)) u_cm (
      .clk, .rst_n,
      .in_valid(cm_in_valid[m]), .in_ready(cm_in_ready[m]), .in_tcell(cm_tcell),
      .out_valid(cm_out_valid[m]), .out_ready(cm_out_ready[m]), .out_cell(cm_out_cell[m]),
      .init_valid(init_valid && init_dst == m), .init_ready(cm_init_ready[m]),
      .init_ctx, .init_sv, .role_ir,
      .km_en, .km_we, .km_addr, .km_wdata, .km_rdata(cm_km_rdata[m]),
      .ev_resync_tx(ev_resync_tx[m]), .ev_resync_ok(ev_resync_ok[m]),
      .ev_resync_bad(ev_resync_bad[m])
    );
  end

  cell_combiner #(.N_IN(N_CRYPTO)) u_comb (
    .clk, .rst_n,
    .in_valid(cm_out_valid), .in_ready(cm_out_ready), .in_cell(cm_out_cell),
    .out_valid, .out_ready, .out_cell
  );
endmodule
