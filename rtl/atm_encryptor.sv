// atm_encryptor: context-agile ATM cell encryptor, both directions.
//
// A two-port device that sits between a host and an ATM network. Downstream
// (host to network, dn_*) it encrypts the payloads of cells on encrypted
// connections; upstream (network to host, up_*) it decrypts them. Each
// direction is a crypto_path: identification & association (VPI/VCI lookup),
// cell router, N_CRYPTO cryptographic modules running DES in counter mode with
// SLICES pipelined DES units each, and the cell combiner. Headers are never
// changed. Each cell may belong to a different connection with its own key and
// state vector, so keys switch cell by cell without emptying any pipeline.
//
// Parts that the design names but does not specify stand outside as ports:
// the physical I/O (the in/out cell streams), the non-real-time control (nrt_*
// cell streams, connection table writes tw_*, state vector loads init_*) and
// the key management module (km_*, the protected path into the CV memories).
// role_ir is the Initiator/Responder bit each direction writes into the resync
// cells it inserts.
//
// Timing: per direction a user cell is accepted every 1 + 6/SLICES cycles per
// cryptographic module and is on the output 6/SLICES + 18 clock edges after
// the edge that took it into the identification stage (21 at the defaults).
module atm_encryptor
  import atm_pkg::*;
#(
  parameter int N_CRYPTO   = 2,
  parameter int SLICES     = 2,
  parameter int TBL_AW     = 10,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dn_role_ir,
  input  logic              dn_in_valid,
  output logic              dn_in_ready,
  input  cell_t             dn_in_cell,
  output logic              dn_out_valid,
  input  logic              dn_out_ready,
  output cell_t             dn_out_cell,
  output logic              dn_nrt_out_valid,
  input  logic              dn_nrt_out_ready,
  output tcell_t            dn_nrt_out_tcell,
  input  logic              dn_nrt_in_valid,
  output logic              dn_nrt_in_ready,
  input  tcell_t            dn_nrt_in_tcell,
  input  logic              dn_tw_en,
  input  logic              dn_tw_valid,
  input  logic [7:0]        dn_tw_vpi,
  input  logic [15:0]       dn_tw_vci,
  input  logic [CTX_W-1:0]  dn_tw_ctx,
  input  logic              dn_tw_crypt,
  input  logic              dn_init_valid,
  output logic              dn_init_ready,
  input  logic [CTX_W-1:0]  dn_init_ctx,
  input  sv_t               dn_init_sv,
  input  logic              dn_km_en,
  input  logic              dn_km_we,
  input  logic [CTX_W-1:0]  dn_km_addr,
  input  logic [55:0]       dn_km_wdata,
  output logic [55:0]       dn_km_rdata,
  output logic [N_CRYPTO-1:0] dn_ev_resync_tx,
  output logic [N_CRYPTO-1:0] dn_ev_resync_ok,
  output logic [N_CRYPTO-1:0] dn_ev_resync_bad,
  input  logic              up_role_ir,
  input  logic              up_in_valid,
  output logic              up_in_ready,
  input  cell_t             up_in_cell,
  output logic              up_out_valid,
  input  logic              up_out_ready,
  output cell_t             up_out_cell,
  output logic              up_nrt_out_valid,
  input  logic              up_nrt_out_ready,
  output tcell_t            up_nrt_out_tcell,
  input  logic              up_nrt_in_valid,
  output logic              up_nrt_in_ready,
  input  tcell_t            up_nrt_in_tcell,
  input  logic              up_tw_en,
  input  logic              up_tw_valid,
  input  logic [7:0]        up_tw_vpi,
  input  logic [15:0]       up_tw_vci,
  input  logic [CTX_W-1:0]  up_tw_ctx,
  input  logic              up_tw_crypt,
  input  logic              up_init_valid,
  output logic              up_init_ready,
  input  logic [CTX_W-1:0]  up_init_ctx,
  input  sv_t               up_init_sv,
  input  logic              up_km_en,
  input  logic              up_km_we,
  input  logic [CTX_W-1:0]  up_km_addr,
  input  logic [55:0]       up_km_wdata,
  output logic [55:0]       up_km_rdata,
  output logic [N_CRYPTO-1:0] up_ev_resync_tx,
  output logic [N_CRYPTO-1:0] up_ev_resync_ok,
  output logic [N_CRYPTO-1:0] up_ev_resync_bad
);
  crypto_path #(.N_CRYPTO(N_CRYPTO), .SLICES(SLICES), .TBL_AW(TBL_AW), .FIFO_DEPTH(FIFO_DEPTH)) u_down (
    .clk, .rst_n,
    .role_ir(dn_role_ir),
    .in_valid(dn_in_valid),
    .in_ready(dn_in_ready),
    .in_cell(dn_in_cell),
    .out_valid(dn_out_valid),
    .out_ready(dn_out_ready),
    .out_cell(dn_out_cell),
    .nrt_out_valid(dn_nrt_out_valid),
    .nrt_out_ready(dn_nrt_out_ready),
    .nrt_out_tcell(dn_nrt_out_tcell),
    .nrt_in_valid(dn_nrt_in_valid),
    .nrt_in_ready(dn_nrt_in_ready),
    .nrt_in_tcell(dn_nrt_in_tcell),
    .tw_en(dn_tw_en),
    .tw_valid(dn_tw_valid),
    .tw_vpi(dn_tw_vpi),
    .tw_vci(dn_tw_vci),
    .tw_ctx(dn_tw_ctx),
    .tw_crypt(dn_tw_crypt),
    .init_valid(dn_init_valid),
    .init_ready(dn_init_ready),
    .init_ctx(dn_init_ctx),
    .init_sv(dn_init_sv),
    .km_en(dn_km_en),
    .km_we(dn_km_we),
    .km_addr(dn_km_addr),
    .km_wdata(dn_km_wdata),
    .km_rdata(dn_km_rdata),
    .ev_resync_tx(dn_ev_resync_tx),
    .ev_resync_ok(dn_ev_resync_ok),
    .ev_resync_bad(dn_ev_resync_bad)
  );

  crypto_path #(.N_CRYPTO(N_CRYPTO), .SLICES(SLICES), .TBL_AW(TBL_AW), .FIFO_DEPTH(FIFO_DEPTH)) u_up (
    .clk, .rst_n,
    .role_ir(up_role_ir),
    .in_valid(up_in_valid),
    .in_ready(up_in_ready),
    .in_cell(up_in_cell),
    .out_valid(up_out_valid),
    .out_ready(up_out_ready),
    .out_cell(up_out_cell),
    .nrt_out_valid(up_nrt_out_valid),
    .nrt_out_ready(up_nrt_out_ready),
    .nrt_out_tcell(up_nrt_out_tcell),
    .nrt_in_valid(up_nrt_in_valid),
    .nrt_in_ready(up_nrt_in_ready),
    .nrt_in_tcell(up_nrt_in_tcell),
    .tw_en(up_tw_en),
    .tw_valid(up_tw_valid),
    .tw_vpi(up_tw_vpi),
    .tw_vci(up_tw_vci),
    .tw_ctx(up_tw_ctx),
    .tw_crypt(up_tw_crypt),
    .init_valid(up_init_valid),
    .init_ready(up_init_ready),
    .init_ctx(up_init_ctx),
    .init_sv(up_init_sv),
    .km_en(up_km_en),
    .km_we(up_km_we),
    .km_addr(up_km_addr),
    .km_wdata(up_km_wdata),
    .km_rdata(up_km_rdata),
    .ev_resync_tx(up_ev_resync_tx),
    .ev_resync_ok(up_ev_resync_ok),
    .ev_resync_bad(up_ev_resync_bad)
  );
endmodule
