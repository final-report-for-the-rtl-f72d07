// id_assoc: identification and association module.
//
// Looks up every incoming cell's VPI/VCI in a connection table held in
// synchronous RAM and tags the cell with its connection context index and its
// class. Because no content addressable memory reaches 10 Gb/s, the design's
// near-term choice is a reduced VPI/VCI lookup in synchronous RAM: the table is
// indexed by TBL_AW bits folded from VCI and VPI, and each entry stores the full
// VPI/VCI to confirm a hit, the context index and whether the connection is
// encrypted. Two connections whose folded indices collide cannot both be
// entered. Classification (this implementation's rules):
//   miss                                      -> CLS_NRT (non-real-time control)
//   hit, F5 OAM (PTI 100/101), octet 0 = RESYNC_CODE -> CLS_RESYNC_RX
//   hit, other OAM or PTI 110/111             -> CLS_NRT
//   hit, user data (PTI 0xx)                  -> CLS_USER if encrypted, else CLS_BYPASS
//
// Timing: one register stage; the table read and the cell register advance
// together whenever the output is free. The non-real-time control writes
// entries through tw_* at any time.
module id_assoc
  import atm_pkg::*;
#(
  parameter int TBL_AW = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  cell_t             in_cell,
  output logic              out_valid,
  input  logic              out_ready,
  output tcell_t            out_tcell,
  // connection table write (non-real-time control)
  input  logic              tw_en,
  input  logic              tw_valid,      // entry in use
  input  logic [7:0]        tw_vpi,
  input  logic [15:0]       tw_vci,
  input  logic [CTX_W-1:0]  tw_ctx,
  input  logic              tw_crypt       // 1: encrypt/decrypt user cells
);
  typedef struct packed {
    logic             used;
    logic [7:0]       vpi;
    logic [15:0]      vci;
    logic [CTX_W-1:0] ctx;
    logic             crypt;
  } entry_t;

  function automatic logic [TBL_AW-1:0] fold(input logic [7:0] vpi, input logic [15:0] vci);
    return vci[TBL_AW-1:0] ^ TBL_AW'(vpi);
  endfunction

  entry_t tbl [2**TBL_AW];
  entry_t rd_entry;
  cell_t  s1_cell;
  logic   s1_valid;
  logic   adv;

  assign adv      = !s1_valid || out_ready;
  assign in_ready = adv;

  always_ff @(posedge clk) begin
    if (tw_en) tbl[fold(tw_vpi, tw_vci)] <= '{used: tw_valid, vpi: tw_vpi, vci: tw_vci,
                                              ctx: tw_ctx, crypt: tw_crypt};
    if (adv) begin
      rd_entry <= tbl[fold(in_cell.hdr.vpi, in_cell.hdr.vci)];
      s1_cell  <= in_cell;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else if (adv) s1_valid <= in_valid;
  end

  logic hit, oam;
  always_comb begin
    hit = rd_entry.used && rd_entry.vpi == s1_cell.hdr.vpi && rd_entry.vci == s1_cell.hdr.vci;
    oam = (s1_cell.hdr.pti == PTI_OAM_SEG) || (s1_cell.hdr.pti == PTI_OAM_E2E);
    out_tcell.data = s1_cell;
    out_tcell.ctx  = rd_entry.ctx;
    if (!hit)                                        out_tcell.cls = CLS_NRT;
    else if (oam && s1_cell.payload[383:376] == RESYNC_CODE) out_tcell.cls = CLS_RESYNC_RX;
    else if (s1_cell.hdr.pti[2])                     out_tcell.cls = CLS_NRT;
    else if (rd_entry.crypt)                         out_tcell.cls = CLS_USER;
    else                                             out_tcell.cls = CLS_BYPASS;
  end

  assign out_valid = s1_valid;
endmodule
