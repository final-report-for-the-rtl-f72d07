// cell_processor: per-cell controller of a cryptographic module.
//
// For every tagged cell it does the second lookup, the connection's state
// vector (SV), and then acts on the cell's class:
//   user cell    - issues the counter blocks to the key generator, SLICES
//                  blocks per beat, segment numbers 0..5 over 6/SLICES beats,
//                  and puts the CV index on the CV memory's read port in the
//                  same cycles; it never sees the key itself. The cell goes to
//                  the FIFO. Only the final SV (next sequence number, LFSR
//                  stepped) is written back.
//   bypass cell  - the same beats with the bypass bit set, no SV change.
//   resync insert- steps the SV (jump number + 1, I/R bit set to role_ir,
//                  sequence and segment numbers cleared, LFSR preset), writes it
//                  back and builds the resync cell: SV in the payload and a
//                  CRC-10 at its end. The cell is then sent on like a bypass cell.
//   resync rx    - checks the CRC-10 and that the carried jump number is greater
//                  than the stored one; if both hold, the SV is reset to the new
//                  jump number. The cell is extracted (not forwarded).
// The SV/CV lookups, the stepping rules and the single-cell-period budget for
// resync handling follow the design; the exact cycle plan, the SV field widths
// and the initialisation port are this implementation's choices.
//
// Timing: a cell is accepted in the idle cycle, where the SV read is issued;
// user, bypass and inserted resync cells then take 6/SLICES issue cycles
// (1+3 = 4 cycles per cell at SLICES=2), a received resync cell one check
// cycle. The next cell on the same connection always reads the written-back
// SV. en=0 (back-pressure) freezes the controller. An init request writes an
// SV while the controller is idle and takes priority over cells.
module cell_processor
  import atm_pkg::*;
#(
  parameter int SLICES = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  // tagged cells from the cell router
  input  logic                   in_valid,
  output logic                   in_ready,
  input  tcell_t                 in_tcell,
  // SV initialisation (context memory update)
  input  logic                   init_valid,
  output logic                   init_ready,
  input  logic [CTX_W-1:0]       init_ctx,
  input  sv_t                    init_sv,
  input  logic                   role_ir,      // I/R bit written by resync insertion
  // SV memory
  output logic                   sv_rd_en,
  output logic [CTX_W-1:0]       sv_rd_addr,
  input  sv_t                    sv_rd_data,
  output logic                   sv_wr_en,
  output logic [CTX_W-1:0]       sv_wr_addr,
  output sv_t                    sv_wr_data,
  // CV memory read port (index only)
  output logic                   cv_rd_en,
  output logic [CTX_W-1:0]       cv_rd_addr,
  // key generator
  output logic                   kg_valid,
  output logic                   kg_bypass,
  output logic [SLICES*64-1:0]   kg_blocks,
  // payload FIFO
  output logic                   fifo_push,
  output cell_t                  fifo_cell,
  input  logic                   fifo_full,
  // events
  output logic                   ev_resync_tx,
  output logic                   ev_resync_ok,
  output logic                   ev_resync_bad
);
  localparam int BEATS = CELL_BLOCKS / SLICES;
  localparam int BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_CHECK} state_e;

  state_e        state;
  tcell_t        cur;
  logic [BW-1:0] beat;
  sv_t           sv_hold;
  sv_t           sv_use;
  sv_t           sv_new;
  sv_t           rx_sv;
  logic [PAYLOAD_BITS-1:0] tx_payload;
  logic [373:0]  crc_in;
  logic [9:0]    crc_out;
  logic          accept;
  logic          last_beat;
  logic          rx_good;

  assign init_ready = (state == S_IDLE) && en;
  assign in_ready   = (state == S_IDLE) && en && !init_valid && !fifo_full;
  assign accept     = in_valid && in_ready;
  assign last_beat  = (beat == BW'(BEATS-1));

  // The SV read in the idle cycle is valid in the first issue/check cycle;
  // later beats use the copy held in sv_hold.
  assign sv_use = (state == S_ISSUE && beat != '0) ? sv_hold : sv_rd_data;
  assign sv_new = sv_jump(sv_use.jn + 8'd1, role_ir);

  // One CRC-10 unit: builds inserted resync cells, checks received ones.
  assign tx_payload = resync_payload(sv_new);
  assign crc_in     = (state == S_CHECK) ? cur.data.payload[383:10] : tx_payload[383:10];
  crc10 u_crc (.data(crc_in), .crc(crc_out));

  assign rx_sv   = sv_t'(cur.data.payload[375:312]);
  assign rx_good = (crc_out == cur.data.payload[9:0]) && (rx_sv.jn > sv_use.jn);

  assign sv_rd_en   = accept;
  assign sv_rd_addr = in_tcell.ctx;
  assign cv_rd_en   = en;
  assign cv_rd_addr = cur.ctx;

  // Counter blocks of this beat: the SV with segment numbers beat*SLICES+s.
  always_comb begin
    for (int s = 0; s < SLICES; s++) begin
      sv_t blk;
      blk     = sv_use;
      blk.seg = 3'(int'(beat) * SLICES + s);
      kg_blocks[(SLICES-s)*64-1 -: 64] = (cur.cls == CLS_USER) ? blk : '0;
    end
  end

  assign kg_valid  = en && (state == S_ISSUE);
  assign kg_bypass = (cur.cls != CLS_USER);

  assign fifo_push = en && (state == S_ISSUE) && (beat == '0);
  always_comb begin
    fifo_cell = cur.data;
    if (cur.cls == CLS_RESYNC_TX) begin
      fifo_cell.payload        = tx_payload;
      fifo_cell.payload[9:0]   = crc_out;
      fifo_cell.hdr.pti        = PTI_OAM_E2E;
    end
  end

  // SV write port: initialisation, resync, or the final SV of a user cell.
  always_comb begin
    sv_wr_en   = 1'b0;
    sv_wr_addr = cur.ctx;
    sv_wr_data = sv_next_cell(sv_use);
    if (init_valid && init_ready) begin
      sv_wr_en   = 1'b1;
      sv_wr_addr = init_ctx;
      sv_wr_data = init_sv;
    end else if (en && state == S_ISSUE) begin
      if (cur.cls == CLS_USER && last_beat) begin
        sv_wr_en = 1'b1;
      end else if (cur.cls == CLS_RESYNC_TX && beat == '0) begin
        sv_wr_en   = 1'b1;
        sv_wr_data = sv_new;
      end
    end else if (en && state == S_CHECK && rx_good) begin
      sv_wr_en   = 1'b1;
      sv_wr_data = sv_jump(rx_sv.jn, rx_sv.ir);
    end
  end

  assign ev_resync_tx  = en && state == S_ISSUE && cur.cls == CLS_RESYNC_TX && beat == '0;
  assign ev_resync_ok  = en && state == S_CHECK && rx_good;
  assign ev_resync_bad = en && state == S_CHECK && !rx_good;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      beat  <= '0;
    end else if (en) begin
      unique case (state)
        S_IDLE: if (accept) begin
          state <= (in_tcell.cls == CLS_RESYNC_RX) ? S_CHECK : S_ISSUE;
          beat  <= '0;
        end
        S_ISSUE: begin
          beat <= last_beat ? '0 : beat + 1'b1;
          if (last_beat) state <= S_IDLE;
        end
        S_CHECK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept) cur <= in_tcell;
    if (en && state == S_ISSUE && beat == '0) sv_hold <= sv_use;
  end

  a_class: assert property (@(posedge clk) disable iff (!rst_n)
                            accept |-> (in_tcell.cls != CLS_NRT));
endmodule
