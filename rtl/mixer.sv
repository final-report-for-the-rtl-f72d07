// mixer: key/plaintext mixer.
//
// Collects the key stream beats of one cell (6/SLICES beats of SLICES*64 bits,
// first beat covering the first payload octets), takes the cell that waited in
// the FIFO, XORs payload and key stream and reattaches the untouched header.
// In counter mode the same operation encrypts and decrypts. A cell whose beats
// carry the bypass bit leaves with its payload unchanged.
//
// Timing: the finished cell is registered and held on out_* until out_ready.
// The enclosing module drives en = !out_valid || out_ready and uses it to
// advance the whole cryptographic pipeline, so nothing moves while a finished
// cell is waiting. The FIFO head is popped in the cycle the last beat arrives.
//
// The mixer's place after the FIFO and the unchanged header follow the design;
// the XOR, the beat order and the handshake are this implementation's choices.
module mixer
  import atm_pkg::*;
#(
  parameter int SLICES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  ks_valid,
  input  logic                  ks_bypass,
  input  logic [SLICES*64-1:0]  ks,
  input  cell_t                 fifo_head,
  input  logic                  fifo_empty,
  output logic                  fifo_pop,
  output logic                  out_valid,
  output cell_t                 out_cell,
  input  logic                  out_ready
);
  localparam int BEATS = CELL_BLOCKS / SLICES;
  localparam int BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [BW-1:0]              beat;
  logic [PAYLOAD_BITS-1:0]    ks_buf;
  logic [PAYLOAD_BITS-1:0]    ks_full;
  logic                       last;

  assign last     = (beat == BW'(BEATS-1));
  assign fifo_pop = en && ks_valid && last;

  // Place the current beat after the beats already collected.
  always_comb begin
    ks_full = ks_buf;
    ks_full[PAYLOAD_BITS-1 - int'(beat)*SLICES*64 -: SLICES*64] = ks;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= ks_valid && last;
      if (ks_valid) beat <= last ? '0 : beat + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en && ks_valid) begin
      ks_buf <= ks_full;
      if (last) begin
        out_cell.hdr     <= fifo_head.hdr;
        out_cell.payload <= ks_bypass ? fifo_head.payload : (fifo_head.payload ^ ks_full);
      end
    end
  end

  a_cell_waiting: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);
  a_out_stable:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (out_valid && !out_ready) |=> (out_valid && $stable(out_cell)));
endmodule
