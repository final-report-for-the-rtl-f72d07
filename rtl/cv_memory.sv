// cv_memory: dual-port cryptovariable (traffic key) memory.
//
// Port A is the key management module's read/write port, reached over the
// protected path. Port B is read-only and addressed by the cell processor,
// which supplies only the index: the key word goes straight to the key
// generator and never passes through the cell processor. Both ports are
// synchronous, one cycle from address to data, and port B's output holds while
// b_en=0 so that a stalled key generator sees a stable key. Each word is a
// 56-bit DES key without parity bits.
//
// The dual-port organisation with a read-only port for the cell processor follows
// the design; the synchronous timing, the hold on b_en=0 and the depth are this
// implementation's choices.
module cv_memory #(
  parameter int DEPTH = atm_pkg::NUM_CTX,
  parameter int WIDTH = 56
) (
  input  logic                     clk,
  // key management port (read/write)
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  // cell processor / key generator port (read-only)
  input  logic                     b_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
