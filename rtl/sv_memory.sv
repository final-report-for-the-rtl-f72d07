// sv_memory: state vector memory of one cryptographic module.
//
// One 64-bit counter-mode state vector per connection context. The cell
// processor reads a connection's SV when a cell arrives (a second lookup after
// identification) and writes the stepped SV back when the cell is done; the
// same write port loads initial SVs. Synchronous RAM: rd_data shows the word
// addressed in the last cycle with rd_en=1 and holds otherwise. A read of a
// word written in the same cycle returns the old word.
//
// A per-connection SV memory read and written by the cell processor follows the
// design; the 64-bit word, the depth and the port timing are this
// implementation's choices.
module sv_memory #(
  parameter int DEPTH = atm_pkg::NUM_CTX,
  parameter int WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
