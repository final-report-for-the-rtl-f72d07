// cell_combiner: the shell's cell combiner.
//
// Merges the output streams of the cryptographic modules back into the single
// cell stream for the output physical I/O. A round-robin choice among the
// modules with a finished cell keeps every module moving; since each
// connection is served by one module, cells of a connection stay in order
// (cells of different connections may be interleaved differently than they
// arrived, as an ATM switch may). The arbitration is this implementation's
// choice.
//
// Timing: combinational data path, one cell per cycle; the round-robin pointer
// moves after each transfer.
module cell_combiner
  import atm_pkg::*;
#(
  parameter int N_IN = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_valid,
  output logic [N_IN-1:0]  in_ready,
  input  cell_t            in_cell [N_IN],
  output logic             out_valid,
  input  logic             out_ready,
  output cell_t            out_cell
);
  localparam int PW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [PW-1:0] last;    // input served most recently
  logic [PW-1:0] grant;
  logic          any;

  always_comb begin
    any   = 1'b0;
    grant = last;
    for (int k = 1; k <= N_IN; k++) begin
      if (!any && in_valid[(int'(last) + k) % N_IN]) begin
        any   = 1'b1;
        grant = PW'((int'(last) + k) % N_IN);
      end
    end
  end

  assign out_valid = any;
  assign out_cell  = in_cell[grant];
  always_comb begin
    in_ready = '0;
    in_ready[grant] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= PW'(N_IN - 1);
    else if (any && out_ready) last <= grant;
  end
endmodule
