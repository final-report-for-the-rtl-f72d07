// tb_mixer: key/plaintext mixing of whole cells.
//
// Feeds key stream beats (three 128-bit beats per cell) and keeps the waiting
// cells in a model FIFO. Each output cell must carry its header unchanged and
// payload xor key stream, or the untouched payload when the beats carry the
// bypass bit. The output is back-pressured at random; a held cell must not
// change and no cell may be lost.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_mixer;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int SLICES = 2, BEATS = 6 / SLICES;
  logic clk = 0, rst_n = 0;
  logic en, ks_valid = 0, ks_bypass = 0, fifo_pop, out_valid, out_ready = 1;
  logic [SLICES*64-1:0] ks = '0;
  cell_t fifo_head, out_cell;
  logic fifo_empty;
  cell_t cells[$];
  cell_t expq[$];
  int checks = 0, failures = 0, held = 0;

  mixer #(.SLICES(SLICES)) dut (.*);
  always #5 clk = ~clk;
  assign en = !out_valid || out_ready;
  assign fifo_empty = (cells.size() == 0);
  assign fifo_head  = fifo_empty ? '0 : cells[0];

  always @(posedge clk) if (rst_n) begin
    if (fifo_pop) void'(cells.pop_front());
    if (out_valid && out_ready) begin
      cell_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: extra cell"); end
      else begin
        e = expq.pop_front();
        if (out_cell !== e) begin failures++; $display("FAIL: cell mismatch"); end
      end
    end
    if (out_valid && !out_ready) held++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 60; c++) begin
      cell_t cl, e;
      logic [383:0] kss;
      logic bp;
      cl.hdr = atm_hdr_t'($urandom);
      cl.payload = rand_payload();
      kss = rand_payload();
      bp = (c % 7 == 3);
      e = cl;
      if (!bp) e.payload = cl.payload ^ kss;
      @(negedge clk);
      cells.push_back(cl);
      expq.push_back(e);
      for (int b = 0; b < BEATS; b++) begin
        @(negedge clk);
        out_ready = $urandom_range(0, 2) != 0;
        ks_valid = 1; ks_bypass = bp;
        ks = kss[383 - b*SLICES*64 -: SLICES*64];
        @(posedge clk);
        while (!en) begin @(negedge clk); out_ready = $urandom_range(0, 2) != 0; @(posedge clk); end
        @(negedge clk); ks_valid = 0;
      end
    end
    @(negedge clk); out_ready = 1;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || held == 0) begin failures++; $display("FAIL: left %0d held %0d", expq.size(), held); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
