// tb_cell_combiner: merging the cryptographic modules' outputs.
//
// Three inputs offer numbered cells at random, the output accepts at random.
// Checks that every cell comes out once, in order per input, that only the
// granted input sees ready, and that with all inputs waiting the grant
// rotates (no input is served twice while another waits).
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_cell_combiner;
  import atm_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0, in_ready;
  cell_t in_cell [N];
  logic out_valid, out_ready = 1;
  cell_t out_cell;
  int checks = 0, failures = 0, fair_checks = 0;
  int sent [N] = '{default: 0};
  int recv [N] = '{default: 0};
  int last_served = -1;

  cell_combiner #(.N_IN(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic cell_t mk(input int src, input int seq);
    cell_t c;
    c = '0;
    c.hdr.vci = 16'(src);
    c.payload[31:0] = seq;
    return c;
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int src;
    src = int'(out_cell.hdr.vci);
    checks++;
    if (src >= N || !in_ready[src] || $countones(in_ready) != 1) begin
      failures++; $display("FAIL: grant");
    end else begin
      checks++;
      if (int'(out_cell.payload[31:0]) != recv[src]) begin failures++; $display("FAIL: order"); end
      recv[src]++;
      if (in_valid == '1 && last_served >= 0) begin
        fair_checks++; checks++;
        if (src != (last_served + 1) % N) begin failures++; $display("FAIL: rotation"); end
      end
      last_served = src;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_src
    initial begin
      wait (rst_n);
      for (int s = 0; s < 100; s++) begin
        @(negedge clk);
        in_valid[i] = 1; in_cell[i] = mk(i, s);
        @(posedge clk); while (!in_ready[i]) @(posedge clk);
        sent[i]++;
        @(negedge clk);
        in_valid[i] = (i == 0) ? 1'b0 : in_valid[i];
      end
      @(negedge clk); in_valid[i] = 0;
    end
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 3) != 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (sent[0] == 100 && sent[1] == 100 && sent[2] == 100);
    repeat (3) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (recv[i] != 100) begin failures++; $display("FAIL: input %0d delivered %0d", i, recv[i]); end
    end
    checks++;
    if (fair_checks == 0) begin failures++; $display("FAIL: never all waiting"); end
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
