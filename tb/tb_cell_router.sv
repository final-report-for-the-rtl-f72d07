// tb_cell_router: routing of real-time, non-real-time and inserted cells.
//
// Two sources (identification stream and non-real-time insertions) offer
// random tagged cells; destinations (two cryptographic modules and the
// non-real-time control) accept at random. Checks that every cell arrives
// exactly once, at ctx mod 2 for real-time classes and at the non-real-time
// port for CLS_NRT, in source order per destination, and that when both
// sources wait they alternate.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_cell_router;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic rt_valid = 0, rt_ready, ins_valid = 0, ins_ready, nrt_valid, nrt_ready = 1;
  tcell_t rt_tcell = '0, ins_tcell = '0, cm_tcell, nrt_tcell;
  logic [N-1:0] cm_valid, cm_ready = '1;
  int checks = 0, failures = 0, both = 0, alternations = 0, last_src = -1;

  cell_router #(.N_CRYPTO(N)) dut (.*);
  always #5 clk = ~clk;

  tcell_t q [N+1][$];   // expected per destination (N = nrt)
  int n_rt = 0, n_ins = 0;

  function automatic tcell_t mk();
    tcell_t t;
    int r;
    r = $urandom_range(0, 4);
    t.cls = (r == 4) ? CLS_NRT : ((r == 3) ? CLS_RESYNC_TX : CLS_USER);
    t.ctx = CTX_W'($urandom);
    t.data.hdr = atm_hdr_t'($urandom);
    t.data.payload = rand_payload();
    return t;
  endfunction

  function automatic int dest(input tcell_t t);
    return (t.cls == CLS_NRT) ? N : int'(t.ctx) % N;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int took;
    took = -1;
    if (rt_valid && rt_ready) begin q[dest(rt_tcell)].push_back(rt_tcell); took = 0; n_rt++; end
    if (ins_valid && ins_ready) begin q[dest(ins_tcell)].push_back(ins_tcell); took = 1; n_ins++; end
    if (rt_valid && ins_valid && took >= 0) begin
      both++;
      if (took != last_src) alternations++;
    end
    if (took >= 0) last_src = took;
    checks++;
    if (rt_ready && ins_ready) begin failures++; $display("FAIL: two grants"); end
  end

  // Destinations check against the expected queues one edge later.
  tcell_t got [N+1][$];
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) if (cm_valid[m] && cm_ready[m]) got[m].push_back(cm_tcell);
    if (nrt_valid && nrt_ready) got[N].push_back(nrt_tcell);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        rt_valid = 1; rt_tcell = mk();
        @(posedge clk); while (!rt_ready) @(posedge clk);
        @(negedge clk); rt_valid = $urandom_range(0, 3) == 0 ? 0 : rt_valid;
      end
      begin wait (n_rt == 300); @(negedge clk); rt_valid = 0; end
      for (int i = 0; i < 150; i++) begin
        @(negedge clk);
        ins_valid = 1; ins_tcell = mk();
        @(posedge clk); while (!ins_ready) @(posedge clk);
      end
      begin wait (n_ins == 150); @(negedge clk); ins_valid = 0; end
      forever begin
        @(negedge clk);
        cm_ready = N'($urandom);
        nrt_ready = $urandom_range(0, 1);
      end
    join_any
    wait (n_rt >= 300 && n_ins >= 150);
    @(negedge clk); rt_valid = 0; ins_valid = 0;
    repeat (3) @(posedge clk);
    for (int d = 0; d <= N; d++) begin
      checks++;
      if (got[d].size() != q[d].size()) begin failures++; $display("FAIL: dest %0d count", d); end
      else for (int i = 0; i < q[d].size(); i++) begin
        checks++;
        if (got[d][i] != q[d][i]) begin failures++; $display("FAIL: dest %0d cell %0d", d, i); end
      end
    end
    checks++;
    if (both == 0 || alternations * 10 < both * 9) begin
      failures++; $display("FAIL: alternation %0d of %0d", alternations, both);
    end
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
