// tb_cell_processor: per-cell control of SV lookups, counter blocks and resync.
//
// The testbench plays SV memory (synchronous RAM), CV memory read port and
// FIFO. A model keeps the expected SV of each connection. For a stream of
// user, bypass, resync-insert and resync-receive cells (good, bad CRC, stale
// jump number) it checks every key generator beat (counter blocks with
// segment numbers 0..5, bypass bit, CV index), every FIFO push (unchanged user
// cells, built resync cells with CRC-10), the final SV memory contents, and
// the cycle budget: 4 cycles per user or inserted resync cell, 2 per received
// resync cell, with random stalls.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_cell_processor;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int SLICES = 2, BEATS = 3;
  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0, in_ready;
  tcell_t in_tcell = '0;
  logic init_valid = 0, init_ready;
  logic [CTX_W-1:0] init_ctx = '0;
  sv_t init_sv = '0;
  logic role_ir = 1;
  logic sv_rd_en, sv_wr_en, cv_rd_en, kg_valid, kg_bypass, fifo_push, fifo_full = 0;
  logic [CTX_W-1:0] sv_rd_addr, sv_wr_addr, cv_rd_addr;
  sv_t sv_rd_data, sv_wr_data;
  logic [SLICES*64-1:0] kg_blocks;
  cell_t fifo_cell;
  logic ev_resync_tx, ev_resync_ok, ev_resync_bad;
  int checks = 0, failures = 0, cycle = 0;
  int n_ok = 0, n_bad = 0, n_tx = 0;
  bit stall_on = 0;

  cell_processor #(.SLICES(SLICES)) dut (.*);
  always #5 clk = ~clk;

  logic [63:0] svmem [NUM_CTX];
  logic [63:0] model [NUM_CTX];
  always @(posedge clk) begin
    if (sv_wr_en) svmem[sv_wr_addr] <= sv_wr_data;
    if (sv_rd_en) sv_rd_data <= svmem[sv_rd_addr];
    if (en) cycle <= cycle + 1;
  end

  typedef struct { logic [SLICES*64-1:0] b; logic bp; logic [CTX_W-1:0] ctx; } beat_t;
  beat_t bq[$];
  cell_t pq[$];

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (kg_valid) begin
      beat_t e;
      if (bq.size() == 0) chk(0, "unexpected beat");
      else begin
        e = bq.pop_front();
        chk(kg_bypass == e.bp, "beat bypass");
        if (!e.bp) chk(kg_blocks == e.b, $sformatf("blocks %h exp %h", kg_blocks, e.b));
        chk(cv_rd_en && cv_rd_addr == e.ctx, "CV index");
      end
    end
    if (fifo_push) begin
      if (pq.size() == 0) chk(0, "unexpected push");
      else chk(fifo_cell == pq.pop_front(), "pushed cell");
    end
    if (ev_resync_ok) n_ok++;
    if (ev_resync_bad) n_bad++;
    if (ev_resync_tx) n_tx++;
  end

  // Drive one cell and wait until it is accepted; returns the accept cycle.
  task automatic send(input tcell_t t, output int acc);
    @(negedge clk);
    in_valid = 1; in_tcell = t;
    do @(posedge clk); while (!(in_valid && in_ready));
    acc = cycle;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic expect_cell(input tcell_t t);
    logic [63:0] sv;
    sv = model[t.ctx];
    case (t.cls)
      CLS_USER: begin
        for (int b = 0; b < BEATS; b++) begin
          beat_t e;
          for (int s = 0; s < SLICES; s++) e.b[(SLICES-s)*64-1 -: 64] = {sv[63:3], 3'(b*SLICES+s)};
          e.bp = 0; e.ctx = t.ctx; bq.push_back(e);
        end
        pq.push_back(t.data);
        model[t.ctx] = sv_after_cell(sv);
      end
      CLS_BYPASS: begin
        for (int b = 0; b < BEATS; b++) bq.push_back('{b: '0, bp: 1, ctx: t.ctx});
        pq.push_back(t.data);
      end
      CLS_RESYNC_TX: begin
        cell_t c;
        model[t.ctx] = sv_after_jump(sv[41:34] + 8'd1, role_ir);
        c = t.data;
        c.hdr.pti = 3'b101;
        c.payload = resync_cell_ref(model[t.ctx]);
        for (int b = 0; b < BEATS; b++) bq.push_back('{b: '0, bp: 1, ctx: t.ctx});
        pq.push_back(c);
      end
      CLS_RESYNC_RX: begin
        logic [63:0] csv;
        csv = t.data.payload[375:312];
        if (crc10_ref(t.data.payload) == t.data.payload[9:0] && csv[41:34] > sv[41:34])
          model[t.ctx] = sv_after_jump(csv[41:34], csv[42]);
      end
      default: ;
    endcase
  endtask

  function automatic tcell_t mk(input cell_cls_e cls, input int ctx);
    tcell_t t;
    t.cls = cls; t.ctx = CTX_W'(ctx);
    t.data.hdr = atm_hdr_t'($urandom);
    t.data.payload = rand_payload();
    return t;
  endfunction

  initial begin
    int a1;
    tcell_t t;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      init_valid = 1; init_ctx = CTX_W'(c); init_sv = sv_t'({$urandom, $urandom} & ~64'h7);
      init_sv.jn = 8'd10;
      model[c] = init_sv;
      do @(posedge clk); while (!init_ready);
      @(negedge clk); init_valid = 0;
    end
    for (int i = 0; i < 120; i++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 5)       t = mk(CLS_USER, $urandom_range(0, 7));
      else if (r == 5) t = mk(CLS_BYPASS, $urandom_range(0, 7));
      else if (r == 6) t = mk(CLS_RESYNC_TX, $urandom_range(0, 7));
      else begin
        logic [63:0] nsv;
        t = mk(CLS_RESYNC_RX, $urandom_range(0, 7));
        nsv = sv_after_jump(model[t.ctx][41:34] + ((r == 9) ? 8'd0 : 8'd3), 1'b0);
        t.data.payload = resync_cell_ref(nsv);
        if (r == 8) t.data.payload[100] ^= 1'b1;   // corrupted
      end
      expect_cell(t);
      send(t, a1);
      if (i == 60) stall_on = 1;
    end
    stall_on = 0;
    // Cycle budget: cells offered back to back, in_valid never dropped.
    begin
      tcell_t burst [6];
      int acc [6];
      int gap_exp [5] = '{1 + BEATS, 1 + BEATS, 1 + BEATS, 2, 1 + BEATS};
      burst[0] = mk(CLS_USER, 1);
      burst[1] = mk(CLS_USER, 1);
      burst[2] = mk(CLS_RESYNC_TX, 2);
      burst[3] = mk(CLS_RESYNC_RX, 4);
      burst[3].data.payload = resync_cell_ref(sv_after_jump(model[4][41:34] + 8'd1, 1'b0));
      burst[4] = mk(CLS_BYPASS, 5);
      burst[5] = mk(CLS_USER, 1);
      @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        expect_cell(burst[k]);
        in_valid = 1; in_tcell = burst[k];
        do @(posedge clk); while (!in_ready);
        acc[k] = cycle;
        @(negedge clk);
      end
      in_valid = 0;
      for (int k = 0; k < 5; k++)
        chk(acc[k+1] - acc[k] == gap_exp[k], $sformatf("cell %0d took %0d cycles", k, acc[k+1] - acc[k]));
    end
    repeat (10) @(posedge clk);
    for (int c = 0; c < 8; c++) chk(svmem[c] == model[c], $sformatf("SV of ctx %0d", c));
    chk(bq.size() == 0 && pq.size() == 0, "all beats and cells issued");
    chk(n_ok > 0 && n_bad > 0 && n_tx > 0, "resync events seen");
    $display("resync tx %0d ok %0d bad %0d", n_tx, n_ok, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random stalls during the second half of the random phase.
  always @(negedge clk) en <= stall_on ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
