// tb_crypto_module: counter-mode encryption of whole cells in one module.
//
// Key management writes random keys for eight connections and reads one back;
// SVs are loaded. A random mix of user, bypass, resync-insert and
// resync-receive cells (good and bad) is sent with the output back-pressured
// at random. Every output cell is compared with the model: user payload xor
// DES counter-mode key stream of that connection's current SV, bypass cells
// unchanged, inserted resync cells carrying the stepped SV and CRC-10, and
// received resync cells extracted. Checks the latency of a lone user cell
// (6/SLICES + 17 cycles) and the cell rate (one per 1 + 6/SLICES cycles).
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_crypto_module;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int SLICES = 2, BEATS = 3, NC = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  tcell_t in_tcell = '0;
  cell_t out_cell;
  logic init_valid = 0, init_ready;
  logic [CTX_W-1:0] init_ctx = '0;
  sv_t init_sv = '0;
  logic role_ir = 1;
  logic km_en = 0, km_we = 0;
  logic [CTX_W-1:0] km_addr = '0;
  logic [55:0] km_wdata = '0, km_rdata;
  logic ev_resync_tx, ev_resync_ok, ev_resync_bad;
  int checks = 0, failures = 0, cycle = 0;
  bit random_ready = 0;

  crypto_module #(.SLICES(SLICES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) out_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  logic [55:0] key [NC];
  logic [63:0] sv [NC];
  cell_t expq[$];
  int acc_cycle[$];
  int lat[$];
  int acc_all[$];   // cycle of every accepted cell
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    acc_all.push_back(cycle);
    if (in_tcell.cls != CLS_RESYNC_RX) acc_cycle.push_back(cycle);
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (expq.size() == 0) chk(0, "unexpected cell");
    else begin
      begin cell_t e; e = expq.pop_front(); chk(out_cell == e, $sformatf("output cell hdr %h exp %h pl %h exp %h", out_cell.hdr, e.hdr, out_cell.payload[383:320], e.payload[383:320])); end
      lat.push_back(cycle - acc_cycle.pop_front());
    end
  end

  function automatic tcell_t mk(input cell_cls_e cls, input int ctx);
    tcell_t t;
    t.cls = cls; t.ctx = CTX_W'(ctx);
    t.data.hdr = atm_hdr_t'($urandom);
    t.data.hdr.pti = 3'b000;
    t.data.payload = rand_payload();
    return t;
  endfunction

  task automatic model_cell(input tcell_t t);
    cell_t c;
    c = t.data;
    case (t.cls)
      CLS_USER: begin
        c.payload ^= keystream(key[t.ctx], sv[t.ctx]);
        sv[t.ctx] = sv_after_cell(sv[t.ctx]);
      end
      CLS_RESYNC_TX: begin
        sv[t.ctx] = sv_after_jump(sv[t.ctx][41:34] + 8'd1, role_ir);
        c.hdr.pti = 3'b101;
        c.payload = resync_cell_ref(sv[t.ctx]);
      end
      CLS_RESYNC_RX: begin
        logic [63:0] csv;
        csv = t.data.payload[375:312];
        if (crc10_ref(t.data.payload) == t.data.payload[9:0] && csv[41:34] > sv[t.ctx][41:34])
          sv[t.ctx] = sv_after_jump(csv[41:34], csv[42]);
      end
      default: ;
    endcase
    if (t.cls != CLS_RESYNC_RX) expq.push_back(c);
  endtask

  task automatic send(input tcell_t t);
    // inputs change only at the falling edge; in_ready is stable there
    @(negedge clk);
    in_valid = 1; in_tcell = t;
    #1; while (!in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    model_cell(t);
    @(negedge clk);
    in_valid = 0;
  endtask

  // Like send, but leaves in_valid high so the next cell follows at once.
  task automatic send_b2b(input tcell_t t, input bit last);
    in_valid = 1; in_tcell = t;
    #1; while (!in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    model_cell(t);
    @(negedge clk);
    if (last) in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NC; c++) begin
      key[c] = rand_key();
      km_en <= 1; km_we <= 1; km_addr <= CTX_W'(c); km_wdata <= key[c];
      @(posedge clk);
    end
    km_we <= 0; km_addr <= 3;
    @(posedge clk); km_en <= 0;
    #1 chk(km_rdata == key[3], "key management read-back");
    for (int c = 0; c < NC; c++) begin
      sv[c] = {$urandom, $urandom} & ~64'h7;
      sv[c][41:34] = 8'd20;
      init_valid <= 1; init_ctx <= CTX_W'(c); init_sv <= sv[c];
      do @(posedge clk); while (!init_ready);
    end
    init_valid <= 0;
    @(posedge clk);
    // lone cell: latency
    send(mk(CLS_USER, 2));
    repeat (40) @(posedge clk);
    // accepted at edge a, visible after edge a+BEATS+17, sampled one edge later
    chk(lat.size() == 1 && lat[0] == BEATS + 17 + 1,
        $sformatf("latency %0d (+1 sampling edge) exp %0d", lat[0], BEATS + 18));
    // rate: back-to-back user cells
    t0 = acc_all.size();
    @(negedge clk);
    fork
      for (int i = 0; i < 10; i++) send_b2b(mk(CLS_USER, i % NC), i == 9);
    join
    for (int i = t0; i < t0 + 9; i++)
      chk(acc_all[i+1] - acc_all[i] == 1 + BEATS, $sformatf("cell period %0d", acc_all[i+1] - acc_all[i]));
    // random mix with back-pressure
    random_ready = 1;
    for (int i = 0; i < 150; i++) begin
      int r, c;
      tcell_t t;
      r = $urandom_range(0, 9);
      c = $urandom_range(0, NC - 1);
      if (r < 6)       t = mk(CLS_USER, c);
      else if (r == 6) t = mk(CLS_BYPASS, c);
      else if (r == 7) t = mk(CLS_RESYNC_TX, c);
      else begin
        t = mk(CLS_RESYNC_RX, c);
        t.data.payload = resync_cell_ref(sv_after_jump(sv[c][41:34] + 8'd2, 1'b0));
        if (i % 3 == 0) t.data.payload[200] ^= 1'b1;
      end
      send(t);
    end
    random_ready = 0;
    repeat (60) @(posedge clk);
    chk(expq.size() == 0, $sformatf("%0d cells not delivered", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
