// tb_atm_encryptor: end-to-end test of the encryptor at its default size.
//
// The downstream path encrypts host cells; its network output is looped back
// into the upstream path, which must return the original plaintext. Both
// directions hold the same keys (written through the key management ports)
// and start from the same state vectors. Six connections: five encrypted, one
// clear, spread over both cryptographic modules. The test:
//   - interleaves cells of different connections (a key switch between
//     consecutive cells) and checks every ciphertext against the DES
//     counter-mode model, per connection in order;
//   - checks that the upstream output equals the plaintext that was sent;
//   - sends signalling cells, which must be diverted to the non-real-time port;
//   - inserts a clear cell and resync requests from the non-real-time side; the
//     inserted resync cell must carry the stepped SV and CRC-10 and, once
//     looped back, resynchronise the upstream decryptor;
//   - replays an old resync cell and a corrupted one into the upstream path,
//     which must reject both and stay in step;
//   - back-pressures both outputs at random;
//   - sends a burst with the input valid in every cycle, alternating between
//     connections of the two modules, and checks the input rate: two modules
//     each taking a cell every 1 + 6/SLICES = 4 cycles accept one cell every
//     two cycles.
// Each of these mechanisms is counted; one that never happens is a failure.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_atm_encryptor;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int NCONN = 6, N_CRYPTO = 2;

  logic clk = 0, rst_n = 0;
  // downstream
  logic dn_role_ir = 1, dn_in_valid = 0, dn_in_ready, dn_out_valid, dn_out_ready = 1;
  cell_t dn_in_cell = '0, dn_out_cell;
  logic dn_nrt_out_valid, dn_nrt_out_ready = 1, dn_nrt_in_valid = 0, dn_nrt_in_ready;
  tcell_t dn_nrt_out_tcell, dn_nrt_in_tcell = '0;
  logic dn_tw_en = 0, dn_tw_valid = 0, dn_tw_crypt = 0;
  logic [7:0] dn_tw_vpi = '0;
  logic [15:0] dn_tw_vci = '0;
  logic [CTX_W-1:0] dn_tw_ctx = '0, dn_init_ctx = '0, dn_km_addr = '0;
  logic dn_init_valid = 0, dn_init_ready, dn_km_en = 0, dn_km_we = 0;
  sv_t dn_init_sv = '0;
  logic [55:0] dn_km_wdata = '0, dn_km_rdata;
  logic [N_CRYPTO-1:0] dn_ev_resync_tx, dn_ev_resync_ok, dn_ev_resync_bad;
  // upstream
  logic up_role_ir = 0, up_in_valid = 0, up_in_ready, up_out_valid, up_out_ready = 1;
  cell_t up_in_cell = '0, up_out_cell;
  logic up_nrt_out_valid, up_nrt_out_ready = 1, up_nrt_in_valid = 0, up_nrt_in_ready;
  tcell_t up_nrt_out_tcell, up_nrt_in_tcell = '0;
  logic up_tw_en = 0, up_tw_valid = 0, up_tw_crypt = 0;
  logic [7:0] up_tw_vpi = '0;
  logic [15:0] up_tw_vci = '0;
  logic [CTX_W-1:0] up_tw_ctx = '0, up_init_ctx = '0, up_km_addr = '0;
  logic up_init_valid = 0, up_init_ready, up_km_en = 0, up_km_we = 0;
  sv_t up_init_sv = '0;
  logic [55:0] up_km_wdata = '0, up_km_rdata;
  logic [N_CRYPTO-1:0] up_ev_resync_tx, up_ev_resync_ok, up_ev_resync_bad;

  atm_encryptor dut (.*);
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  int acc_cyc[$];   // acceptance cycles of the line-rate burst

  int checks = 0, failures = 0;
  bit busy = 0;   // random back-pressure on
  always @(posedge clk) begin
    dn_out_ready <= busy ? ($urandom_range(0, 3) != 0) : 1'b1;
    up_out_ready <= busy ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- model state ----
  logic [55:0] key [NCONN];
  logic [63:0] sv_dn [NCONN];
  cell_t exp_dn [NCONN][$];     // expected downstream output per connection
  cell_t exp_up [NCONN][$];     // expected upstream output (plaintext)
  cell_t loopq[$];              // downstream output on its way upstream
  cell_t old_resync;
  bit    have_old = 0;
  cell_t exp_nrt[$];
  localparam logic [15:0] VCI0 = 16'd32;

  // ---- mechanism counters ----
  int n_enc = 0, n_dec = 0, n_clear = 0, n_nrt = 0, n_ins = 0, n_key_switch = 0;
  int n_stall_dn = 0, n_stall_up = 0, n_rs_tx = 0, n_rs_ok = 0, n_rs_bad = 0;
  int used_mod [N_CRYPTO] = '{default: 0};
  int last_ctx = -1;
  localparam int LINE_CELLS = 40;
  int n_line = 0, line_span = 0;

  function automatic int conn_of(input cell_t c);
    return int'(c.hdr.vci) - int'(VCI0);
  endfunction

  // downstream output: check ciphertext, pass it upstream
  always @(posedge clk) if (rst_n) begin
    if (dn_out_valid && !dn_out_ready) n_stall_dn++;
    if (up_out_valid && !up_out_ready) n_stall_up++;
    if (dn_out_valid && dn_out_ready) begin
      int c;
      c = conn_of(dn_out_cell);
      if (c < 0 || c >= NCONN || exp_dn[c].size() == 0) chk(0, "unexpected downstream cell");
      else chk(dn_out_cell == exp_dn[c].pop_front(), $sformatf("downstream cell on connection %0d", c));
      loopq.push_back(dn_out_cell);
    end
    if (up_out_valid && up_out_ready) begin
      int c;
      c = conn_of(up_out_cell);
      if (c < 0 || c >= NCONN || exp_up[c].size() == 0) chk(0, "unexpected upstream cell");
      else begin
        chk(up_out_cell == exp_up[c].pop_front(), $sformatf("upstream plaintext on connection %0d", c));
        if (c == NCONN - 1) n_clear++; else n_dec++;
      end
    end
    if (dn_nrt_out_valid) begin
      if (exp_nrt.size() == 0) chk(0, "unexpected non-real-time cell");
      else begin chk(dn_nrt_out_tcell.data == exp_nrt.pop_front(), "diverted cell"); n_nrt++; end
    end
    chk(up_nrt_out_valid == 0, "nothing upstream is non-real-time");
    n_rs_tx  += $countones(dn_ev_resync_tx);
    n_rs_ok  += $countones(up_ev_resync_ok);
    n_rs_bad += $countones(up_ev_resync_bad);
    chk(dn_ev_resync_ok == 0 && dn_ev_resync_bad == 0 && up_ev_resync_tx == 0, "resync events on the wrong side");
    for (int m = 0; m < N_CRYPTO; m++) if (dut.u_down.cm_in_valid[m] && dut.u_down.cm_in_ready[m]) used_mod[m]++;
  end

  // loopback driver: downstream output into the upstream input
  initial begin
    forever begin
      @(negedge clk);
      if (!up_in_valid && loopq.size() > 0) begin
        up_in_valid = 1; up_in_cell = loopq.pop_front();
      end
      if (up_in_valid) begin
        #1; while (!up_in_ready) begin @(negedge clk); #1; end   // read ready once settled
        @(posedge clk);
        #1 up_in_valid = 0;
      end
    end
  end

  function automatic cell_t mk_cell(input int c, input logic [2:0] pti);
    cell_t x;
    x.hdr = '{gfc: 4'($urandom), vpi: 8'd1, vci: VCI0 + 16'(c), pti: pti, clp: 1'($urandom)};
    x.payload = rand_payload();
    if (x.payload[383:376] == RESYNC_CODE) x.payload[383:376] = 8'h00;
    return x;
  endfunction

  // host sends one user cell on connection c
  task automatic host_send(input int c);
    cell_t x, e;
    x = mk_cell(c, 3'($urandom_range(0, 3)));
    @(negedge clk);
    dn_in_valid = 1; dn_in_cell = x;
    #1; while (!dn_in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    e = x;
    if (c != NCONN - 1) begin
      e.payload = x.payload ^ keystream(key[c], sv_dn[c]);
      sv_dn[c] = sv_after_cell(sv_dn[c]);
      n_enc++;
    end
    exp_dn[c].push_back(e);
    exp_up[c].push_back(x);
    if (last_ctx >= 0 && last_ctx != c) n_key_switch++;
    last_ctx = c;
    #1 dn_in_valid = 0;
  endtask

  // host keeps dn_in_valid high from cell to cell (line-rate burst);
  // called at a falling edge, returns at the next falling edge
  task automatic host_send_b2b(input int c, input bit last);
    cell_t x, e;
    x = mk_cell(c, 3'b000);
    dn_in_valid = 1; dn_in_cell = x;
    #1; while (!dn_in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    acc_cyc.push_back(cycle);
    e = x;
    e.payload = x.payload ^ keystream(key[c], sv_dn[c]);
    sv_dn[c] = sv_after_cell(sv_dn[c]);
    n_enc++;
    exp_dn[c].push_back(e);
    exp_up[c].push_back(x);
    if (last_ctx >= 0 && last_ctx != c) n_key_switch++;
    last_ctx = c;
    @(negedge clk);
    if (last) dn_in_valid = 0;
  endtask

  task automatic host_signalling();
    cell_t x;
    x = mk_cell(0, 3'b000);
    x.hdr.vpi = 0; x.hdr.vci = 16'd5;
    @(negedge clk);
    dn_in_valid = 1; dn_in_cell = x;
    #1; while (!dn_in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    exp_nrt.push_back(x);
    #1 dn_in_valid = 0;
  endtask

  task automatic nrt_insert(input int c, input cell_cls_e cls);
    tcell_t t;
    cell_t e;
    t.cls = cls; t.ctx = CTX_W'(c);
    t.data = mk_cell(c, 3'b000);
    @(negedge clk);
    dn_nrt_in_valid = 1; dn_nrt_in_tcell = t;
    #1; while (!dn_nrt_in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    e = t.data;
    if (cls == CLS_RESYNC_TX) begin
      sv_dn[c] = sv_after_jump(sv_dn[c][41:34] + 8'd1, dn_role_ir);
      e.hdr.pti = 3'b101;
      e.payload = resync_cell_ref(sv_dn[c]);
      if (!have_old) begin old_resync = e; have_old = 1; end
      exp_dn[c].push_back(e);
    end else begin
      exp_dn[c].push_back(e);
      exp_up[c].push_back(e);    // a clear cell on the clear connection stays clear
      n_ins++;
    end
    #1 dn_nrt_in_valid = 0;
  endtask

  task automatic drain();
    int quiet;
    quiet = 0;
    while (quiet < 40) begin
      @(posedge clk);
      if (dn_out_valid || up_out_valid || up_in_valid || loopq.size() > 0) quiet = 0;
      else quiet++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // connection tables, keys and state vectors for both directions
    for (int c = 0; c < NCONN; c++) begin
      key[c] = rand_key();
      sv_dn[c] = {$urandom, $urandom} & ~64'h7;
      sv_dn[c][41:34] = 8'd40;
      dn_tw_en = 1; dn_tw_valid = 1; dn_tw_vpi = 8'd1; dn_tw_vci = VCI0 + 16'(c);
      dn_tw_ctx = CTX_W'(c); dn_tw_crypt = (c != NCONN - 1);
      up_tw_en = 1; up_tw_valid = 1; up_tw_vpi = 8'd1; up_tw_vci = VCI0 + 16'(c);
      up_tw_ctx = CTX_W'(c); up_tw_crypt = (c != NCONN - 1);
      dn_km_en = 1; dn_km_we = 1; dn_km_addr = CTX_W'(c); dn_km_wdata = key[c];
      up_km_en = 1; up_km_we = 1; up_km_addr = CTX_W'(c); up_km_wdata = key[c];
      dn_init_valid = 1; dn_init_ctx = CTX_W'(c); dn_init_sv = sv_dn[c];
      up_init_valid = 1; up_init_ctx = CTX_W'(c); up_init_sv = sv_dn[c];
      @(posedge clk);
      chk(dn_init_ready && up_init_ready, "SV load accepted");
      @(negedge clk);
    end
    dn_tw_en = 0; up_tw_en = 0; dn_km_we = 0; up_km_we = 0; dn_init_valid = 0; up_init_valid = 0;
    dn_km_addr = 2;
    @(posedge clk); #1 chk(dn_km_rdata == key[2], "key read-back");
    dn_km_en = 0; up_km_en = 0;

    // phase 1: interleaved traffic, no back-pressure
    for (int i = 0; i < 60; i++) host_send($urandom_range(0, NCONN - 1));
    host_signalling();
    drain();
    // phase 2: resync each encrypted connection, then traffic under back-pressure
    for (int c = 0; c < NCONN - 1; c++) begin
      nrt_insert(c, CLS_RESYNC_TX);
      drain();
    end
    nrt_insert(NCONN - 1, CLS_BYPASS);
    busy = 1;
    for (int i = 0; i < 80; i++) begin
      host_send($urandom_range(0, NCONN - 1));
      if (i % 25 == 0) host_signalling();
    end
    drain();
    busy = 0;
    // phase 3: replayed (stale jump number) and corrupted resync cells upstream
    chk(have_old, "a resync cell was captured");
    loopq.push_back(old_resync);
    begin
      cell_t bad;
      bad = old_resync;
      bad.payload[375:312] = sv_after_jump(8'd200, 1'b1);   // newer jump number, CRC now wrong
      loopq.push_back(bad);
    end
    drain();
    for (int i = 0; i < 30; i++) host_send($urandom_range(0, NCONN - 1));
    drain();

    // phase 4: line-rate burst, connections alternating between the two modules
    @(negedge clk);
    for (int i = 0; i < LINE_CELLS; i++) host_send_b2b(i % 2, i == LINE_CELLS - 1);
    drain();
    n_line = acc_cyc.size();
    line_span = acc_cyc[n_line - 1] - acc_cyc[0];
    // two modules, each taking a cell every 1 + 6/SLICES = 4 cycles: 0.5 cell per cycle
    chk(n_line == LINE_CELLS && line_span <= 2 * (LINE_CELLS - 1) + 1,
        $sformatf("line rate: %0d cells in %0d cycles", n_line, line_span));

    for (int c = 0; c < NCONN; c++)
      chk(exp_dn[c].size() == 0 && exp_up[c].size() == 0, $sformatf("connection %0d fully delivered", c));
    chk(exp_nrt.size() == 0, "all signalling cells diverted");
    $display("encrypted %0d decrypted %0d clear %0d key switches %0d diverted %0d inserted %0d",
             n_enc, n_dec, n_clear, n_key_switch, n_nrt, n_ins);
    $display("line-rate burst: %0d cells accepted in %0d cycles", n_line, line_span);
    $display("resync inserted %0d accepted %0d rejected %0d; stalls down %0d up %0d; module use %0d/%0d",
             n_rs_tx, n_rs_ok, n_rs_bad, n_stall_dn, n_stall_up, used_mod[0], used_mod[1]);
    chk(n_enc > 0 && n_dec > 0 && n_clear > 0, "encrypt, decrypt and clear cells happened");
    chk(n_key_switch > 0, "key switch between consecutive cells happened");
    chk(n_nrt > 0 && n_ins > 0, "diversion and insertion happened");
    chk(n_rs_tx == NCONN - 1 && n_rs_ok == NCONN - 1 && n_rs_bad == 2, "resync insert/accept/reject counts");
    chk(n_stall_dn > 0 && n_stall_up > 0, "back-pressure stalls happened");
    chk(used_mod[0] > 0 && used_mod[1] > 0, "both cryptographic modules used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
