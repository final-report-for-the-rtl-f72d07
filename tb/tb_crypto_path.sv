// tb_crypto_path: one direction of the encryptor, shell and modules together.
//
// Programs four encrypted connections and one clear connection, loads keys
// and SVs, and sends interleaved cells: user cells (checked against the DES
// counter-mode model per connection), cells on an unknown connection (must be
// diverted to the non-real-time port), a resync request and a clear cell
// inserted by the non-real-time side. Three cryptographic modules with six
// DES slices each (a whole payload per beat) exercise the parameters; the
// output is back-pressured at random.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_crypto_path;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int NC = 5, NM = 3, SL = 6;
  logic clk = 0, rst_n = 0, role_ir = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  cell_t in_cell = '0, out_cell;
  logic nrt_out_valid, nrt_out_ready = 1, nrt_in_valid = 0, nrt_in_ready;
  tcell_t nrt_out_tcell, nrt_in_tcell = '0;
  logic tw_en = 0, tw_valid = 0, tw_crypt = 0;
  logic [7:0] tw_vpi = '0;
  logic [15:0] tw_vci = '0;
  logic [CTX_W-1:0] tw_ctx = '0, init_ctx = '0, km_addr = '0;
  logic init_valid = 0, init_ready, km_en = 0, km_we = 0;
  sv_t init_sv = '0;
  logic [55:0] km_wdata = '0, km_rdata;
  logic [NM-1:0] ev_resync_tx, ev_resync_ok, ev_resync_bad;
  int checks = 0, failures = 0, n_div = 0, n_rs = 0, n_stall = 0;
  bit busy = 0;

  crypto_path #(.N_CRYPTO(NM), .SLICES(SL)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) out_ready <= busy ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [55:0] key [NC];
  logic [63:0] sv [NC];
  cell_t expq [NC][$];
  cell_t exp_nrt[$];

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      int c;
      c = int'(out_cell.hdr.vci) - 64;
      if (c < 0 || c >= NC || expq[c].size() == 0) chk(0, "unexpected cell");
      else chk(out_cell == expq[c].pop_front(), $sformatf("cell on connection %0d", c));
    end
    if (nrt_out_valid) begin
      if (exp_nrt.size() == 0) chk(0, "unexpected diverted cell");
      else begin chk(nrt_out_tcell.data == exp_nrt.pop_front(), "diverted cell"); n_div++; end
    end
    n_rs += $countones(ev_resync_tx);
  end

  function automatic cell_t mk(input int c);
    cell_t x;
    x.hdr = '{gfc: 4'd0, vpi: 8'd3, vci: 16'(64 + c), pti: 3'b000, clp: 1'b0};
    x.payload = rand_payload();
    return x;
  endfunction

  task automatic send(input cell_t x);
    @(negedge clk);
    in_valid = 1; in_cell = x;
    #1; while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic user(input int c);
    cell_t x, e;
    x = mk(c);
    e = x;
    if (c < NC - 1) begin
      e.payload ^= keystream(key[c], sv[c]);
      sv[c] = sv_after_cell(sv[c]);
    end
    expq[c].push_back(e);
    send(x);
  endtask

  task automatic insert(input int c, input cell_cls_e cls);
    tcell_t t;
    cell_t e;
    t.cls = cls; t.ctx = CTX_W'(c); t.data = mk(c);
    e = t.data;
    if (cls == CLS_RESYNC_TX) begin
      sv[c] = sv_after_jump(sv[c][41:34] + 8'd1, role_ir);
      e.hdr.pti = 3'b101;
      e.payload = resync_cell_ref(sv[c]);
    end
    expq[c].push_back(e);
    @(negedge clk);
    nrt_in_valid = 1; nrt_in_tcell = t;
    #1; while (!nrt_in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 nrt_in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      key[c] = rand_key();
      sv[c] = {$urandom, $urandom} & ~64'h7;
      tw_en = 1; tw_valid = 1; tw_vpi = 8'd3; tw_vci = 16'(64 + c); tw_ctx = CTX_W'(c); tw_crypt = (c < NC - 1);
      km_en = 1; km_we = 1; km_addr = CTX_W'(c); km_wdata = key[c];
      init_valid = 1; init_ctx = CTX_W'(c); init_sv = sv[c];
      @(posedge clk);
      chk(init_ready, "SV load");
      @(negedge clk);
    end
    tw_en = 0; km_en = 0; km_we = 0; init_valid = 0;
    for (int i = 0; i < 40; i++) user($urandom_range(0, NC - 1));
    begin
      cell_t x;
      x = mk(0); x.hdr.vci = 16'd999;   // unknown connection
      exp_nrt.push_back(x);
      send(x);
    end
    repeat (40) @(posedge clk);
    insert(1, CLS_RESYNC_TX);
    insert(NC - 1, CLS_BYPASS);
    repeat (40) @(posedge clk);
    busy = 1;
    for (int i = 0; i < 60; i++) user($urandom_range(0, NC - 1));
    repeat (60) @(posedge clk);
    busy = 0;
    repeat (10) @(posedge clk);
    for (int c = 0; c < NC; c++) chk(expq[c].size() == 0, $sformatf("connection %0d delivered", c));
    chk(n_div == 1 && n_rs == 1 && n_stall > 0, $sformatf("diverted %0d resync %0d stalls %0d", n_div, n_rs, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
