// tb_slice_interop: counter mode gives the same ciphertext at every degree of
// parallelism.
//
// Four cryptographic modules built with SLICES = 1, 2, 3 and 6 (64, 128, 192
// and 384 key stream bits per beat) receive the same stream of cells with the
// same keys and state vectors. Every output of every module must equal the
// model's ciphertext, so all four produce identical cells. The stream includes
// one resync insertion per connection. The SLICES = 6 encryptor's output is
// then fed to a SLICES = 1 decryptor, with the resync cells it inserted
// offered as received resync cells. The decryptor must accept each of them
// and return the original plaintext: a wide unit and a narrow unit
// interoperate. That property is what the counter mode was chosen for; the
// stream, the sizes and the checks are this testbench's own.
//
// Each encryptor is fed back to back with no output back-pressure. The
// spacing of accepted cells must be 1 + 6/SLICES cycles: 7, 4, 3 and 2 cycles.
// At SLICES = 6 that is one whole payload every two cycles.
module tb_slice_interop;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int NM = 4;                 // encryptors
  localparam int NC = 4;                 // connections
  localparam int N  = 64;                // cells in the stream
  localparam int SL [NM] = '{1, 2, 3, 6};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // shared set-up ports
  logic init_valid = 0;
  logic [CTX_W-1:0] init_ctx = '0;
  sv_t init_sv = '0;
  logic km_en = 0, km_we = 0;
  logic [CTX_W-1:0] km_addr = '0;
  logic [55:0] km_wdata = '0;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  tcell_t stim [N];
  cell_t  exp_enc [$];   // encryptor outputs in order
  cell_t  exp_dec [$];   // decryptor outputs in order
  logic [55:0] key [NC];
  logic [63:0] sv0 [NC];
  bit go = 0;

  logic [NM-1:0] init_ready_e;
  int            n_out [NM];

  for (genvar m = 0; m < NM; m++) begin : g_enc
    logic   in_valid, in_ready, out_valid;
    tcell_t in_tcell;
    cell_t  out_cell;
    logic [55:0] km_rdata;
    logic   ev_tx, ev_ok, ev_bad;
    int     idx = 0, oidx = 0, last_acc = -1;

    crypto_module #(.SLICES(SL[m])) u_cm (
      .clk, .rst_n,
      .in_valid, .in_ready, .in_tcell,
      .out_valid, .out_ready(1'b1), .out_cell,
      .init_valid, .init_ready(init_ready_e[m]), .init_ctx, .init_sv,
      .role_ir(1'b1),
      .km_en, .km_we, .km_addr, .km_wdata, .km_rdata,
      .ev_resync_tx(ev_tx), .ev_resync_ok(ev_ok), .ev_resync_bad(ev_bad));

    assign in_valid = go && idx < N;
    assign in_tcell = stim[idx < N ? idx : 0];

    always @(posedge clk) if (in_valid && in_ready) begin
    if (last_acc >= 0)
        chk(cycle - last_acc == 1 + 6 / SL[m],
            $sformatf("SLICES=%0d: cell spacing %0d exp %0d", SL[m], cycle - last_acc, 1 + 6 / SL[m]));
      last_acc <= cycle;
      idx <= idx + 1;
    end

    always @(posedge clk) if (rst_n && out_valid) begin
      chk(oidx < exp_enc.size() && out_cell == exp_enc[oidx],
          $sformatf("SLICES=%0d: output %0d differs from the model", SL[m], oidx));
      oidx <= oidx + 1;
    end
    assign n_out[m] = oidx;
  end

  // narrow decryptor fed from the widest encryptor
  logic   d_in_valid = 0, d_in_ready, d_out_valid, d_init_ready;
  tcell_t d_in_tcell = '0;
  cell_t  d_out_cell;
  logic [55:0] d_km_rdata;
  logic   d_ev_tx, d_ev_ok, d_ev_bad;
  int     d_oidx = 0, resync_ok = 0;

  crypto_module #(.SLICES(1)) u_dec (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_tcell(d_in_tcell),
    .out_valid(d_out_valid), .out_ready(1'b1), .out_cell(d_out_cell),
    .init_valid, .init_ready(d_init_ready), .init_ctx, .init_sv,
    .role_ir(1'b0),
    .km_en, .km_we, .km_addr, .km_wdata, .km_rdata(d_km_rdata),
    .ev_resync_tx(d_ev_tx), .ev_resync_ok(d_ev_ok), .ev_resync_bad(d_ev_bad));

  always @(posedge clk) if (rst_n && d_ev_ok) resync_ok <= resync_ok + 1;
  always @(posedge clk) if (rst_n && d_ev_bad) chk(0, "decryptor rejected a resync cell");

  always @(posedge clk) if (rst_n && d_out_valid) begin
    chk(d_oidx < exp_dec.size() && d_out_cell == exp_dec[d_oidx],
        $sformatf("decryptor output %0d is not the plaintext", d_oidx));
    d_oidx <= d_oidx + 1;
  end

  // capture the SLICES = 6 encryptor's output for the decryptor
  tcell_t dq [$];
  int     enc_k = 0;
  always @(posedge clk) if (rst_n && g_enc[NM-1].out_valid) begin
    tcell_t t;
    t.cls  = (stim[enc_k].cls == CLS_RESYNC_TX) ? CLS_RESYNC_RX : stim[enc_k].cls;
    t.ctx  = stim[enc_k].ctx;
    t.data = g_enc[NM-1].out_cell;
    dq.push_back(t);
    enc_k <= enc_k + 1;
  end

  initial begin
    logic [63:0] sv [NC];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < NC; c++) begin
      key[c] = rand_key();
      km_en <= 1; km_we <= 1; km_addr <= CTX_W'(c); km_wdata <= key[c];
      @(posedge clk);
    end
    km_en <= 0; km_we <= 0;
    for (int c = 0; c < NC; c++) begin
      sv0[c] = {$urandom, $urandom} & ~64'h7;
      sv0[c][41:34] = 8'd3;
      sv[c] = sv0[c];
      init_valid <= 1; init_ctx <= CTX_W'(c); init_sv <= sv0[c];
      @(posedge clk);
      while (!(&init_ready_e) || !d_init_ready) @(posedge clk);
    end
    init_valid <= 0;
    // stimulus and model: user cells, some clear cells, one resync per connection
    for (int i = 0; i < N; i++) begin
      int c;
      cell_t e;
      c = i % NC;
      stim[i].ctx = CTX_W'(c);
      stim[i].data.hdr = atm_hdr_t'($urandom);
      stim[i].data.hdr.pti = 3'b000;
      stim[i].data.payload = rand_payload();
      if (i >= 24 && i < 24 + NC) stim[i].cls = CLS_RESYNC_TX;
      else if (i % 11 == 5)       stim[i].cls = CLS_BYPASS;
      else                        stim[i].cls = CLS_USER;
      e = stim[i].data;
      case (stim[i].cls)
        CLS_USER: begin
          e.payload ^= keystream(key[c], sv[c]);
          sv[c] = sv_after_cell(sv[c]);
          exp_dec.push_back(stim[i].data);
        end
        CLS_RESYNC_TX: begin
          sv[c] = sv_after_jump(sv[c][41:34] + 8'd1, 1'b1);
          e.hdr.pti = 3'b101;
          e.payload = resync_cell_ref(sv[c]);
        end
        default: exp_dec.push_back(stim[i].data);
      endcase
      exp_enc.push_back(e);
    end
    @(negedge clk);
    go = 1;
    // decryptor: offer the captured cells in order
    for (int i = 0; i < N; i++) begin
      while (dq.size() == 0) @(negedge clk);
      d_in_tcell = dq.pop_front();
      d_in_valid = 1;
      #1; while (!d_in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      @(negedge clk);
      d_in_valid = 0;
    end
    repeat (60) @(posedge clk);
    for (int m = 0; m < NM; m++)
      chk(n_out[m] == N, $sformatf("SLICES=%0d delivered %0d of %0d cells", SL[m], n_out[m], N));
    chk(d_oidx == exp_dec.size(), $sformatf("decryptor delivered %0d of %0d cells", d_oidx, exp_dec.size()));
    chk(resync_ok == NC, $sformatf("decryptor accepted %0d of %0d resync cells", resync_ok, NC));
    $display("interop: %0d cells through SLICES=1,2,3,6; %0d decrypted at SLICES=1; %0d resyncs accepted",
             N, d_oidx, resync_ok);
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
