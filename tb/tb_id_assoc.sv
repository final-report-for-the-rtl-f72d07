// tb_id_assoc: connection table lookup and cell classification.
//
// Programs a few connections (encrypted, not encrypted, one later removed) and
// sends cells of every kind: user cells on each, cells on unknown connections,
// a cell whose folded index matches a programmed entry but whose VPI/VCI does
// not, resync OAM cells, other OAM cells and resource-management cells. Each
// output must carry the cell unchanged, the right context index and class.
// The output is back-pressured at random; order and contents must survive.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_id_assoc;
  import atm_pkg::*;
  import tb_model_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  cell_t in_cell = '0;
  tcell_t out_tcell;
  logic tw_en = 0, tw_valid = 0, tw_crypt = 0;
  logic [7:0] tw_vpi = '0;
  logic [15:0] tw_vci = '0;
  logic [CTX_W-1:0] tw_ctx = '0;
  int checks = 0, failures = 0;
  bit rnd = 0;

  id_assoc #(.TBL_AW(AW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) out_ready <= rnd ? ($urandom_range(0, 1) == 1) : 1'b1;

  tcell_t expq[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: extra"); end
    else if (out_tcell.data != expq[0].data || out_tcell.cls != expq[0].cls ||
             (out_tcell.cls != CLS_NRT && out_tcell.ctx != expq[0].ctx)) begin
      failures++;
      $display("FAIL: cls %0d exp %0d ctx %0d exp %0d", out_tcell.cls, expq[0].cls, out_tcell.ctx, expq[0].ctx);
      void'(expq.pop_front());
    end else void'(expq.pop_front());
  end

  task automatic prog(input logic [7:0] vpi, input logic [15:0] vci, input int ctx, input bit crypt, input bit used);
    @(negedge clk);
    tw_en = 1; tw_valid = used; tw_vpi = vpi; tw_vci = vci; tw_ctx = CTX_W'(ctx); tw_crypt = crypt;
    @(negedge clk); tw_en = 0;
  endtask

  task automatic send(input logic [7:0] vpi, input logic [15:0] vci, input logic [2:0] pti,
                      input bit resync, input cell_cls_e cls, input int ctx);
    cell_t c;
    tcell_t e;
    c.hdr = atm_hdr_t'($urandom);
    c.hdr.vpi = vpi; c.hdr.vci = vci; c.hdr.pti = pti;
    c.payload = rand_payload();
    if (resync) c.payload[383:376] = 8'hA5;
    else if (c.payload[383:376] == 8'hA5) c.payload[383:376] = 8'h00;
    e.data = c; e.cls = cls; e.ctx = CTX_W'(ctx);
    @(negedge clk);
    in_valid = 1; in_cell = c;
    #1; while (!in_ready) begin @(negedge clk); #1; end   // read ready once settled
    @(posedge clk);
    expq.push_back(e);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // clear the slots used below
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); tw_en = 1; tw_valid = 0; tw_vpi = 0; tw_vci = 16'(i);
    end
    @(negedge clk); tw_en = 0;
    prog(8'd1, 16'd100, 5, 1, 1);      // encrypted
    prog(8'd2, 16'd200, 9, 0, 1);      // clear
    prog(8'd3, 16'd300, 12, 1, 1);     // encrypted, removed later
    for (int pass = 0; pass < 2; pass++) begin
      rnd = (pass == 1);
      send(8'd1, 16'd100, 3'b000, 0, CLS_USER, 5);
      send(8'd1, 16'd100, 3'b011, 0, CLS_USER, 5);
      send(8'd2, 16'd200, 3'b001, 0, CLS_BYPASS, 9);
      send(8'd3, 16'd300, 3'b010, 0, CLS_USER, 12);
      send(8'd7, 16'd5,   3'b000, 0, CLS_NRT, 0);     // signalling, not in table
      send(8'd0, 16'd101, 3'b000, 0, CLS_NRT, 0);     // vci 101 ^ 0 folds to 101
      send(8'd1 ^ 8'd4, 16'd100 ^ 16'd4, 3'b000, 0, CLS_NRT, 0);  // same slot, other VPI/VCI
      send(8'd1, 16'd100 + 16'd1024, 3'b000, 0, CLS_NRT, 0);      // same slot, VCI differs above the index
      send(8'd1, 16'd100, 3'b101, 1, CLS_RESYNC_RX, 5);
      send(8'd1, 16'd100, 3'b100, 1, CLS_RESYNC_RX, 5);
      send(8'd1, 16'd100, 3'b101, 0, CLS_NRT, 5);     // other OAM
      send(8'd1, 16'd100, 3'b110, 0, CLS_NRT, 5);     // RM cell
      send(8'd9, 16'd900, 3'b101, 1, CLS_NRT, 0);     // resync on unknown connection
    end
    prog(8'd3, 16'd300, 12, 1, 0);
    send(8'd3, 16'd300, 3'b010, 0, CLS_NRT, 0);
    // back-to-back stream
    rnd = 1;
    for (int i = 0; i < 50; i++) send(8'd1, 16'd100, 3'b000, 0, CLS_USER, 5);
    rnd = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d missing", expq.size()); end
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
