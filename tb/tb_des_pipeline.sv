// tb_des_pipeline: self-checking test of the 16-stage pipelined DES.
//
// Streams known-answer vectors (the two classic FIPS 46 examples and six
// more computed with an independent software DES) into the pipeline, one per
// clock, each with its own key, plus bypassed blocks. Checks every result, that
// each block leaves exactly 16 clocks after it entered (one block per clock
// throughput), that bypassed blocks leave unchanged, and that en=0 freezes the
// pipeline without losing or duplicating a block.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_des_pipeline;
  typedef struct packed { logic [55:0] key; logic [63:0] pt; logic [63:0] ct; } kat_t;
  localparam kat_t KAT [8] = '{
      '{56'h12695bc9b7b7f8, 64'h0123456789abcdef, 64'h85e813540f0ab405},
      '{56'h0e66499ead8339, 64'h8787878787878787, 64'h0000000000000000},
      '{56'hf34d37253ced1c, 64'h6513270e269e0d37, 64'h391bbccb4492fc51},
      '{56'h0cb9fe8a746928, 64'hd23f0824128b2f33, 64'h57a4490e488dd87a},
      '{56'h1833a08885e415, 64'h9531985d5d9dc9f8, 64'h1c83b420f9b5ac73},
      '{56'he9c574a0fb013a, 64'h36f675cc81e74ef5, 64'h39cee5c11cdb1c39},
      '{56'h16028ad093146c, 64'h6b0d549b6f03675a, 64'h2850d47958dfd9ec},
      '{56'h3d3859211c42c7, 64'h8d116ece1738f7d9, 64'h62ce54688eeb83ca}};

  logic        clk = 0, rst_n = 0, en = 1;
  logic        in_valid = 0, in_bypass = 0;
  logic [55:0] in_key = '0;
  logic [63:0] in_data = '0;
  logic        out_valid, out_bypass;
  logic [55:0] out_key;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  des_pipeline dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) cycle <= cycle + 1;   // counts enabled cycles

  // expected stream: data, bypass flag, key, entry cycle
  typedef struct { logic [63:0] d; logic bp; logic [55:0] k; int t; } exp_t;
  exp_t q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Compare on every enabled clock.
  always @(posedge clk) if (rst_n && en && out_valid) begin
    exp_t e;
    if (q.size() == 0) check(0, "unexpected output");
    else begin
      e = q.pop_front();
      check(out_data == e.d, $sformatf("data %h exp %h", out_data, e.d));
      check(out_bypass == e.bp, "bypass flag");
      check(out_key == e.k, "key travels with data");
      check(cycle - e.t == 16, $sformatf("latency %0d", cycle - e.t));
    end
  end

  task automatic put(input logic [55:0] k, input logic [63:0] d, input logic [63:0] exp, input logic bp);
    in_valid <= 1; in_key <= k; in_data <= d; in_bypass <= bp;
    q.push_back('{d: exp, bp: bp, k: k, t: cycle + 1});   // sampled at the coming edge
    @(posedge clk);
    while (!en) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // back-to-back, each block with a different key
    for (int i = 0; i < 8; i++) put(KAT[i].key, KAT[i].pt, KAT[i].ct, 1'b0);
    put(56'h0, 64'hfeedface_cafef00d, 64'hfeedface_cafef00d, 1'b1);
    for (int i = 0; i < 8; i++) put(KAT[7-i].key, KAT[7-i].pt, KAT[7-i].ct, 1'b0);
    in_valid <= 0;
    // stall in the middle of the drain
    repeat (5) @(posedge clk);
    en <= 0;
    repeat (7) @(posedge clk);
    en <= 1;
    repeat (30) @(posedge clk);
    check(q.size() == 0, "all blocks delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
