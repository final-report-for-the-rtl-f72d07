// tb_key_generator: counter-mode key stream from the parallel DES slices.
//
// Issues beats of SLICES counter blocks, each beat under a different random
// key that (as from the synchronous CV memory) arrives one cycle after the
// beat. Every output slice must equal DES(key, block) from the reference model,
// bypass flags must follow their beats, each beat must appear 17 enabled
// cycles after it was issued, and random stalls (en=0) must lose nothing.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_key_generator;
  import tb_model_pkg::*;
  localparam int SLICES = 2;
  logic clk = 0, rst_n = 0, en = 1;
  logic in_valid = 0, in_bypass = 0;
  logic [SLICES*64-1:0] in_blocks = '0;
  logic [55:0] cv_key = '0, key_next = '0;
  logic out_valid, out_bypass;
  logic [SLICES*64-1:0] out_ks;
  int checks = 0, failures = 0, cycle = 0;

  key_generator #(.SLICES(SLICES)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { logic [SLICES*64-1:0] ks; logic bp; int t; } exp_t;
  exp_t q[$];

  // CV memory stand-in: key follows its beat by one enabled cycle
  always @(posedge clk) if (en) begin
    cv_key <= key_next;
    cycle  <= cycle + 1;
  end

  always @(posedge clk) if (rst_n && en && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL: extra beat"); end
    else begin
      e = q.pop_front();
      if (!e.bp && out_ks !== e.ks) begin failures++; $display("FAIL: ks %h exp %h", out_ks, e.ks); end
      checks++;
      if (out_bypass !== e.bp) begin failures++; $display("FAIL: bypass"); end
      checks++;
      if (cycle - e.t != 17) begin failures++; $display("FAIL: latency %0d", cycle - e.t); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = (i > 100) ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_valid  = $urandom_range(0, 4) != 0;
      in_bypass = $urandom_range(0, 7) == 0;
      key_next  = rand_key();
      for (int s = 0; s < SLICES; s++) in_blocks[(SLICES-s)*64-1 -: 64] = {$urandom, $urandom};
      if (in_valid && en) begin
        exp_t e;
        for (int s = 0; s < SLICES; s++)
          e.ks[(SLICES-s)*64-1 -: 64] = des_ref(key_next, in_blocks[(SLICES-s)*64-1 -: 64]);
        e.bp = in_bypass;
        e.t  = cycle;   // edges before the sampling edge
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0; en = 1;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d beats missing", q.size()); end
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
