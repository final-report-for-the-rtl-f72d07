// tb_cv_memory: both ports of the dual-port key memory.
//
// The key management port writes and reads back random keys; the read-only
// port reads concurrently. Checks both ports against a model, the one-cycle
// latency, and that the read-only port holds its word while b_en=0.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_cv_memory;
  localparam int D = atm_pkg::NUM_CTX;
  logic clk = 0, a_en = 0, a_we = 0, b_en = 0;
  logic [$clog2(D)-1:0] a_addr = '0, b_addr = '0;
  logic [55:0] a_wdata = '0, a_rdata, b_rdata;
  logic [55:0] model [D];
  logic [55:0] exp_a, exp_b;
  int checks = 0, failures = 0;
  bit b_seen = 0;

  cv_memory dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = a; a_wdata = {$urandom, 24'($urandom)};
      model[a] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1);
      a_addr = $urandom; a_wdata = {$urandom, 24'($urandom)};
      b_en = $urandom_range(0, 3) != 0; b_addr = $urandom;
      if (a_en) exp_a = model[a_addr];
      if (b_en) begin exp_b = model[b_addr]; b_seen = 1; end
      @(posedge clk);
      if (a_en && a_we) model[a_addr] = a_wdata;
      #1;
      if (a_en) chk(a_rdata === exp_a, "port A read");
      if (b_seen) chk(b_rdata === exp_b, $sformatf("port B read %h exp %h", b_rdata, exp_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
