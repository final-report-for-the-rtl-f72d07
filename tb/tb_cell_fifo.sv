// tb_cell_fifo: random push/pop traffic against a queue model.
//
// Checks the show-ahead head, empty/full flags and count after every clock,
// including simultaneous push and pop and running the FIFO full and empty.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_cell_fifo;
  localparam int W = 40, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, saw_full = 0;

  cell_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(dout == q[0], $sformatf("head %h exp %h", dout, q[0]));
      if (full) saw_full++;
      // bias towards filling in the first half, draining in the second
      push = !full && ($urandom_range(0, 99) < (i < 1000 ? 70 : 30));
      pop  = !empty && ($urandom_range(0, 99) < (i < 1000 ? 30 : 70));
      din  = {$urandom, 8'($urandom)};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    chk(saw_full > 0, "reached full");
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
