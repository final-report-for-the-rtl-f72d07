// tb_sv_memory: random reads and writes of the state vector memory.
//
// Compares each read with a model array, checks the one-cycle read latency,
// that rd_data holds while rd_en=0, and that a read of the address written in
// the same cycle returns the old word.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_sv_memory;
  localparam int D = atm_pkg::NUM_CTX;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [$clog2(D)-1:0] rd_addr = '0, wr_addr = '0;
  logic [63:0] rd_data, wr_data = '0;
  logic [63:0] model [D];
  logic [63:0] expect_d;
  int checks = 0, failures = 0;

  sv_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = a; wr_data = {$urandom, $urandom};
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rd_en   = $urandom_range(0, 3) != 0;
      rd_addr = $urandom;
      wr_en   = $urandom_range(0, 1);
      wr_addr = (i % 5 == 0) ? rd_addr : $urandom;
      wr_data = {$urandom, $urandom};
      if (rd_en) expect_d = model[rd_addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expect_d) begin
        failures++;
        $display("FAIL: read %h exp %h", rd_data, expect_d);
      end
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
