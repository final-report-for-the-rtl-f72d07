// tb_crc10: checks the combinational CRC-10 against long division.
//
// Random and corner-case payloads (all zeros, all ones, single bits) are fed to
// the CRC unit and compared with the reference remainder; a payload with its
// CRC appended must divide exactly.
//
// The expected values come from the reference models in tb_model_pkg or from
// simple models in this file; the stimulus and its sizes are this test's own
// choices.
module tb_crc10;
  import tb_model_pkg::*;
  logic [373:0] data;
  logic [9:0]   crc;
  int checks = 0, failures = 0;

  crc10 dut (.data, .crc);

  task automatic one(input logic [383:0] p);
    logic [383:0] q;
    data = p[383:10];
    #1;
    checks++;
    if (crc !== crc10_ref(p)) begin
      failures++;
      $display("FAIL: crc %h exp %h", crc, crc10_ref(p));
    end
    q = p; q[9:0] = crc;
    checks++;
    if (crc10_ref({q[383:10], 10'h0}) != q[9:0]) failures++;
  endtask

  initial begin
    one('0);
    one('1);
    for (int b = 10; b < 384; b += 37) one(384'(1) << b);
    for (int i = 0; i < 200; i++) one(rand_payload());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
