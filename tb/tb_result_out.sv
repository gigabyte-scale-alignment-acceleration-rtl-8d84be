// Test of the result output: for several random results, a rising edge of
// done must produce exactly one 20-byte packet (score, start row, start
// column, final row, final column, least significant byte first) with last
// on the final byte, under random back-pressure; done staying high must not
// send a second packet. The first byte must appear the cycle after done.
`timescale 1ns/1ps
module tb_result_out;
  import dialign_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic done = 0, valid, last, ready = 0;
  score_t score = 0;
  logic [31:0] pos_row = 0, pos_col = 0, final_row = 0, final_col = 0;
  base_t data;
  result_out dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  byte got[$];
  int packets = 0;
  always @(negedge clk) ready = $urandom_range(3) != 0;
  always @(posedge clk) if (rst_n && valid && ready) begin
    got.push_back(data);
    check(last == (got.size() == 20), "last on byte 20 only");
    if (last) packets++;
  end
  initial begin
    logic [159:0] exp;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      score = $urandom; pos_row = $urandom; pos_col = $urandom; final_row = $urandom; final_col = $urandom;
      exp = {final_col, final_row, pos_col, pos_row, score};
      got.delete();
      done = 1;
      @(negedge clk);
      check(valid, "first byte the cycle after done");
      score = 0;   // inputs may change once latched
      repeat (80) @(negedge clk);
      done = 0;
      check(got.size() == 20, $sformatf("packet %0d has %0d bytes", t, got.size()));
      for (int k = 0; k < 20 && k < got.size(); k++) check(got[k] == exp[8*k +: 8], $sformatf("byte %0d", k));
      repeat (3) @(negedge clk);
    end
    check(packets == 4, "one packet per rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
