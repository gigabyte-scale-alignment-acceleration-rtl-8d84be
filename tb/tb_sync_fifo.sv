// Test of the synchronous FIFO against a queue model: random writes and
// reads for many cycles, checking order, full/empty flags, the fill count
// and the one-cycle write-to-read latency.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic w_valid = 0, w_ready, r_valid, r_ready = 0;
  logic [W-1:0] w_data = 0, r_data;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [W-1:0] model[$];
  int full_seen = 0, empty_seen = 0;
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    check(!r_valid && w_ready && count == 0, "empty after reset");
    for (int c = 0; c < 3000; c++) begin
      automatic bit bias = (c / 300) % 2;
      w_valid <= bias ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      r_ready <= bias ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      w_data  <= $urandom;
      @(posedge clk);
      if (r_valid && r_ready) begin
        check(model.size() > 0 && r_data == model[0], "read order");
        void'(model.pop_front());
      end
      if (w_valid && w_ready) model.push_back(w_data);
      #1;
      check(count == model.size(), "count");
      check(w_ready == (model.size() < D) && r_valid == (model.size() > 0), "flags");
      if (!w_ready) full_seen++;
      if (!r_valid) empty_seen++;
    end
    check(full_seen > 0 && empty_seen > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
