// Test of the query loader: a model shift chain of NUM_PE slots follows
// q_load/q_out; after each load the slot k must hold character k of the
// segment and the slots past the segment must be empty. Segments of full,
// partial and zero length are loaded from a stream with random gaps, and
// the loader must take exactly seg_len bytes and shift exactly NUM_PE times.
`timescale 1ns/1ps
module tb_query_loader;
  import dialign_pkg::*;
  localparam int NPE = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, s_valid = 0, s_ready, q_load, busy, done;
  logic [31:0] seg_len = 0;
  base_t s_data = 0;
  qchar_t q_out;
  query_loader #(.NUM_PE(NPE)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  qchar_t chain [NPE];
  int shifts = 0, taken = 0;
  byte seg[$];
  always @(posedge clk) if (rst_n) begin
    if (q_load) begin
      for (int k = NPE - 1; k > 0; k--) chain[k] <= chain[k-1];
      chain[0] <= q_out;
      shifts++;
    end
    if (s_valid && s_ready) taken++;
  end
  // stream source: offers seg[pos] with random gaps
  int pos = 0;
  always @(negedge clk) begin
    s_valid = (pos < seg.size()) && ($urandom_range(2) != 0);
    s_data  = (pos < seg.size()) ? seg[pos] : 8'h00;
  end
  always @(posedge clk) if (s_valid && s_ready) pos <= pos + 1;

  initial begin
    int lens[4] = '{6, 4, 0, 1};
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    foreach (lens[t]) begin
      seg.delete(); pos = 0; shifts = 0; taken = 0;
      for (int k = 0; k < lens[t]; k++) seg.push_back(8'h41 + 8'(($urandom_range(3) + t + k) % 26));
      seg.push_back(8'h5A);   // one byte too many: must stay in the stream
      @(negedge clk); start = 1; seg_len = lens[t];
      @(negedge clk); start = 0;
      wait (done); @(negedge clk);
      check(shifts == NPE, $sformatf("seg %0d: %0d shifts", t, shifts));
      check(taken == lens[t], $sformatf("seg %0d: took %0d bytes", t, taken));
      for (int k = 0; k < NPE; k++)
        if (k < lens[t]) check(chain[k].valid && chain[k].base == seg[k], $sformatf("seg %0d slot %0d", t, k));
        else             check(!chain[k].valid, $sformatf("seg %0d slot %0d empty", t, k));
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
