// Test of the LOAD FIFO block: records are cut into fourteen 16-bit words
// (record word 0 first, low half first) and fed with random gaps; records
// are taken out with random back-pressure and must come back whole and in
// order. Checks that in_ready drops when the buffer is full, and that a
// record is readable two clock edges after its last word is accepted.
`timescale 1ns/1ps
module tb_load_fifo;
  import dialign_pkg::*;
  localparam int D = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [HBA_W-1:0] in_data = 0;
  rec_t out_rec;
  load_fifo #(.DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  rec_t sent[$];
  int got = 0, stall_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) stall_seen++;
    if (out_valid && out_ready) begin
      check(sent.size() > 0 && out_rec == sent[0], $sformatf("record %0d %h %h", got, out_rec, sent[0]));
      void'(sent.pop_front()); got++;
    end
  end
  initial begin
    rec_t r; logic [REC_W-1:0] b;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      b = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      r = b; sent.push_back(r);
      for (int h = 0; h < REC_HALFS; h++) begin
        @(negedge clk);
        in_valid = 1;
        in_data = h[0] ? b[REC_W-1-32*(h/2) -: 16] : b[REC_W-1-32*(h/2)-16 -: 16];
        out_ready = (k < 10) ? 1'b0 : 1'($urandom_range(1));
        while (!in_ready) begin @(negedge clk); out_ready = 1'($urandom_range(1)); end
        @(posedge clk);
        @(negedge clk); in_valid = 0;
        if (k > 0 && $urandom_range(5) == 0) @(negedge clk);
      end
      if (k == 0) begin
        out_ready = 0;
        check(!out_valid, "not yet available half a cycle after the last word");
        @(negedge clk);
        check(out_valid && out_rec == r, "record available two edges after its last word");
      end
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (20) @(posedge clk);
    check(got == 30, "all records out");
    check(stall_seen > 0, "back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
