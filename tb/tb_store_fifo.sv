// Test of the STORE FIFO block: random records go in (sometimes faster than
// they drain), the 16-bit output is collected with random back-pressure
// and every group of fourteen words must rebuild the records in order
// (record word 0 first, low half first). Also checks that in_ready drops
// when DEPTH records wait and that idle is reported at the end.
`timescale 1ns/1ps
module tb_store_fifo;
  import dialign_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, idle;
  rec_t in_rec = '0;
  logic [HBA_W-1:0] out_data;
  store_fifo #(.DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  rec_t sent[$];
  logic [HBA_W-1:0] words[$];
  int got = 0, full_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent.push_back(in_rec);
    if (!in_ready) full_seen++;
    if (out_valid && out_ready) begin
      words.push_back(out_data);
      if (words.size() == REC_HALFS) begin
        rec_t r; logic [REC_W-1:0] b;
        for (int w = 0; w < REC_WORDS; w++) b[REC_W-1-32*w -: 32] = {words[2*w+1], words[2*w]};
        r = b;
        check(sent.size() > 0 && r == sent[0], $sformatf("record %0d", got));
        void'(sent.pop_front()); words.delete(); got++;
      end
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    check(idle, "idle after reset");
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_rec = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      out_ready = $urandom_range(4) != 0;
      while (!in_ready) begin @(negedge clk); out_ready = $urandom_range(4) != 0; end
      @(posedge clk);
      @(negedge clk); in_valid = 0;
      repeat ($urandom_range(k < 20 ? 0 : 20)) begin @(negedge clk); out_ready = $urandom_range(4) != 0; end
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (40 * 14) @(posedge clk);
    check(got == 40, $sformatf("all records out (%0d)", got));
    check(full_seen > 0, "back-pressure seen");
    check(idle, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
