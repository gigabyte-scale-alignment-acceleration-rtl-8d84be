// Test of the partition state bank: three passes capture random per-PE
// bests; every entry, every partition best and the stitched best must match
// the values captured (row = pass*NUM_PE + k + 1, the first of equal
// scores winning), capture must take NUM_PE
// cycles, and clear must reset the results.
`timescale 1ns/1ps
module tb_psb;
  import dialign_pkg::*;
  localparam int NPE = 5, MP = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic clear = 0, capture = 0, busy, done;
  logic [31:0] pass_idx = 0;
  pe_best_t best [NPE];
  logic [$clog2(NPE*MP)-1:0] rd_addr = 0;
  logic [$clog2(MP+1)-1:0] part_idx = 0;
  psb_entry_t rd_data, part_best, stitched;
  psb #(.NUM_PE(NPE), .MAX_PART(MP)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  pe_best_t all [MP][NPE];
  initial begin
    int t0, cycles, sbest, srow, pb;
    repeat (3) @(posedge clk); rst_n <= 1;
    sbest = 0; srow = 0;
    for (int p = 0; p < MP; p++) begin
      @(negedge clk);
      for (int k = 0; k < NPE; k++) begin
        all[p][k] = '{score_t'($urandom_range(7)), $urandom, $urandom, $urandom};
        if ((p == 0 && k == 1) || (p == 2 && k == 4)) all[p][k].score = 8;   // a tie for the top
        best[k] = all[p][k];
        if (int'(all[p][k].score) > sbest) begin sbest = all[p][k].score; srow = p * NPE + k + 1; end
      end
      pass_idx = p; capture = 1;
      @(negedge clk); capture = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == NPE + 1, $sformatf("capture took %0d cycles", cycles));
      for (int k = 0; k < NPE; k++) best[k] = '0;   // inputs may change after capture
    end
    for (int p = 0; p < MP; p++) begin
      pb = 0;
      for (int k = 0; k < NPE; k++) begin
        rd_addr = p * NPE + k; #1;
        check(rd_data.score == all[p][k].score && rd_data.col == all[p][k].col &&
              rd_data.srow == all[p][k].srow && rd_data.scol == all[p][k].scol &&
              rd_data.row == p * NPE + k + 1, $sformatf("entry %0d/%0d", p, k));
        if (int'(all[p][k].score) > pb) pb = all[p][k].score;
      end
      part_idx = p; #1;
      check(part_best.score == pb, $sformatf("partition %0d best", p));
    end
    check(stitched.score == sbest && stitched.row == srow, "stitched best is the first row with the top score");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(stitched.score == 0 && part_best.score == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
