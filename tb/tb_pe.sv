// Test of one processing element with random upstream records: each output
// record is compared with the recurrence computed here from the PE's own
// previous inputs and outputs, including path starts, the column best, the
// row best, the empty-slot pass-through and the one-cycle latency.
`timescale 1ns/1ps
module tb_pe;
  import dialign_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic en = 1, pass_start = 0, q_load = 0, in_valid = 0, out_valid;
  logic [31:0] row_base = 10, in_col = 0, out_col;
  qchar_t q_in = '0, q_out;
  base_t in_base = 0, out_base;
  rec_t in_rec = '0, out_rec;
  pe_best_t best;
  pe #(.IDX(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model state
  int dh, dsr, dsc, lh, lsr, lsc, bs, bc;
  initial begin
    rec_t e;
    int h, sr, sc, s, cd, cu, cl;
    repeat (3) @(posedge clk); rst_n <= 1;
    q_in <= '{1'b1, 8'h47}; q_load <= 1; @(posedge clk); q_load <= 0; q_in <= '0;
    @(posedge clk);
    check(q_out.valid && q_out.base == 8'h47, "query loaded");
    for (int pass = 0; pass < 2; pass++) begin
      pass_start <= 1; @(posedge clk); pass_start <= 0;
      dh = 0; dsr = 0; dsc = 0; lh = 0; lsr = 0; lsc = 0; bs = 0; bc = 0;
      for (int j = 1; j <= 60; j++) begin
        in_valid <= 1; in_col <= j;
        in_base  <= ($urandom_range(1)) ? 8'h47 : 8'h41;
        in_rec.h <= $urandom_range(6); in_rec.h_srow <= $urandom_range(9); in_rec.h_scol <= $urandom_range(99);
        in_rec.best <= $urandom_range(8); in_rec.best_row <= 1; in_rec.best_srow <= 2; in_rec.best_scol <= 5;
        in_rec.best_scol <= $urandom;
        @(posedge clk); in_valid <= 0;
        #1;
        // expected, from the sampled inputs
        s  = (in_base == 8'h47) ? 2 : -1;
        cd = dh + s; cu = int'(in_rec.h) - 1; cl = lh - 1;
        h = 0; sr = 13; sc = j;
        if (cd > 0 && cd >= cu && cd >= cl) begin h = cd; if (dh != 0) begin sr = dsr; sc = dsc; end end
        else if (cu > 0 && cu >= cl) begin h = cu; sr = in_rec.h_srow; sc = in_rec.h_scol; end
        else if (cl > 0) begin h = cl; sr = lsr; sc = lsc; end
        e = in_rec; e.h = h; e.h_srow = sr; e.h_scol = sc;
        if (h > int'(in_rec.best)) begin e.best = h; e.best_row = 13; e.best_srow = sr; e.best_scol = sc; end
        check(out_valid && out_rec == e && out_col == j && out_base == in_base, $sformatf("pass %0d col %0d", pass, j));
        if (h > bs) begin bs = h; bc = j; end
        check(best.score == bs && best.col == bc, "row best");
        dh = in_rec.h; dsr = in_rec.h_srow; dsc = in_rec.h_scol; lh = h; lsr = sr; lsc = sc;
        // a stall cycle must change nothing
        if (j % 7 == 0) begin
          en <= 0; in_valid <= 1; in_base <= 8'h47; in_rec.h <= 50;
          @(posedge clk); #1; check(out_rec == e, "stall holds output");
          en <= 1; in_valid <= 0;
          @(posedge clk); #1;   // and a bubble
        end
      end
    end
    // empty slot: records pass through unchanged
    q_in <= '0; q_load <= 1; @(posedge clk); q_load <= 0;
    in_valid <= 1; in_base <= 8'h47; in_rec <= {7{32'h1234_5678}};
    @(posedge clk); in_valid <= 0; #1;
    check(out_rec == {7{32'h1234_5678}}, "empty slot passes through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
