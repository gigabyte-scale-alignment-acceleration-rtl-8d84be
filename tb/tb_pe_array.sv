// Test of the PE chain: a 6-PE chain is loaded with a query through the
// shift input and a reference is streamed through it (with idle and stall
// cycles); every record leaving the last PE is compared with the last-row
// cell and the column best of a reference score matrix. A second pass feeds
// the first pass's records back in with a second query segment and must
// match the matrix of the 12-row query. The latency of NUM_PE cycles is
// checked on the second pass, which has idle but no stall cycles, and the row bests are compared for the second segment.
`timescale 1ns/1ps
module tb_pe_array;
  import dialign_pkg::*;
  import tb_ref_pkg::*;
  localparam int NPE = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic en = 1, pass_start = 0, q_load = 0, in_valid = 0, out_valid;
  logic [31:0] row_base = 0, in_col = 0, out_col;
  qchar_t q_in = '0;
  base_t in_base = 0, out_base;
  rec_t in_rec = '0, out_rec;
  pe_best_t best [NPE];
  pe_array #(.NUM_PE(NPE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte q[$], r[$], q1[$];
  rec_t saved[$];
  int   sent_at[$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic load(int first);
    for (int k = NPE - 1; k >= 0; k--) begin
      q_in <= '{1'b1, q[first + k]}; q_load <= 1; @(posedge clk);
    end
    q_load <= 0; q_in <= '0;
  endtask

  task automatic stream(bit use_saved);
    pass_start <= 1; @(posedge clk); pass_start <= 0;
    for (int j = 0; j < r.size(); j++) begin
      while ($urandom_range(3) == 0) begin in_valid <= 0; en <= pass2 ? 1'b1 : 1'(($urandom_range(1))); @(posedge clk); end
      en <= 1; in_valid <= 1; in_base <= r[j]; in_col <= j + 1;
      in_rec <= use_saved ? saved[j] : '0;
      sent_at.push_back(cyc);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (NPE + 2) @(posedge clk);
  endtask

  cell_t last[$], cb[$], ov, rm, rows[$];
  int got = 0;
  bit pass2 = 0;
  always @(posedge clk) if (rst_n && en && out_valid) begin
    automatic int j = out_col - 1;
    check(out_rec.h == last[j].score && out_rec.best == cb[j].score, $sformatf("col %0d scores", j + 1));
    check(out_rec.h == 0 || (out_rec.h_srow == last[j].srow && out_rec.h_scol == last[j].scol), "path start");
    check(cb[j].score == 0 || (out_rec.best_row == cb[j].row && out_rec.best_srow == cb[j].srow), "column best cell");
    check(out_base == r[j], "base passed along");
    // sampled one edge after the send, then NPE register stages
    if (pass2) check(cyc - sent_at[j] == NPE + 1, $sformatf("latency %0d", cyc - sent_at[j]));
    if (!pass2) saved.push_back(out_rec);
    got++;
  end

  initial begin
    for (int k = 0; k < 2 * NPE; k++) q.push_back(rand_base());
    for (int k = 0; k < 30; k++) r.push_back(rand_base());
    for (int k = 0; k < 6; k++) r[10 + k] = q[3 + k];
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    // pass 1: rows 1..6
    for (int k = 0; k < NPE; k++) q1.push_back(q[k]);
    columns(q1, r, 2, -1, -1, last, cb);
    load(0); stream(0);
    // pass 2: rows 7..12 with the saved boundary
    pass2 = 1; sent_at.delete();
    columns(q, r, 2, -1, -1, last, cb);
    align(q, r, 2, -1, -1, ov, rm, rows);
    row_base <= NPE;
    load(NPE); stream(1);
    for (int k = 0; k < NPE; k++)
      check(best[k].score == rows[NPE + k].score &&
            (rows[NPE + k].score == 0 || best[k].col == rows[NPE + k].col), $sformatf("row best %0d", NPE + k + 1));
    check(got == 2 * r.size(), "all columns out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
