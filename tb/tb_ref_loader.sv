// Test of the reference loader: on a first pass every column must carry a
// zero record, on a later pass the LOAD FIFO record of the same column;
// columns must be numbered 1..ref_len, the stream and record sources must
// each be consumed once per column, nothing may issue while en is low or a
// source is empty, and done must rise after the last column.
`timescale 1ns/1ps
module tb_ref_loader;
  import dialign_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0, first_pass = 1, en = 1, s_valid = 0, s_ready, l_valid = 0, l_ready, out_valid, done;
  logic [31:0] ref_len = 0, out_col;
  base_t s_data = 0, out_base;
  rec_t l_rec = '0, out_rec;
  ref_loader dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  byte r[$]; rec_t recs[$];
  int sp = 0, lp = 0, ncol = 0;
  always @(negedge clk) begin
    s_valid = (sp < r.size()) && $urandom_range(3) != 0;
    s_data  = (sp < r.size()) ? r[sp] : 8'h00;
    l_valid = (lp < recs.size()) && $urandom_range(3) != 0;
    l_rec   = (lp < recs.size()) ? recs[lp] : '0;
    en      = $urandom_range(5) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check(en && s_valid && (first_pass || l_valid), "issue only when allowed");
      check(out_col == ncol + 1 && out_base == r[ncol], "column number and base");
      check(first_pass ? out_rec == '0 : out_rec == recs[ncol], "boundary record");
      check(s_ready && (l_ready == !first_pass), "sources consumed");
      ncol++;
    end else check(!s_ready && !l_ready, "nothing consumed without issue");
    if (s_valid && s_ready) sp++;
    if (l_valid && l_ready) lp++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      r.delete(); recs.delete(); sp = 0; lp = 0; ncol = 0;
      for (int k = 0; k < 50; k++) begin
        r.push_back(8'h41 + 8'($urandom_range(3)));
        recs.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      end
      r.push_back(8'h5A);   // beyond ref_len
      recs.push_back('1);
      first_pass = (pass == 0); ref_len = 50; start = 1;
      @(negedge clk); start = 0;
      wait (done); @(negedge clk);
      check(ncol == 50 && sp == 50 && lp == (pass == 0 ? 0 : 50), $sformatf("pass %0d counts %0d %0d %0d", pass, ncol, sp, lp));
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
