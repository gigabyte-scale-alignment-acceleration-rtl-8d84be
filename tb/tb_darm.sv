// Test of the DARM: random column records (some with equal best scores)
// are fed with idle cycles; the outputs must equal the first record with
// the highest column best, and clear must reset them.
`timescale 1ns/1ps
module tb_darm;
  import dialign_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic clear = 0, in_valid = 0;
  logic [31:0] in_col = 0, pos_row, pos_col, final_row, final_col;
  rec_t in_rec = '0;
  score_t score;
  darm dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    int bs, br, bc, bsr, bsc;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(score == 0 && final_row == 0 && final_col == 0, "cleared");
      bs = 0; br = 0; bc = 0; bsr = 0; bsc = 0;
      for (int j = 1; j <= 100; j++) begin
        in_valid = $urandom_range(3) != 0;
        in_col = j;
        in_rec = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        in_rec.best = $urandom_range(40);
        if (in_valid && int'(in_rec.best) > bs) begin
          bs = in_rec.best; br = in_rec.best_row; bc = j; bsr = in_rec.best_srow; bsc = in_rec.best_scol;
        end
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      check(score == bs && final_row == br && final_col == bc && pos_row == bsr && pos_col == bsc,
            $sformatf("run %0d best %0d at col %0d (got %0d at %0d)", run, bs, bc, score, final_col));
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
