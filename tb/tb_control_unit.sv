// Test of the partition sequencer with models of the blocks around it: the
// query loader answers ql_start with done after a delay, the chain reports
// a record leaving the last PE in random cycles, the PSB answers capture,
// and the write path reports idle some cycles after each pass. For several
// query lengths the test checks the number of passes, each pass's segment
// length, row base, first/last flags, the drive commands (write on all but
// the last pass, read on all but the first, regions alternating), the
// phase order and that done is reached.
`timescale 1ns/1ps
module tb_control_unit;
  import dialign_pkg::*;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic start = 0;
  logic [31:0] query_len = 0, ref_len = 0;
  phase_e phase;
  logic [31:0] pass_idx, ql_seg_len, row_base;
  logic busy, done, stream_sync, route_ref, ql_start, ql_done = 0, pass_start, rl_start;
  logic first_pass, last_pass, term_fire = 0, job_clear, psb_capture, psb_done = 0;
  logic wr_cmd, rd_cmd, pass_par, wpath_idle = 1;
  logic [ADDR_W-1:0] wr_addr, wr_len, rd_addr, rd_len;
  control_unit #(.NUM_PE(NPE)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int passes_seen, wr_seen, rd_seen, clear_seen, outs;
  int qlen_now, rlen_now;
  // block models
  always @(posedge clk) if (rst_n) begin
    if (ql_start) begin
      automatic int p = passes_seen;
      automatic int exp_len = (qlen_now - p * NPE > NPE) ? NPE : qlen_now - p * NPE;
      check(ql_seg_len == exp_len, $sformatf("pass %0d segment length %0d", p, ql_seg_len));
      check(phase == PH_QUERY, "query phase at load");
      fork begin repeat (3 + $urandom_range(5)) @(posedge clk); ql_done <= 1; @(posedge clk); ql_done <= 0; end join_none
    end
    if (pass_start) begin
      check(rl_start && phase == PH_REF && route_ref, "reference phase starts with chain clear");
      check(row_base == passes_seen * NPE, "row base");
      check(first_pass == (passes_seen == 0), "first pass flag");
      check(last_pass == ((passes_seen + 1) * NPE >= qlen_now), "last pass flag");
      check(wr_cmd == !last_pass && rd_cmd == !first_pass, "drive commands");
      if (wr_cmd) begin
        check(wr_len == rlen_now * 14 && wr_addr == (passes_seen % 2) * rlen_now * 14, "write region");
        wr_seen++;
      end
      if (rd_cmd) begin
        check(rd_len == rlen_now * 14 && rd_addr == ((passes_seen + 1) % 2) * rlen_now * 14, "read region");
        rd_seen++;
      end
      outs = 0;
    end
    if (psb_capture) begin
      check(outs == rlen_now, $sformatf("capture after %0d records", outs));
      passes_seen++;
      fork begin repeat (NPE) @(posedge clk); psb_done <= 1; @(posedge clk); psb_done <= 0;
                 wpath_idle <= 0; repeat (4) @(posedge clk); wpath_idle <= 1; end join_none
    end
    if (job_clear) clear_seen++;
    if (term_fire) outs++;
  end
  always @(negedge clk) term_fire = (phase == PH_REF) && $urandom_range(2) == 0 && outs < rlen_now;

  initial begin
    int qls[4] = '{4, 9, 12, 1};
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    check(phase == PH_IDLE && !busy, "idle after reset");
    foreach (qls[t]) begin
      passes_seen = 0; wr_seen = 0; rd_seen = 0; clear_seen = 0;
      qlen_now = qls[t]; rlen_now = 7 + t;
      @(negedge clk); query_len = qlen_now; ref_len = rlen_now; start = 1;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      wait (done);
      begin
        automatic int np = (qlen_now + NPE - 1) / NPE;
        check(passes_seen == np, $sformatf("query %0d: %0d passes", qlen_now, passes_seen));
        check(wr_seen == np - 1 && rd_seen == np - 1, "one write and read per boundary");
        check(clear_seen == 1, "results cleared once per job");
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
