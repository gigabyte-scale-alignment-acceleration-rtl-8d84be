// Test of the stream front end: a byte sequence is split into CHUNK-byte
// pieces placed alternately in the two controller-core buffers (each with
// random gaps); the merged output must rebuild the sequence, appear only on
// the routed side, and restart at EC1 after sync. Downstream back-pressure
// is random.
`timescale 1ns/1ps
module tb_sirc_stream;
  import dialign_pkg::*;
  localparam int CH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic sync = 0, route_ref = 0;
  logic ec_valid [2], ec_ready [2];
  base_t ec_data [2];
  logic q_valid, q_ready = 0, r_valid, r_ready = 0;
  base_t q_data, r_data;
  sirc_stream #(.CHUNK(CH)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  byte src [2][$];
  byte seq[$];
  int got = 0;
  always @(negedge clk) begin
    for (int e = 0; e < 2; e++) begin
      ec_valid[e] = src[e].size() > 0 && $urandom_range(3) != 0;
      ec_data[e]  = src[e].size() > 0 ? src[e][0] : 8'h00;
    end
    q_ready = $urandom_range(3) != 0;
    r_ready = $urandom_range(3) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++) if (ec_valid[e] && ec_ready[e]) void'(src[e].pop_front());
    if (route_ref) check(!q_valid, "nothing on the query side");
    else           check(!r_valid, "nothing on the reference side");
    if ((q_valid && q_ready && !route_ref) || (r_valid && r_ready && route_ref)) begin
      check((route_ref ? r_data : q_data) == seq[got], $sformatf("byte %0d", got));
      got++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int run = 0; run < 4; run++) begin
      int n = 9 + 7 * run;
      @(negedge clk);
      sync = 1; route_ref = run[0];
      seq.delete(); got = 0;
      for (int k = 0; k < n; k++) begin
        seq.push_back(byte'($urandom));
        src[(k / CH) % 2].push_back(seq[k]);
      end
      @(negedge clk); sync = 0;
      while (got < n) @(negedge clk);
      repeat (5) @(negedge clk);
      check(got == n && src[0].size() == 0 && src[1].size() == 0, $sformatf("run %0d complete", run));
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
