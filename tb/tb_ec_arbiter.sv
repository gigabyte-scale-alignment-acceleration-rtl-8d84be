// Test of the transmit arbiter: both cores send packets of random length
// with random gaps while the MAC applies random back-pressure. Every packet
// must arrive whole and in order per core, packets must never interleave,
// and when both cores wait the grant must alternate.
`timescale 1ns/1ps
module tb_ec_arbiter;
  import dialign_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic tx_valid [2], tx_last [2], tx_ready [2];
  base_t tx_data [2];
  logic mac_valid, mac_last, mac_ready = 0;
  base_t mac_data;
  ec_arbiter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // packet bytes: {core, seq[6:0]} so the owner is visible in every byte
  int plen [2][$];
  int sent [2] = '{0, 0}, idx [2] = '{0, 0}, rx [2] = '{0, 0};
  int cur = -1, prev_owner = -1, alternations = 0;
  always @(negedge clk) begin
    for (int e = 0; e < 2; e++) begin
      if (plen[e].size() > 0 && (idx[e] > 0 || $urandom_range(3) != 0)) begin
        tx_valid[e] = 1;
        tx_data[e]  = {e[0], 7'(sent[e])};
        tx_last[e]  = (idx[e] == plen[e][0] - 1);
      end else begin
        tx_valid[e] = 0; tx_data[e] = '0; tx_last[e] = 0;
      end
    end
    mac_ready = $urandom_range(4) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++) if (tx_valid[e] && tx_ready[e]) begin
      sent[e]++;
      if (tx_last[e]) begin idx[e] = 0; void'(plen[e].pop_front()); end else idx[e]++;
    end
    if (mac_valid && mac_ready) begin
      automatic int owner = mac_data[7];
      if (cur < 0) begin
        if (prev_owner >= 0 && tx_valid[0] && tx_valid[1]) begin
          check(owner != prev_owner, "alternate when both wait");
          alternations++;
        end
        cur = owner;
      end
      check(owner == cur, "no interleaving");
      check(mac_data[6:0] == 7'(rx[owner]), "bytes in order");
      rx[owner]++;
      if (mac_last) begin prev_owner = cur; cur = -1; end
    end
  end
  initial begin
    for (int e = 0; e < 2; e++) for (int p = 0; p < 40; p++) plen[e].push_back($urandom_range(1, 6));
    repeat (3) @(posedge clk); rst_n <= 1;
    while (plen[0].size() > 0 || plen[1].size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(rx[0] == sent[0] && rx[1] == sent[1] && sent[0] > 0, "all bytes delivered");
    check(alternations > 0, "contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
