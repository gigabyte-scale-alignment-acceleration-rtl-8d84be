// Test of the HBA multiplexer: for single mode and both pass parities of
// dual mode, random requests must reach exactly the expected adapter (the
// other adapter sees an all-zero request) and the handshakes and read data
// must come back from the adapter that serves each direction.
`timescale 1ns/1ps
module tb_hba_mux;
  import dialign_pkg::*;
  logic dual = 0, pass_par = 0;
  logic wr_cmd, rd_cmd, w_valid, w_ready, wr_idle, r_valid, r_ready;
  logic [ADDR_W-1:0] wr_addr, wr_len, rd_addr, rd_len;
  logic [HBA_W-1:0] w_data, r_data;
  hba_req_t req [2];
  hba_rsp_t rsp [2];
  hba_mux dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int t = 0; t < 300; t++) begin
      int ws, rs;
      dual = t[0]; pass_par = t[1];
      wr_cmd = $urandom; rd_cmd = $urandom; w_valid = 1; r_ready = 1;
      wr_addr = {$urandom, $urandom}; wr_len = {$urandom, $urandom};
      rd_addr = {$urandom, $urandom}; rd_len = {$urandom, $urandom};
      w_data = $urandom;
      for (int k = 0; k < 2; k++) rsp[k] = {1'($urandom), 1'($urandom), 1'($urandom), 16'($urandom)};
      #1;
      ws = dual ? pass_par : 0;
      rs = dual ? !pass_par : 0;
      check(req[ws].wr_cmd == wr_cmd && req[ws].wr_addr == wr_addr && req[ws].wr_len == wr_len &&
            req[ws].wr_valid && req[ws].wr_data == w_data, "write request routed");
      check(req[rs].rd_cmd == rd_cmd && req[rs].rd_addr == rd_addr && req[rs].rd_len == rd_len &&
            req[rs].rd_ready, "read request routed");
      if (dual) begin
        check(!req[rs].wr_valid && !req[rs].wr_cmd, "no write to the read drive");
        check(!req[ws].rd_ready && !req[ws].rd_cmd, "no read from the write drive");
      end else begin
        check(req[1] == '0, "second adapter unused in single mode");
      end
      check(w_ready == rsp[ws].wr_ready && wr_idle == rsp[ws].wr_idle, "write response");
      check(r_valid == rsp[rs].rd_valid && r_data == rsp[rs].rd_data, "read response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
