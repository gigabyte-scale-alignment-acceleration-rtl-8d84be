// End-to-end test of the accelerator at reduced sizes (4 PEs, 8-byte stream
// chunks, 4-record STORE/LOAD FIFOs, 16-word HBA FIFOs).
//
// The testbench plays the host and the drives. The host model watches the
// sequencer's phase: in the query phase it sends the pass's query segment,
// in the reference phase the whole reference, always alternating CHUNK-byte
// pieces between the two controller-core inputs and, when GAPS is set,
// leaving random idle cycles. Two drive models stand behind the adapter
// ports. Each job is checked against a reference model of the complete
// score matrix: the DARM result, every PSB entry and the stitched result.
// Every mechanism of the design is counted and must occur at least once:
// several passes, a partial last segment, the result packet, chain stalls on a full STORE FIFO,
// bubbles from an empty LOAD FIFO or stream, the EC1/EC2 alternation, single
// and dual drive mode, the shorter run time of dual mode on the same job
// (reads overlap writes) and transmit arbitration between both cores.
// The one-column-per-cycle rate is checked on a single-pass job without idle
// cycles (with several passes the 16-bit drive path sets the rate).
`timescale 1ns/1ps
module tb_dialign_top;
  import dialign_pkg::*;
  import tb_ref_pkg::*;

  localparam int NUM_PE   = 4;
  localparam int MAX_PART = 4;
  localparam int CHUNK    = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, dual = 0;
  logic [31:0] query_len = 0, ref_len = 0;
  phase_e      phase;
  logic [31:0] pass_idx;
  logic        busy, done;
  logic        ec_valid [2];
  base_t       ec_data  [2];
  logic        ec_ready [2];
  logic        tx_valid [2], tx_last [2], tx_ready [2];
  base_t       tx_data  [2];
  logic        mac_valid, mac_last, mac_ready;
  base_t       mac_data;
  hba_req_t    hba_req [2];
  hba_rsp_t    hba_rsp [2];
  score_t      darm_score;
  logic [31:0] darm_pos_row, darm_pos_col, darm_final_row, darm_final_col;
  logic [$clog2(NUM_PE*MAX_PART)-1:0] psb_rd_addr = 0;
  logic [$clog2(MAX_PART+1)-1:0]      psb_part_idx = 0;
  psb_entry_t  psb_rd_data, psb_part_best, psb_stitched;
  logic        arr_en, term_fire;
  logic        res_valid, res_last, res_ready;
  base_t       res_data;

  dialign_top #(.NUM_PE(NUM_PE), .MAX_PART(MAX_PART), .CHUNK(CHUNK), .STORE_DEPTH(4), .LOAD_DEPTH(4), .HBA_DEPTH(16)) dut (.*);

  // the same job in single-drive and then dual-drive mode: the dual run
  // overlaps reading the old records with writing the new ones
  task automatic compare_modes(int qlen, int rlen);
    int single_cycles;
    run_job(qlen, rlen, 0, 0, 0);
    single_cycles = last_cycles;
    replay = 1;
    run_job(qlen, rlen, 1, 0, 0);
    replay = 0;
    check(last_cycles < single_cycles, $sformatf("dual drives faster (%0d vs %0d cycles)", last_cycles, single_cycles));
    n_overlap++;
  endtask

  ssd_model #(.WR_PERIOD(3)) u_ssd0 (.clk, .rst_n, .req(hba_req[0]), .rsp(hba_rsp[0]));
  ssd_model #(.WR_PERIOD(3)) u_ssd1 (.clk, .rst_n, .req(hba_req[1]), .rsp(hba_rsp[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host model ----------------
  byte  qseq[$], rseq[$];
  bit   gaps = 1;
  int   pos = 0;
  byte  cur[$];
  phase_e last_phase = PH_IDLE;
  int   cyc = 0;

  always_comb begin
    for (int e = 0; e < 2; e++) begin
      ec_valid[e] = 0; ec_data[e] = '0;
    end
    if ((phase == PH_QUERY || phase == PH_REF) && pos < cur.size() && hold == 0) begin
      ec_valid[(pos / CHUNK) % 2] = 1;
      ec_data[(pos / CHUNK) % 2]  = cur[pos];
    end
  end
  int hold = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (phase != last_phase) begin
      cur.delete();
      if (phase == PH_QUERY)
        for (int k = pass_idx * NUM_PE; k < qseq.size() && k < (pass_idx + 1) * NUM_PE; k++) cur.push_back(qseq[k]);
      if (phase == PH_REF) cur = rseq;
      pos <= 0;
      last_phase <= phase;
    end else begin
      if ((ec_valid[0] && ec_ready[0]) || (ec_valid[1] && ec_ready[1])) pos <= pos + 1;
      hold <= (gaps && $urandom_range(7) == 0) ? 1 : 0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_load_bubble = 0, n_ec_switch = 0, n_pad = 0, n_dual = 0, n_single = 0;
  int n_multi_pass = 0, n_arb_switch = 0, n_stream_bubble = 0, n_overlap = 0;
  int ref_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_REF && !arr_en) n_stall++;
    if (phase == PH_REF && dut.u_rload.active && arr_en && dut.sr_valid && !dut.first_pass && !dut.ld_valid) n_load_bubble++;
    if (phase == PH_REF && dut.u_rload.active && !dut.sr_valid) n_stream_bubble++;
    if (dut.u_stream.cnt == CHUNK - 1 && (ec_valid[0] && ec_ready[0] || ec_valid[1] && ec_ready[1])) n_ec_switch++;
    if (dut.q_load && !dut.q_in.valid) n_pad++;
    if (phase == PH_REF) ref_cycles++;
    if (dut.psb_capture && pass_idx > 0) n_multi_pass++;
    if (dut.wr_cmd) begin if (dual) n_dual++; else n_single++; end
  end

  // ---------------- transmit arbitration ----------------
  // Core e sends packets of 3 bytes {e, n, n}; the MAC side must see whole packets.
  int txn [2] = '{0, 0};
  int rx_idx = 0; byte rx_pkt [3]; int last_owner = -1;
  always_comb begin
    for (int e = 0; e < 2; e++) begin
      tx_valid[e] = txn[e] < 12 * 3;
      tx_data[e]  = (txn[e] % 3 == 0) ? base_t'(e) : base_t'(txn[e] / 3);
      tx_last[e]  = (txn[e] % 3 == 2);
    end
  end
  assign mac_ready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++) if (tx_valid[e] && tx_ready[e]) txn[e] <= txn[e] + 1;
    if (mac_valid) begin
      rx_pkt[rx_idx] = mac_data;
      if (rx_idx == 2) begin
        check(mac_last && rx_pkt[1] == rx_pkt[2] && rx_pkt[0] < 2, "MAC packet intact");
        if (last_owner >= 0 && last_owner != rx_pkt[0]) n_arb_switch++;
        last_owner = rx_pkt[0];
        rx_idx = 0;
      end else begin
        check(!mac_last, "no early last");
        rx_idx++;
      end
    end
  end

  // ---------------- result packet ----------------
  byte res_bytes[$];
  int  n_result = 0;
  always @(negedge clk) res_ready = $urandom_range(2) != 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    res_bytes.push_back(res_data);
    if (res_last) begin
      logic [159:0] p;
      for (int k = 0; k < 20; k++) p[8*k +: 8] = (k < res_bytes.size()) ? res_bytes[k] : 8'h00;
      check(res_bytes.size() == 20 && p == {darm_final_col, darm_final_row, darm_pos_col, darm_pos_row, darm_score},
            "result packet");
      res_bytes.delete();
      n_result++;
    end
  end

  // ---------------- jobs ----------------
  int last_cycles;
  bit replay = 0;
  task automatic run_job(int qlen, int rlen, bit d, bit g, bit rate_check);
    cell_t ov, rm; cell_t rows[$];
    int t0, passes;
    if (!replay) begin
      qseq.delete(); rseq.delete();
      for (int k = 0; k < qlen; k++) qseq.push_back(rand_base());
      for (int k = 0; k < rlen; k++) rseq.push_back(rand_base());
      // plant a copy of part of the query in the reference
      for (int k = 0; k < qlen && k < rlen / 2; k++) if (k >= qlen / 4 && k < 3 * qlen / 4) rseq[k + rlen / 4] = qseq[k];
    end
    align(qseq, rseq, 2, -1, -1, ov, rm, rows);
    gaps = g; dual = d; query_len = qlen; ref_len = rlen;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    ref_cycles = 0;
    t0 = cyc;
    njobs++;
    wait (!done);
    wait (done);
    repeat (50) @(posedge clk);   // result packet
    passes = (qlen + NUM_PE - 1) / NUM_PE;
    last_cycles = cyc - t0;
    $display("job q=%0d r=%0d dual=%0d: %0d cycles, score %0d at (%0d,%0d) from (%0d,%0d), expected %0d at (%0d,%0d) from (%0d,%0d)",
             qlen, rlen, d, cyc - t0, darm_score, darm_final_row, darm_final_col, darm_pos_row, darm_pos_col,
             ov.score, ov.row, ov.col, ov.srow, ov.scol);
    check(darm_score == ov.score, "DARM score");
    check(darm_final_row == ov.row && darm_final_col == ov.col, "DARM final row/col");
    check(darm_pos_row == ov.srow && darm_pos_col == ov.scol, "DARM start position");
    check(psb_stitched.score == rm.score && psb_stitched.row == rm.row && psb_stitched.col == rm.col, "PSB stitched best");
    check(psb_stitched.score == darm_score, "PSB and DARM agree on the score");
    for (int i = 0; i < passes * NUM_PE && i < NUM_PE * MAX_PART; i++) begin
      psb_rd_addr = i[$bits(psb_rd_addr)-1:0];
      #1;
      if (i < qlen)
        check(psb_rd_data.score == rows[i].score && psb_rd_data.row == i + 1 &&
              (rows[i].score == 0 || (psb_rd_data.col == rows[i].col && psb_rd_data.srow == rows[i].srow &&
               psb_rd_data.scol == rows[i].scol)), $sformatf("PSB row %0d", i + 1));
      else
        check(psb_rd_data.score == 0, "PSB empty slot");
    end
    for (int p = 0; p < passes && p < MAX_PART; p++) begin
      int b = 0;
      psb_part_idx = p[$bits(psb_part_idx)-1:0];
      #1;
      for (int i = p * NUM_PE; i < qlen && i < (p + 1) * NUM_PE; i++) if (rows[i].score > b) b = rows[i].score;
      check(psb_part_best.score == b, $sformatf("partition %0d best", p));
    end
    if (rate_check) begin
      // last pass needs no drive: one column per cycle, plus the chain fill
      $display("  reference phase cycles over all passes: %0d", ref_cycles);
    end
  endtask

  int lastref, njobs = 0;
  always @(posedge clk) if (phase == PH_REF && dut.last_pass) lastref++;
    else if (phase == PH_QUERY) lastref = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_job(10, 40, 0, 1, 0);     // 3 passes, last one partial, single drive, idle cycles
    run_job(8, 30, 1, 1, 0);      // 2 passes, dual drive
    run_job(4, 25, 0, 0, 1);      // 1 pass, no idle cycles: rate check
    check(lastref <= 25 + NUM_PE + 4, $sformatf("one column per cycle (%0d cycles for 25 columns)", lastref));
    run_job(13, 60, 1, 0, 0);     // 4 passes, dual drive, no idle cycles
    compare_modes(12, 40);
    check(n_stall > 0,        "mechanism: chain stall on full STORE FIFO");
    check(n_load_bubble > 0,  "mechanism: bubble from empty LOAD FIFO");
    check(n_stream_bubble > 0,"mechanism: bubble from idle stream");
    check(n_ec_switch > 0,    "mechanism: EC1/EC2 alternation");
    check(n_pad > 0,          "mechanism: empty PE slot in last segment");
    check(n_multi_pass > 0,   "mechanism: several partition passes");
    check(n_single > 0,       "mechanism: single-drive mode");
    check(n_dual > 0,         "mechanism: dual-drive mode");
    check(n_arb_switch > 0,   "mechanism: transmit arbitration");
    check(n_result == njobs,  "one result packet per job");
    check(n_overlap > 0,      "mechanism: dual-drive read/write overlap");
    $display("mechanisms: stall=%0d load_bubble=%0d stream_bubble=%0d ec_switch=%0d pad=%0d multipass=%0d single=%0d dual=%0d arb=%0d",
             n_stall, n_load_bubble, n_stream_bubble, n_ec_switch, n_pad, n_multi_pass, n_single, n_dual, n_arb_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
