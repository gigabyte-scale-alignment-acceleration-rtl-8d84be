// Partitioned systolic alignment accelerator, top level.
//
// A chain of NUM_PE processing elements scores a query against a reference
// that is streamed through the chain one character per cycle. Queries
// longer than the chain are cut into segments of NUM_PE characters and
// processed in passes; for every reference column the last PE emits a
// 28-byte boundary record, which is written to an SSD through the STORE
// FIFO and HBA WRITE FIFO and read back through the HBA READ FIFO and LOAD
// FIFO as the upper boundary of the next pass. The reference is streamed
// again on every pass. After each pass the partition state bank keeps every
// PE's best cell; on the last pass the DARM tracks the overall best cell.
//
// Blocks: sirc_stream (merges the two Ethernet controller cores' input
// buffers and routes them to the loaders), query_loader, ref_loader,
// pe_array, store_fifo, load_fifo, two sync_fifo HBA FIFOs, hba_mux (one or
// two SATA adapters), control_unit, psb, darm, result_out (sends the
// result as a 20-byte packet when done rises) and ec_arbiter (shares the
// MAC transmit path between the two controller cores). The Ethernet MAC and
// controller cores, the SATA controllers and drives are outside; their
// signals are ports. The partitioning, record size, FIFO organisation and
// chain length follow the design description; the interfaces are this
// design's own.
//
// Use: set query_len, ref_len and dual, pulse start. Watch phase: in
// PH_QUERY send the pass's query segment (pass_idx*NUM_PE onwards, at most
// NUM_PE bytes), in PH_REF send the whole reference, both as byte streams
// alternating CHUNK bytes between ec_*[0] and ec_*[1]. done rises when the
// result (darm_* and the psb read ports) is final.
//
// Timing: one reference column per cycle while the write path keeps up; the
// chain stalls when the STORE FIFO is full and inserts bubbles when the
// stream or the LOAD FIFO runs dry.
module dialign_top
  import dialign_pkg::*;
#(
  parameter int unsigned NUM_PE      = 50,
  parameter int signed   MATCH       = 2,
  parameter int signed   MISMATCH    = -1,
  parameter int signed   GAP         = -1,
  parameter int unsigned STORE_DEPTH = 64,
  parameter int unsigned LOAD_DEPTH  = 64,
  parameter int unsigned HBA_DEPTH   = 512,
  parameter int unsigned MAX_PART    = 4,
  parameter int unsigned CHUNK       = 1024
)(
  input  logic        clk,
  input  logic        rst_n,
  // job parameters and status
  input  logic        start,
  input  logic [31:0] query_len,
  input  logic [31:0] ref_len,
  input  logic        dual,
  output phase_e      phase,
  output logic [31:0] pass_idx,
  output logic        busy,
  output logic        done,
  // input buffers of the two Ethernet controller cores
  input  logic        ec_valid [2],
  input  base_t       ec_data  [2],
  output logic        ec_ready [2],
  // transmit paths of the two controller cores and the MAC
  input  logic        tx_valid [2],
  input  base_t       tx_data  [2],
  input  logic        tx_last  [2],
  output logic        tx_ready [2],
  output logic        mac_valid,
  output base_t       mac_data,
  output logic        mac_last,
  input  logic        mac_ready,
  // SATA host bus adapters
  output hba_req_t    hba_req [2],
  input  hba_rsp_t    hba_rsp [2],
  // results
  output score_t      darm_score,
  output logic [31:0] darm_pos_row,
  output logic [31:0] darm_pos_col,
  output logic [31:0] darm_final_row,
  output logic [31:0] darm_final_col,
  input  logic [$clog2(NUM_PE*MAX_PART)-1:0] psb_rd_addr,
  output psb_entry_t  psb_rd_data,
  input  logic [$clog2(MAX_PART+1)-1:0]      psb_part_idx,
  output psb_entry_t  psb_part_best,
  output psb_entry_t  psb_stitched,
  // result packet towards a controller core's output buffer
  output logic        res_valid,
  output base_t       res_data,
  output logic        res_last,
  input  logic        res_ready,
  // activity, for monitoring
  output logic        arr_en,
  output logic        term_fire
);

  // sequencer
  logic stream_sync, route_ref, ql_start, ql_done, pass_start, rl_start;
  logic first_pass, last_pass, job_clear, psb_capture, psb_done, psb_busy;
  logic [31:0] ql_seg_len, row_base;
  logic wr_cmd, rd_cmd, pass_par, wpath_idle;
  logic [ADDR_W-1:0] wr_addr, wr_len, rd_addr, rd_len;

  // streams
  logic  sq_valid, sq_ready, sr_valid, sr_ready;
  base_t sq_data, sr_data;

  // chain
  logic        q_load, ql_busy;
  qchar_t      q_in;
  logic        c_valid, o_valid, rl_done;
  base_t       c_base, o_base;
  logic [31:0] c_col, o_col;
  rec_t        c_rec, o_rec;
  pe_best_t    pe_best [NUM_PE];

  // record paths
  logic             st_in_ready, st_valid, st_ready, st_idle;
  logic [HBA_W-1:0] st_data;
  logic             wf_valid, wf_ready;
  logic [HBA_W-1:0] wf_data;
  logic [$clog2(HBA_DEPTH+1)-1:0] wf_count, rf_count;
  logic             hr_valid, hr_ready, rf_valid, rf_ready, mux_wr_idle;
  logic [HBA_W-1:0] hr_data, rf_data;
  logic             ld_valid, ld_ready;
  rec_t             ld_rec;

  control_unit #(.NUM_PE(NUM_PE)) u_ctrl (
    .clk, .rst_n, .start, .query_len, .ref_len,
    .phase, .pass_idx, .busy, .done,
    .stream_sync, .route_ref,
    .ql_start, .ql_seg_len, .ql_done,
    .pass_start, .row_base, .rl_start, .first_pass, .last_pass, .term_fire,
    .job_clear, .psb_capture, .psb_done,
    .wr_cmd, .wr_addr, .wr_len, .rd_cmd, .rd_addr, .rd_len, .pass_par,
    .wpath_idle
  );

  sirc_stream #(.CHUNK(CHUNK)) u_stream (
    .clk, .rst_n, .sync(stream_sync), .route_ref,
    .ec_valid, .ec_data, .ec_ready,
    .q_valid(sq_valid), .q_data(sq_data), .q_ready(sq_ready),
    .r_valid(sr_valid), .r_data(sr_data), .r_ready(sr_ready)
  );

  query_loader #(.NUM_PE(NUM_PE)) u_qload (
    .clk, .rst_n, .start(ql_start), .seg_len(ql_seg_len),
    .s_valid(sq_valid), .s_data(sq_data), .s_ready(sq_ready),
    .q_load, .q_out(q_in), .busy(ql_busy), .done(ql_done)
  );

  // The chain advances unless a record bound for the SSD has no room.
  assign arr_en    = last_pass || st_in_ready;
  assign term_fire = (phase == PH_REF) && arr_en && o_valid;

  ref_loader u_rload (
    .clk, .rst_n, .start(rl_start), .first_pass, .ref_len, .en(arr_en),
    .s_valid(sr_valid), .s_data(sr_data), .s_ready(sr_ready),
    .l_valid(ld_valid), .l_rec(ld_rec), .l_ready(ld_ready),
    .out_valid(c_valid), .out_base(c_base), .out_col(c_col), .out_rec(c_rec),
    .done(rl_done)
  );

  pe_array #(.NUM_PE(NUM_PE), .MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP)) u_array (
    .clk, .rst_n, .en(arr_en), .pass_start, .row_base, .q_load, .q_in,
    .in_valid(c_valid), .in_base(c_base), .in_col(c_col), .in_rec(c_rec),
    .out_valid(o_valid), .out_base(o_base), .out_col(o_col), .out_rec(o_rec),
    .best(pe_best)
  );

  store_fifo #(.DEPTH(STORE_DEPTH)) u_store (
    .clk, .rst_n,
    .in_valid(term_fire && !last_pass), .in_rec(o_rec), .in_ready(st_in_ready),
    .out_valid(st_valid), .out_data(st_data), .out_ready(st_ready),
    .idle(st_idle)
  );

  sync_fifo #(.WIDTH(HBA_W), .DEPTH(HBA_DEPTH)) u_hba_wfifo (
    .clk, .rst_n,
    .w_valid(st_valid), .w_data(st_data), .w_ready(st_ready),
    .r_valid(wf_valid), .r_data(wf_data), .r_ready(wf_ready),
    .count(wf_count)
  );

  hba_mux u_mux (
    .dual, .pass_par,
    .wr_cmd, .wr_addr, .wr_len,
    .w_valid(wf_valid), .w_data(wf_data), .w_ready(wf_ready), .wr_idle(mux_wr_idle),
    .rd_cmd, .rd_addr, .rd_len,
    .r_valid(hr_valid), .r_data(hr_data), .r_ready(hr_ready),
    .req(hba_req), .rsp(hba_rsp)
  );

  assign wpath_idle = st_idle && (wf_count == 0) && mux_wr_idle;

  sync_fifo #(.WIDTH(HBA_W), .DEPTH(HBA_DEPTH)) u_hba_rfifo (
    .clk, .rst_n,
    .w_valid(hr_valid), .w_data(hr_data), .w_ready(hr_ready),
    .r_valid(rf_valid), .r_data(rf_data), .r_ready(rf_ready),
    .count(rf_count)
  );

  load_fifo #(.DEPTH(LOAD_DEPTH)) u_load (
    .clk, .rst_n,
    .in_valid(rf_valid), .in_data(rf_data), .in_ready(rf_ready),
    .out_valid(ld_valid), .out_rec(ld_rec), .out_ready(ld_ready)
  );

  psb #(.NUM_PE(NUM_PE), .MAX_PART(MAX_PART)) u_psb (
    .clk, .rst_n, .clear(job_clear), .capture(psb_capture), .pass_idx,
    .best(pe_best), .busy(psb_busy), .done(psb_done),
    .rd_addr(psb_rd_addr), .rd_data(psb_rd_data),
    .part_idx(psb_part_idx), .part_best(psb_part_best), .stitched(psb_stitched)
  );

  darm u_darm (
    .clk, .rst_n, .clear(job_clear),
    .in_valid(term_fire && last_pass), .in_col(o_col), .in_rec(o_rec),
    .score(darm_score), .pos_row(darm_pos_row), .pos_col(darm_pos_col),
    .final_row(darm_final_row), .final_col(darm_final_col)
  );

  result_out u_result (
    .clk, .rst_n, .done,
    .score(darm_score), .pos_row(darm_pos_row), .pos_col(darm_pos_col),
    .final_row(darm_final_row), .final_col(darm_final_col),
    .valid(res_valid), .data(res_data), .last(res_last), .ready(res_ready)
  );

  ec_arbiter u_arb (
    .clk, .rst_n, .tx_valid, .tx_data, .tx_last, .tx_ready,
    .mac_valid, .mac_data, .mac_last, .mac_ready
  );

endmodule
