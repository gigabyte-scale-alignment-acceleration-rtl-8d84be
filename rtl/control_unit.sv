// Partition pass sequencer (the control logic of the design).
//
// A query longer than the chain is processed in passes of NUM_PE rows. For
// each pass the sequencer
//   1. QUERY: has the query loader take the next segment (at most NUM_PE
//      characters) from the stream and shift it into the chain;
//   2. REF:   clears the chain state, starts the reference loader and waits
//      until the last PE has produced ref_len records. Unless this is the
//      last pass the records go to the SSD (write command to region
//      pass mod 2); unless it is the first pass the records of the previous
//      pass are read back (region (pass-1) mod 2) as the chain's upper
//      boundary. On the last pass the records go to the DARM instead;
//   3. PSB:   has the partition state bank copy every PE's best cell;
//   4. DRAIN: waits until the write path has put every word on the drive.
// The phase output tells the host what to send: one query segment in
// QUERY, the whole reference in REF. Time-multiplexing the chain over
// passes, re-streaming the reference on every pass and saving the
// intermediate records through the SSD follow the design description; the
// state sequence, the address map and the phase output are this design's.
//
// Timing: all outputs are registered; the command outputs are one-cycle
// pulses. Regions are ref_len*14 16-bit words long.
module control_unit
  import dialign_pkg::*;
#(
  parameter int unsigned NUM_PE = 50
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       query_len,
  input  logic [31:0]       ref_len,
  // status
  output phase_e            phase,
  output logic [31:0]       pass_idx,
  output logic              busy,
  output logic              done,
  // stream front end
  output logic              stream_sync,
  output logic              route_ref,
  // query loader
  output logic              ql_start,
  output logic [31:0]       ql_seg_len,
  input  logic              ql_done,
  // PE chain and reference loader
  output logic              pass_start,
  output logic [31:0]       row_base,
  output logic              rl_start,
  output logic              first_pass,
  output logic              last_pass,
  input  logic              term_fire,    // a record left the last PE
  // result blocks
  output logic              job_clear,
  output logic              psb_capture,
  input  logic              psb_done,
  // SSD commands
  output logic              wr_cmd,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [ADDR_W-1:0] wr_len,
  output logic              rd_cmd,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [ADDR_W-1:0] rd_len,
  output logic              pass_par,
  input  logic              wpath_idle
);

  logic [31:0]       remaining;    // query rows not yet processed
  logic [31:0]       outs;         // records produced in this pass
  logic [ADDR_W-1:0] region;

  assign busy      = (phase != PH_IDLE) && (phase != PH_DONE);
  assign done      = (phase == PH_DONE);
  assign route_ref = (phase == PH_REF);
  assign last_pass = (remaining <= NUM_PE);
  assign first_pass = (pass_idx == 0);
  assign pass_par  = pass_idx[0];
  assign row_base  = pass_idx * NUM_PE;
  assign region    = ADDR_W'(ref_len) * REC_HALFS;
  assign wr_len    = region;
  assign rd_len    = region;
  assign wr_addr   = pass_idx[0] ? region : '0;
  assign rd_addr   = pass_idx[0] ? '0 : region;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      pass_idx    <= '0;
      remaining   <= '0;
      outs        <= '0;
      stream_sync <= 1'b0;
      ql_start    <= 1'b0;
      ql_seg_len  <= '0;
      pass_start  <= 1'b0;
      rl_start    <= 1'b0;
      job_clear   <= 1'b0;
      psb_capture <= 1'b0;
      wr_cmd      <= 1'b0;
      rd_cmd      <= 1'b0;
    end else begin
      stream_sync <= 1'b0;
      ql_start    <= 1'b0;
      pass_start  <= 1'b0;
      rl_start    <= 1'b0;
      job_clear   <= 1'b0;
      psb_capture <= 1'b0;
      wr_cmd      <= 1'b0;
      rd_cmd      <= 1'b0;
      unique case (phase)
        PH_IDLE, PH_DONE: if (start && query_len != 0 && ref_len != 0) begin
          phase       <= PH_QUERY;
          pass_idx    <= '0;
          remaining   <= query_len;
          job_clear   <= 1'b1;
          stream_sync <= 1'b1;
          ql_start    <= 1'b1;
          ql_seg_len  <= (query_len > NUM_PE) ? NUM_PE : query_len;
        end
        PH_QUERY: if (ql_done) begin
          phase       <= PH_REF;
          outs        <= '0;
          stream_sync <= 1'b1;
          pass_start  <= 1'b1;
          rl_start    <= 1'b1;
          wr_cmd      <= !last_pass;
          rd_cmd      <= !first_pass;
        end
        PH_REF: if (term_fire) begin
          outs <= outs + 1;
          if (outs + 1 == ref_len) begin
            phase       <= PH_PSB;
            psb_capture <= 1'b1;
          end
        end
        PH_PSB: if (psb_done) phase <= PH_DRAIN;
        PH_DRAIN: if (last_pass) begin
          phase <= PH_DONE;
        end else if (wpath_idle) begin
          phase       <= PH_QUERY;
          pass_idx    <= pass_idx + 1;
          remaining   <= remaining - NUM_PE;
          stream_sync <= 1'b1;
          ql_start    <= 1'b1;
          ql_seg_len  <= (remaining - NUM_PE > NUM_PE) ? NUM_PE : remaining - NUM_PE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
