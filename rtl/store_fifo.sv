// STORE FIFO block: boundary records from the last PE to the HBA WRITE FIFO.
//
// Incoming 224-bit records are buffered in seven parallel 32-bit lanes (one
// record per entry, DEPTH entries). The serialiser takes the oldest record
// and sends it as fourteen 16-bit words: word 0 of the record first, and of
// each 32-bit word the low half first. The 7 x 32 = 14 x 16 organisation
// follows the design description; depth and word order are this design's
// choice.
//
// Timing: one record accepted per cycle while in_ready is high; the output
// sends one 16-bit word per cycle while out_ready is high, so a steady
// stream needs 14 output cycles per record. idle is high when no record is
// buffered or being sent.
module store_fifo
  import dialign_pkg::*;
#(
  parameter int unsigned DEPTH = 64
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  rec_t             in_rec,
  output logic             in_ready,
  output logic             out_valid,
  output logic [HBA_W-1:0] out_data,
  input  logic             out_ready,
  output logic             idle
);

  localparam int unsigned HW = $clog2(REC_HALFS);

  logic [WORD_W-1:0] lane_q [REC_WORDS];   // head of each 32-bit lane
  logic              lane_valid [REC_WORDS];
  logic [$clog2(DEPTH+1)-1:0] cnt [REC_WORDS];
  logic              pop;
  logic [HW-1:0]     half;
  logic [REC_W-1:0]  in_bits;

  assign in_bits = in_rec;

  // Seven 32-bit lanes; all are written and read together.
  for (genvar w = 0; w < REC_WORDS; w++) begin : g_lane
    logic unused_ready;
    sync_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_lane (
      .clk, .rst_n,
      .w_valid (in_valid && in_ready),
      // word 0 is the most significant word of the packed record (h)
      .w_data  (in_bits[REC_W-1-w*WORD_W -: WORD_W]),
      .w_ready (unused_ready),
      .r_valid (lane_valid[w]),
      .r_data  (lane_q[w]),
      .r_ready (pop),
      .count   (cnt[w])
    );
  end

  assign in_ready  = (cnt[0] != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = lane_valid[0];
  logic [2:0] wsel;
  assign wsel      = half[HW-1:1];
  assign out_data  = half[0] ? lane_q[wsel][31:16] : lane_q[wsel][15:0];
  assign pop       = out_valid && out_ready && (half == HW'(REC_HALFS - 1));
  assign idle      = !lane_valid[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half <= '0;
    end else if (out_valid && out_ready) begin
      half <= (half == HW'(REC_HALFS - 1)) ? '0 : half + 1'b1;
    end
  end

endmodule
