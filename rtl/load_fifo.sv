// LOAD FIFO block: 16-bit words from the HBA READ FIFO back into records.
//
// Fourteen consecutive 16-bit words are collected into seven 32-bit
// registers (word 0 first, low half first, the order store_fifo sends) and
// the finished record is pushed into seven parallel 32-bit lane FIFOs of
// DEPTH entries each. The reference loader pops one record per column. The 14 x 16 = 7 x 32 organisation
// follows the design description; depth and word order are this design's
// choice.
//
// Timing: one 16-bit word accepted per cycle; a record is readable from
// the second clock edge after its fourteenth word is accepted. in_ready
// drops only while the record buffer is full and the assembly registers
// hold a finished record.
module load_fifo
  import dialign_pkg::*;
#(
  parameter int unsigned DEPTH = 64
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [HBA_W-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output rec_t             out_rec,
  input  logic             out_ready
);

  localparam int unsigned HW = $clog2(REC_HALFS);

  logic [HBA_W-1:0] halves [REC_HALFS];
  logic [HW-1:0]    half;
  logic             full_rec;       // assembly registers hold a record
  logic             push, buf_ready;
  logic [REC_W-1:0] asm_bits;

  always_comb begin
    for (int w = 0; w < REC_WORDS; w++)
      asm_bits[REC_W-1-w*WORD_W -: WORD_W] = {halves[2*w+1], halves[2*w]};
  end

  assign push     = full_rec && buf_ready;
  assign in_ready = !full_rec || buf_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      half     <= '0;
      full_rec <= 1'b0;
    end else begin
      if (push) full_rec <= 1'b0;
      if (in_valid && in_ready) begin
        halves[half] <= in_data;
        if (half == HW'(REC_HALFS - 1)) begin
          half     <= '0;
          full_rec <= 1'b1;
        end else begin
          half <= half + 1'b1;
        end
      end
    end
  end

  // Seven 32-bit lanes; all are written and read together.
  logic [REC_W-1:0] out_bits;
  logic             lane_valid [REC_WORDS];
  logic             lane_ready [REC_WORDS];
  logic [$clog2(DEPTH+1)-1:0] lane_cnt [REC_WORDS];

  for (genvar w = 0; w < REC_WORDS; w++) begin : g_lane
    sync_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_lane (
      .clk, .rst_n,
      .w_valid (push),
      .w_data  (asm_bits[REC_W-1-w*WORD_W -: WORD_W]),
      .w_ready (lane_ready[w]),
      .r_valid (lane_valid[w]),
      .r_data  (out_bits[REC_W-1-w*WORD_W -: WORD_W]),
      .r_ready (out_ready),
      .count   (lane_cnt[w])
    );
  end

  assign buf_ready = lane_ready[0];
  assign out_valid = lane_valid[0];
  assign out_rec   = rec_t'(out_bits);

endmodule
