// Daisy chain of NUM_PE processing elements.
//
// PE1 takes the column stream (reference base, column index and the upper
// boundary record) and each PE feeds the next; the last PE's output is the
// boundary record of the partition for that column. Query characters are
// shifted in at PE1 (q_load), so after NUM_PE shifts the character shifted
// in last sits in PE1. Every PE's best-of-row is brought out in parallel for
// the partition state bank. The chain of PEs follows the design description
// (50 PEs); the parallel best-of-row port is this design's choice.
//
// Timing: a column entering PE1 in cycle t (with en high) leaves the last PE
// after NUM_PE enabled cycles. en=0 freezes the whole chain.
module pe_array
  import dialign_pkg::*;
#(
  parameter int unsigned NUM_PE   = 50,
  parameter int signed   MATCH    = 2,
  parameter int signed   MISMATCH = -1,
  parameter int signed   GAP      = -1
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        pass_start,
  input  logic [31:0] row_base,
  input  logic        q_load,
  input  qchar_t      q_in,
  input  logic        in_valid,
  input  base_t       in_base,
  input  logic [31:0] in_col,
  input  rec_t        in_rec,
  output logic        out_valid,
  output base_t       out_base,
  output logic [31:0] out_col,
  output rec_t        out_rec,
  output pe_best_t    best [NUM_PE]
);

  qchar_t      q_c   [NUM_PE+1];
  logic        v_c   [NUM_PE+1];
  base_t       b_c   [NUM_PE+1];
  logic [31:0] col_c [NUM_PE+1];
  rec_t        rec_c [NUM_PE+1];

  assign q_c[0]   = q_in;
  assign v_c[0]   = in_valid;
  assign b_c[0]   = in_base;
  assign col_c[0] = in_col;
  assign rec_c[0] = in_rec;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    pe #(.MATCH(MATCH), .MISMATCH(MISMATCH), .GAP(GAP), .IDX(i + 1)) u_pe (
      .clk, .rst_n, .en, .pass_start, .row_base, .q_load,
      .q_in     (q_c[i]),
      .q_out    (q_c[i+1]),
      .in_valid (v_c[i]),
      .in_base  (b_c[i]),
      .in_col   (col_c[i]),
      .in_rec   (rec_c[i]),
      .out_valid(v_c[i+1]),
      .out_base (b_c[i+1]),
      .out_col  (col_c[i+1]),
      .out_rec  (rec_c[i+1]),
      .best     (best[i])
    );
  end

  assign out_valid = v_c[NUM_PE];
  assign out_base  = b_c[NUM_PE];
  assign out_col   = col_c[NUM_PE];
  assign out_rec   = rec_c[NUM_PE];

endmodule
