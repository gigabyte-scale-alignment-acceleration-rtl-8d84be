// One processing element of the systolic alignment chain.
//
// The PE holds one query character (row i of the score matrix). Reference
// characters arrive one per column, together with the record produced for
// the same column by the PE above (row i-1). The PE computes the local
// alignment score
//   H(i,j) = max(0, H(i-1,j-1)+s(q_i,r_j), H(i-1,j)+GAP, H(i,j-1)+GAP)
// where s is MATCH for equal characters and MISMATCH otherwise, and passes
// the updated record to the next PE one cycle later. Because PE i sees
// column j one cycle after PE i-1, the chain evaluates one anti-diagonal of
// the matrix per cycle. Alongside the score the PE carries the start cell of
// each path and the best cell of the column, and it keeps the best cell of
// its own row for the partition state bank.
//
// The chain structure, the passing of score, position and base between PEs
// and the score values 2 (match) and -1 (mismatch) follow the design
// description; the gap value -1, the start-cell bookkeeping, the tie rules
// (diagonal, then up, then left) and the empty-slot pass-through are this
// design's own choices.
//
// Timing: everything is registered; with en=1 a valid input appears at the
// outputs on the next cycle. With en=0 the PE holds all state (global stall).
// pass_start clears the left neighbour, the diagonal and the row best.
// Query characters shift through q_in/q_out when q_load is high.
module pe
  import dialign_pkg::*;
#(
  parameter int signed MATCH    = 2,
  parameter int signed MISMATCH = -1,
  parameter int signed GAP      = -1,
  parameter int unsigned IDX    = 1     // position in the chain, 1 = first
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        pass_start,
  input  logic [31:0] row_base,
  // query shift chain
  input  logic        q_load,
  input  qchar_t      q_in,
  output qchar_t      q_out,
  // column stream from the PE above
  input  logic        in_valid,
  input  base_t       in_base,
  input  logic [31:0] in_col,
  input  rec_t        in_rec,
  // column stream to the PE below
  output logic        out_valid,
  output base_t       out_base,
  output logic [31:0] out_col,
  output rec_t        out_rec,
  // best cell of this row in the current pass
  output pe_best_t    best
);

  qchar_t      q;
  score_t      diag_h, left_h;
  logic [31:0] diag_sr, diag_sc, left_sr, left_sc;

  logic [31:0] row;
  assign row = row_base + IDX;

  // cell computation
  score_t      s, c_d, c_u, c_l, h;
  logic [31:0] h_sr, h_sc;
  rec_t        nrec;

  always_comb begin
    s   = (q.base == in_base) ? score_t'(MATCH) : score_t'(MISMATCH);
    c_d = diag_h + s;
    c_u = in_rec.h + score_t'(GAP);
    c_l = left_h + score_t'(GAP);
    h    = '0;
    h_sr = row;
    h_sc = in_col;
    if (c_d > 0 && c_d >= c_u && c_d >= c_l) begin
      h = c_d;
      if (diag_h != 0) begin
        h_sr = diag_sr;
        h_sc = diag_sc;
      end
    end else if (c_u > 0 && c_u >= c_l) begin
      h    = c_u;
      h_sr = in_rec.h_srow;
      h_sc = in_rec.h_scol;
    end else if (c_l > 0) begin
      h    = c_l;
      h_sr = left_sr;
      h_sc = left_sc;
    end
    nrec = in_rec;
    if (q.valid) begin
      nrec.h      = h;
      nrec.h_srow = h_sr;
      nrec.h_scol = h_sc;
      if (h > in_rec.best) begin
        nrec.best      = h;
        nrec.best_row  = row;
        nrec.best_srow = h_sr;
        nrec.best_scol = h_sc;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q         <= '0;
      diag_h    <= '0;
      diag_sr   <= '0;
      diag_sc   <= '0;
      left_h    <= '0;
      left_sr   <= '0;
      left_sc   <= '0;
      out_valid <= 1'b0;
      out_base  <= '0;
      out_col   <= '0;
      out_rec   <= '0;
      best      <= '0;
    end else begin
      if (q_load) q <= q_in;
      if (pass_start) begin
        diag_h    <= '0;
        diag_sr   <= '0;
        diag_sc   <= '0;
        left_h    <= '0;
        left_sr   <= '0;
        left_sc   <= '0;
        best      <= '0;
        out_valid <= 1'b0;
      end else if (en) begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_base <= in_base;
          out_col  <= in_col;
          out_rec  <= nrec;
          diag_h   <= in_rec.h;
          diag_sr  <= in_rec.h_srow;
          diag_sc  <= in_rec.h_scol;
          left_h   <= h;
          left_sr  <= h_sr;
          left_sc  <= h_sc;
          if (q.valid && h > best.score) begin
            best.score <= h;
            best.col   <= in_col;
            best.srow  <= h_sr;
            best.scol  <= h_sc;
          end
        end
      end
    end
  end

  assign q_out = q;

endmodule
