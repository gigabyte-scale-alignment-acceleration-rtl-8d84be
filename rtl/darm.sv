// Best-alignment tracker at the end of the PE chain.
//
// During the final partition pass every record leaving the last PE carries
// the best cell of its column over all query rows. This block keeps the
// best of those over all columns and reports its score, the start cell of
// its path (position) and its end cell (final_row, final_col). The output
// names follow the design description; the meaning of position and the
// tie rule (the earliest column wins) are this design's choice.
//
// Timing: one record per cycle; outputs are registered and valid one cycle
// after the last record. clear resets the result to score 0.
module darm
  import dialign_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [31:0] in_col,
  input  rec_t        in_rec,
  output score_t      score,
  output logic [31:0] pos_row,
  output logic [31:0] pos_col,
  output logic [31:0] final_row,
  output logic [31:0] final_col
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      score     <= '0;
      pos_row   <= '0;
      pos_col   <= '0;
      final_row <= '0;
      final_col <= '0;
    end else if (in_valid && in_rec.best > score) begin
      score     <= in_rec.best;
      pos_row   <= in_rec.best_srow;
      pos_col   <= in_rec.best_scol;
      final_row <= in_rec.best_row;
      final_col <= in_col;
    end
  end

endmodule
