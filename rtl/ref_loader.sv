// Reference loader: forms the column stream into PE1.
//
// After start it delivers ref_len columns. Each column joins the next
// reference base from the byte stream with its 1-based column index and the
// upper boundary record: on the first pass a zero record (row 0 of the
// matrix), on later passes the record of the previous pass from the LOAD
// FIFO. A column is issued only in a cycle where the array advances (en) and
// every source has data; otherwise a bubble (out_valid=0) enters the chain.
// The loader's role follows the design description; the join and stall
// rules are this design's own.
//
// Timing: combinational outputs, registered inside PE1; at most one column
// per cycle. done stays high once all ref_len columns were issued.
module ref_loader
  import dialign_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        first_pass,
  input  logic [31:0] ref_len,
  input  logic        en,
  // reference byte stream
  input  logic        s_valid,
  input  base_t       s_data,
  output logic        s_ready,
  // previous pass records from the LOAD FIFO
  input  logic        l_valid,
  input  rec_t        l_rec,
  output logic        l_ready,
  // to PE1
  output logic        out_valid,
  output base_t       out_base,
  output logic [31:0] out_col,
  output rec_t        out_rec,
  output logic        done
);

  logic        active, first;
  logic [31:0] cnt, len;
  logic        fire;

  assign fire      = active && en && s_valid && (first || l_valid);
  assign s_ready   = fire;
  assign l_ready   = fire && !first;
  assign out_valid = fire;
  assign out_base  = s_data;
  assign out_col   = cnt + 1;
  assign out_rec   = first ? '0 : l_rec;
  assign done      = !active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      first  <= 1'b1;
      cnt    <= '0;
      len    <= '0;
    end else if (start) begin
      active <= (ref_len != 0);
      first  <= first_pass;
      cnt    <= '0;
      len    <= ref_len;
    end else if (fire) begin
      cnt <= cnt + 1;
      if (cnt + 1 == len) active <= 1'b0;
    end
  end

endmodule
