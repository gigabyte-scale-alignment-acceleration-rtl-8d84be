// Result output: sends the final alignment result to the host.
//
// When done rises, the block latches the DARM result and sends it as one
// 20-byte packet on a byte stream (valid, data, last, ready) towards the
// output buffer of an Ethernet controller core: score, start row, start
// column, final row and final column, each 32 bits, least significant byte
// first. That the accelerator's result leaves through an output block to the
// Ethernet cores follows the design description; the packet format is this
// design's choice.
//
// Timing: the first byte is offered the cycle after done rises; one byte per
// cycle while ready is high. A new rising edge of done during a packet is
// ignored.
module result_out
  import dialign_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        done,
  input  score_t      score,
  input  logic [31:0] pos_row,
  input  logic [31:0] pos_col,
  input  logic [31:0] final_row,
  input  logic [31:0] final_col,
  output logic        valid,
  output base_t       data,
  output logic        last,
  input  logic        ready
);

  localparam int unsigned NBYTES = 20;

  logic [8*NBYTES-1:0] pkt;
  logic [4:0]          idx;
  logic                done_q;

  assign data = pkt[8*idx +: 8];
  assign last = valid && (idx == 5'(NBYTES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      idx    <= '0;
      pkt    <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= done;
      if (!valid && done && !done_q) begin
        pkt   <= {final_col, final_row, pos_col, pos_row, score};
        idx   <= '0;
        valid <= 1'b1;
      end else if (valid && ready) begin
        if (last) valid <= 1'b0;
        else      idx   <= idx + 1'b1;
      end
    end
  end

endmodule
