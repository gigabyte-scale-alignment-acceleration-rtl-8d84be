// Synchronous first-word-fall-through FIFO, used for the 16-bit HBA READ and
// HBA WRITE FIFOs and for the seven-lane record buffers.
//
// A word is written when w_valid and w_ready are both high and read when
// r_valid and r_ready are both high; r_data shows the oldest word whenever
// r_valid is high. Storage is a DEPTH-entry array with wrapping pointers.
// The 16-bit width of the HBA FIFOs follows the design description; depth
// and handshake are this design's choice.
//
// Timing: a word written in cycle t is readable in cycle t+1. Full and empty
// are exact; count gives the fill level.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_valid,
  input  logic [WIDTH-1:0] w_data,
  output logic             w_ready,
  output logic             r_valid,
  output logic [WIDTH-1:0] r_data,
  input  logic             r_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_w, do_r;

  assign w_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign r_valid = (count != 0);
  assign r_data  = mem[rp];
  assign do_w    = w_valid && w_ready;
  assign do_r    = r_valid && r_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_w) mem[wp] <= w_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_w) wp <= incr(wp);
      if (do_r) rp <= incr(rp);
      if (do_w && !do_r) count <= count + 1'b1;
      else if (do_r && !do_w) count <= count - 1'b1;
    end
  end

  // Handshake rules: no write when full, no read when empty.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) do_w |-> 32'(count) < DEPTH);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) do_r |-> count > 0);

endmodule
