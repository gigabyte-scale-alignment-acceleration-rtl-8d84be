// Stream front end behind the two logical Ethernet controller cores.
//
// The host fills the input buffers of two controller cores (EC1, EC2) that
// share one Ethernet link. This block drains them alternately, CHUNK bytes
// from EC1, then CHUNK bytes from EC2, and so on, so one core can be
// refilled while the other is emptied and the byte stream never waits for a
// whole buffer turnaround. The merged stream goes to the query loader when
// route_ref=0 and to the reference loader when route_ref=1. sync restarts
// the alternation at EC1 (the sequencer pulses it at each phase change).
// Two controller cores on one link serving the reference stream follow the
// design description; chunked alternation and routing are this design's.
//
// Timing: combinational data path, one byte per cycle; no byte moves in
// the cycle sync is high.
module sirc_stream
  import dialign_pkg::*;
#(
  parameter int unsigned CHUNK = 1024
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sync,
  input  logic  route_ref,
  input  logic  ec_valid [2],
  input  base_t ec_data  [2],
  output logic  ec_ready [2],
  // to the query loader
  output logic  q_valid,
  output base_t q_data,
  input  logic  q_ready,
  // to the reference loader
  output logic  r_valid,
  output base_t r_data,
  input  logic  r_ready
);

  localparam int unsigned CW = $clog2(CHUNK);

  logic          sel;
  logic [CW-1:0] cnt;
  logic          valid, ready, fire;

  assign valid  = ec_valid[sel] && !sync;   // nothing moves while restarting
  assign ready  = route_ref ? r_ready : q_ready;
  assign fire   = valid && ready;
  assign q_valid = valid && !route_ref;
  assign r_valid = valid && route_ref;
  assign q_data  = ec_data[sel];
  assign r_data  = ec_data[sel];
  assign ec_ready[0] = ready && !sync && !sel;
  assign ec_ready[1] = ready && !sync && sel;

  always_ff @(posedge clk) begin
    if (!rst_n || sync) begin
      sel <= 1'b0;
      cnt <= '0;
    end else if (fire) begin
      if (cnt == CW'(CHUNK - 1)) begin
        cnt <= '0;
        sel <= !sel;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
