// Transmit arbiter for two Ethernet controller cores sharing one MAC.
//
// Each core offers a byte stream of packets (valid, data, last). The arbiter
// grants the MAC transmit path to one core for a whole packet and alternates
// (round robin) when both are waiting, so packets are never interleaved.
// The arbiter between the two cores' transmit paths follows the design
// description; packet granularity and round robin are this design's choice.
//
// Timing: the grant is decided combinationally in the first cycle of a
// packet and held until the byte with last is accepted.
module ec_arbiter
  import dialign_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid [2],
  input  base_t tx_data  [2],
  input  logic  tx_last  [2],
  output logic  tx_ready [2],
  output logic  mac_valid,
  output base_t mac_data,
  output logic  mac_last,
  input  logic  mac_ready
);

  logic locked, owner, prio, gnt;

  always_comb begin
    if (locked)                      gnt = owner;
    else if (tx_valid[prio])         gnt = prio;
    else                             gnt = !prio;
  end

  assign mac_valid   = tx_valid[gnt];
  assign mac_data    = tx_data[gnt];
  assign mac_last    = tx_last[gnt];
  assign tx_ready[0] = mac_ready && !gnt;
  assign tx_ready[1] = mac_ready && gnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= 1'b0;
      prio   <= 1'b0;
    end else if (mac_valid && mac_ready) begin
      if (mac_last) begin
        locked <= 1'b0;
        prio   <= !gnt;
      end else begin
        locked <= 1'b1;
        owner  <= gnt;
      end
    end
  end

  // A granted packet is not interrupted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mac_valid && mac_ready && !mac_last) |=> (gnt == $past(gnt)));

endmodule
