// Two-way multiplexer between the HBA FIFOs and one or two SATA host bus
// adapters.
//
// In single mode (dual=0) both the write stream of the HBA WRITE FIFO and
// the read stream into the HBA READ FIFO use adapter 0. In dual mode the
// pass writes to adapter pass_par and reads from the other one, so the
// records of the previous pass are read from one drive while the current
// pass is written to the other. Commands, data and handshakes are switched
// together. That one or two adapters can be muxed to the FIFOs follows the
// design description; the per-pass alternation is this design's choice.
//
// Timing: purely combinational; dual and pass_par must stay stable while a
// pass runs.
module hba_mux
  import dialign_pkg::*;
(
  input  logic              dual,
  input  logic              pass_par,
  // write side (from the HBA WRITE FIFO)
  input  logic              wr_cmd,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [ADDR_W-1:0] wr_len,
  input  logic              w_valid,
  input  logic [HBA_W-1:0]  w_data,
  output logic              w_ready,
  output logic              wr_idle,
  // read side (into the HBA READ FIFO)
  input  logic              rd_cmd,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [ADDR_W-1:0] rd_len,
  output logic              r_valid,
  output logic [HBA_W-1:0]  r_data,
  input  logic              r_ready,
  // adapters
  output hba_req_t          req [2],
  input  hba_rsp_t          rsp [2]
);

  logic wsel, rsel;
  assign wsel = dual ? pass_par : 1'b0;
  assign rsel = dual ? !pass_par : 1'b0;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      req[k] = '0;
      if (wsel == k[0]) begin
        req[k].wr_cmd   = wr_cmd;
        req[k].wr_addr  = wr_addr;
        req[k].wr_len   = wr_len;
        req[k].wr_valid = w_valid;
        req[k].wr_data  = w_data;
      end
      if (rsel == k[0]) begin
        req[k].rd_cmd   = rd_cmd;
        req[k].rd_addr  = rd_addr;
        req[k].rd_len   = rd_len;
        req[k].rd_ready = r_ready;
      end
    end
    w_ready = rsp[wsel].wr_ready;
    wr_idle = rsp[wsel].wr_idle;
    r_valid = rsp[rsel].rd_valid;
    r_data  = rsp[rsel].rd_data;
  end

endmodule
