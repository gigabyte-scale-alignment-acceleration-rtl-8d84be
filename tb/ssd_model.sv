// Behavioural model of one SATA host bus adapter with its solid-state drive,
// for simulation only (not synthesizable: associative-array storage).
//
// It accepts the adapter requests of the accelerator: a write command sets
// the word address and length of the following write stream, a read command
// those of the following read stream. The drive performs one word operation
// at a time: a write occupies it for WR_PERIOD cycles, a read for RD_PERIOD
// cycles, and when both directions are waiting they take turns. A single
// drive that has to read the previous pass's records while writing the
// current ones is therefore slower than two drives that each do one of the
// two. wr_idle is high when no accepted write is outstanding.
module ssd_model
  import dialign_pkg::*;
#(
  parameter int unsigned WR_PERIOD = 1,
  parameter int unsigned RD_PERIOD = 1
)(
  input  logic     clk,
  input  logic     rst_n,
  input  hba_req_t req,
  output hba_rsp_t rsp
);

  logic [HBA_W-1:0] mem [longint unsigned];
  longint unsigned  wa, wleft, ra, rleft;
  int unsigned      bt;           // cycles the drive is still busy
  logic             turn_rd;      // read has priority on the next tie
  longint unsigned  words_written = 0, words_read = 0;
  logic             wr_want, rd_want;

  always_comb begin
    wr_want      = (wleft != 0) && req.wr_valid;
    rd_want      = (rleft != 0) && req.rd_ready;
    rsp.wr_ready = (wleft != 0) && (bt == 0) && !(rd_want && turn_rd);
    rsp.rd_valid = (rleft != 0) && (bt == 0) && !(wr_want && !turn_rd);
    rsp.wr_idle  = (wleft == 0);
    rsp.rd_data  = mem.exists(ra) ? mem[ra] : '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      wa <= 0; wleft <= 0; ra <= 0; rleft <= 0; bt <= 0; turn_rd <= 0;
    end else begin
      if (bt != 0) bt <= bt - 1;
      if (req.wr_cmd) begin
        wa <= req.wr_addr; wleft <= req.wr_len;
      end else if (req.wr_valid && rsp.wr_ready) begin
        mem[wa] = req.wr_data;
        wa <= wa + 1; wleft <= wleft - 1;
        bt <= WR_PERIOD - 1; turn_rd <= 1;
        words_written <= words_written + 1;
      end
      if (req.rd_cmd) begin
        ra <= req.rd_addr; rleft <= req.rd_len;
      end else if (req.rd_ready && rsp.rd_valid) begin
        ra <= ra + 1; rleft <= rleft - 1;
        bt <= RD_PERIOD - 1; turn_rd <= 0;
        words_read <= words_read + 1;
      end
    end
  end

endmodule
