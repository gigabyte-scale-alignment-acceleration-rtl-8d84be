// Shared types and constants of the partitioned alignment accelerator.
//
// The central type is rec_t, the 28-byte boundary record that the last
// processing element emits once per reference column. It is written to the
// SSD at the end of one partition pass and read back as the upper boundary
// of the next pass. Its size (seven 32-bit words, equal to fourteen 16-bit
// HBA words) follows the design description; the meaning of each word is
// this design's choice:
//   h         score of the partition's last row in this column
//   h_srow/h_scol  start cell of the local path that ends there
//   best      best score seen in this column over all rows so far
//   best_row  row of that best cell, best_srow/best_scol its path start
// The column index itself is not stored: the reference is streamed again in
// the same order on every pass.
package dialign_pkg;

  localparam int unsigned WORD_W    = 32;   // lane width of LOAD/STORE FIFO
  localparam int unsigned REC_WORDS = 7;    // 7 x 32 bits = 28 bytes
  localparam int unsigned HBA_W     = 16;   // HBA FIFO width
  localparam int unsigned REC_HALFS = REC_WORDS * WORD_W / HBA_W;  // 14
  localparam int unsigned ADDR_W    = 48;   // SSD address, in 16-bit words

  typedef logic [7:0]        base_t;    // one sequence character (ASCII)
  typedef logic signed [31:0] score_t;

  typedef struct packed {
    score_t      h;
    logic [31:0] h_srow;
    logic [31:0] h_scol;
    score_t      best;
    logic [31:0] best_row;
    logic [31:0] best_srow;
    logic [31:0] best_scol;
  } rec_t;

  localparam int unsigned REC_W = $bits(rec_t);   // 224

  // Query character held by one PE; valid=0 marks an empty slot.
  typedef struct packed {
    logic  valid;
    base_t base;
  } qchar_t;

  // Best cell of one PE's row during one pass, kept by the PSB.
  typedef struct packed {
    score_t      score;
    logic [31:0] col;
    logic [31:0] srow;
    logic [31:0] scol;
  } pe_best_t;

  // One entry of the partition state bank: a PE's best cell in one pass.
  typedef struct packed {
    score_t      score;
    logic [31:0] row;
    logic [31:0] col;
    logic [31:0] srow;
    logic [31:0] scol;
  } psb_entry_t;

  // Host-visible phase of the partition sequencer.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_QUERY  = 3'd1,   // host sends the query segment of this pass
    PH_REF    = 3'd2,   // host streams the whole reference
    PH_PSB    = 3'd3,
    PH_DRAIN  = 3'd4,
    PH_DONE   = 3'd5
  } phase_e;

  // Request and response of one host bus adapter (SATA controller port).
  // Addresses and lengths count 16-bit words. A command is a one-cycle pulse.
  typedef struct packed {
    logic              wr_cmd;
    logic [ADDR_W-1:0] wr_addr;
    logic [ADDR_W-1:0] wr_len;
    logic              wr_valid;
    logic [HBA_W-1:0]  wr_data;
    logic              rd_cmd;
    logic [ADDR_W-1:0] rd_addr;
    logic [ADDR_W-1:0] rd_len;
    logic              rd_ready;
  } hba_req_t;

  typedef struct packed {
    logic              wr_ready;
    logic              wr_idle;    // every accepted word is on the drive
    logic              rd_valid;
    logic [HBA_W-1:0]  rd_data;
  } hba_rsp_t;

endpackage
