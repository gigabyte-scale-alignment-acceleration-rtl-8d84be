// Partition State Bank.
//
// After each partition pass (capture pulse) the bank copies the best cell of
// every PE's row into its memory, one PE per cycle, at address
// pass*NUM_PE + k. While doing so it keeps the best entry of each partition
// and the best over all partitions (the stitched result). The host reads
// entries through rd_addr/rd_data and partition results through
// part_idx/part_best. That the bank stores each PE's key alignment
// information after a partition, for stitching at the end, follows the
// design description; what is stored and the on-chip memory (instead of the
// external DRAM) are this design's choice.
//
// Timing: capture starts NUM_PE write cycles; done pulses one cycle after
// the last write. Reads are combinational. clear empties the results.
module psb
  import dialign_pkg::*;
#(
  parameter int unsigned NUM_PE   = 50,
  parameter int unsigned MAX_PART = 4
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        capture,
  input  logic [31:0] pass_idx,
  input  pe_best_t    best [NUM_PE],
  output logic        busy,
  output logic        done,
  // host read port
  input  logic [$clog2(NUM_PE*MAX_PART)-1:0] rd_addr,
  output psb_entry_t  rd_data,
  input  logic [$clog2(MAX_PART+1)-1:0]      part_idx,
  output psb_entry_t  part_best,
  output psb_entry_t  stitched
);

  localparam int unsigned ENTRIES = NUM_PE * MAX_PART;
  localparam int unsigned KW      = $clog2(NUM_PE + 1);

  psb_entry_t mem  [ENTRIES];
  psb_entry_t pbest [MAX_PART];
  logic [KW-1:0] k;
  logic [31:0]   pass_q;
  psb_entry_t    cur;
  logic          in_range;

  assign in_range = (pass_q < MAX_PART);

  always_comb begin
    cur.score = best[k].score;
    cur.col   = best[k].col;
    cur.srow  = best[k].srow;
    cur.scol  = best[k].scol;
    cur.row   = pass_q * NUM_PE + 32'(k) + 1;
  end

  always_ff @(posedge clk) begin
    if (busy && in_range) mem[pass_q * NUM_PE + 32'(k)] <= cur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      k        <= '0;
      pass_q   <= '0;
      stitched <= '0;
      for (int p = 0; p < MAX_PART; p++) pbest[p] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && capture) begin
        busy   <= 1'b1;
        k      <= '0;
        pass_q <= pass_idx;
      end else if (busy) begin
        if (in_range && cur.score > pbest[pass_q].score) pbest[pass_q] <= cur;
        if (cur.score > stitched.score) stitched <= cur;
        if (k == KW'(NUM_PE - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  assign rd_data   = mem[rd_addr];
  assign part_best = (32'(part_idx) < MAX_PART) ? pbest[part_idx[$clog2(MAX_PART)-1:0]] : '0;

endmodule
