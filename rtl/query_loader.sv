// Query loader: puts one partition's query segment into the PE chain.
//
// On start it accepts seg_len characters (1..NUM_PE) from the byte stream
// into a local buffer, then shifts NUM_PE entries into the chain, last
// position first, so that PE1 ends up with the first character of the
// segment and PE k with character k. Positions beyond seg_len are shifted in
// as empty slots. done pulses for one cycle after the last shift. That the
// query is loaded through PE1 follows the design description; the buffer
// and the reverse shift are this design's own.
//
// Timing: seg_len cycles of accepted stream bytes (s_ready is high while
// collecting), then NUM_PE shift cycles, then done.
module query_loader
  import dialign_pkg::*;
#(
  parameter int unsigned NUM_PE = 50
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] seg_len,
  // byte stream
  input  logic        s_valid,
  input  base_t       s_data,
  output logic        s_ready,
  // PE chain
  output logic        q_load,
  output qchar_t      q_out,
  output logic        busy,
  output logic        done
);

  localparam int unsigned IW = $clog2(NUM_PE + 1);

  typedef enum logic [1:0] {L_IDLE, L_COLLECT, L_SHIFT} lstate_e;
  lstate_e     st;
  base_t       buffer [NUM_PE];
  logic [IW-1:0] cnt;
  logic [IW-1:0] len;

  assign s_ready = (st == L_COLLECT);
  assign q_load  = (st == L_SHIFT);
  assign busy    = (st != L_IDLE);
  // cnt counts down from NUM_PE-1 to 0 while shifting
  always_comb begin
    q_out = '0;
    if (st == L_SHIFT && cnt < len) begin
      q_out.valid = 1'b1;
      q_out.base  = buffer[cnt];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= L_IDLE;
      cnt  <= '0;
      len  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        L_IDLE: if (start) begin
          len <= (seg_len > NUM_PE) ? IW'(NUM_PE) : IW'(seg_len);
          cnt <= '0;
          st  <= (seg_len == 0) ? L_SHIFT : L_COLLECT;
          if (seg_len == 0) cnt <= IW'(NUM_PE - 1);
        end
        L_COLLECT: if (s_valid) begin
          buffer[cnt] <= s_data;
          if (cnt == len - 1) begin
            cnt <= IW'(NUM_PE - 1);
            st  <= L_SHIFT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        L_SHIFT: begin
          if (cnt == 0) begin
            st   <= L_IDLE;
            done <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: st <= L_IDLE;
      endcase
    end
  end

endmodule
