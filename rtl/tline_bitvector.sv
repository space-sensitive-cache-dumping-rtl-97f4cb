// t-lines/bit bit-vector tracker of updated L2 lines (Method 1).
//
// One bit stands for T adjacent cache lines: bit b covers lines b*T ..
// b*T+T-1 and is set when any of them is written. The vector is T times
// smaller than a one-bit-per-line vector; the price is that a dump sends all T
// lines of every set bit, updated or not. With T = 1 this is the plain
// bit-vector.
// Updates take one cycle and never stall the processor. On a dump request the
// vector is scanned from bit 0 upwards, one bit per cycle; for each set bit its
// T line numbers are sent, in ascending order, to the L2 cache over a
// valid/ready stream, and the bit is cleared, so the vector is empty for the
// next period when dump_done pulses. busy is high from the request to the end
// of the dump, during which the processor must not update the cache.
// The mapping of bits to lines follows the published method; the scan order,
// the handshake and the default T = 4 are this design's own choices.
module tline_bitvector
  import cache_dump_pkg::*;
#(
  parameter int unsigned NUM_LINES     = NUM_LINES_DEF,
  parameter int unsigned LINES_PER_BIT = LINES_PER_BIT_DEF,
  localparam int unsigned LW = $clog2(NUM_LINES)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          upd_valid,
  input  logic [LW-1:0] upd_line,
  output logic          busy,
  input  logic          dump,
  output logic          dump_done,
  output logic          l2_req_valid,
  output logic [LW-1:0] l2_req_line,
  input  logic          l2_req_ready
);

  localparam int unsigned NB = NUM_LINES / LINES_PER_BIT;
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned OW = (LINES_PER_BIT > 1) ? $clog2(LINES_PER_BIT) : 1;

  typedef enum logic [1:0] {B_TRACK, B_SCAN, B_EMIT, B_DONE} bstate_e;

  bstate_e       state;
  logic [NB-1:0] bits;
  logic [BW-1:0] b;
  logic [OW-1:0] off;
  logic [BW-1:0] upd_bit;

  assign upd_bit      = BW'(upd_line / LW'(LINES_PER_BIT));
  assign busy         = (state != B_TRACK);
  assign dump_done    = (state == B_DONE);
  assign l2_req_valid = (state == B_EMIT);
  assign l2_req_line  = LW'(b) * LW'(LINES_PER_BIT) + LW'(off);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_TRACK;
      bits  <= '0;
      b     <= '0;
      off   <= '0;
    end else begin
      unique case (state)
        B_TRACK: begin
          if (upd_valid) bits[upd_bit] <= 1'b1;
          if (dump) begin
            b     <= '0;
            state <= B_SCAN;
          end
        end
        B_SCAN: begin
          if (bits[b]) begin
            off   <= '0;
            state <= B_EMIT;
          end else if (int'(b) == int'(NB) - 1) begin
            state <= B_DONE;
          end else begin
            b <= b + 1'b1;
          end
        end
        B_EMIT: if (l2_req_ready) begin
          if (int'(off) == int'(LINES_PER_BIT) - 1) begin
            bits[b] <= 1'b0;
            if (int'(b) == int'(NB) - 1) begin
              state <= B_DONE;
            end else begin
              b     <= b + 1'b1;
              state <= B_SCAN;
            end
          end else begin
            off <= off + 1'b1;
          end
        end
        B_DONE: state <= B_TRACK;
        default: state <= B_TRACK;
      endcase
    end
  end

  a_no_update_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !upd_valid)
    else $error("tline_bitvector: line update while busy");
  a_lines_per_bit: assert property (@(posedge clk) NUM_LINES % LINES_PER_BIT == 0)
    else $error("tline_bitvector: NUM_LINES must be a multiple of LINES_PER_BIT");

endmodule
