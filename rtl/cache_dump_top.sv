// Updated-line tracking for incremental L2 state dumps: both trackers.
//
// During post-silicon validation the processor state is dumped off chip at
// intervals, and the L2 cache dominates that volume. Dumping only the lines
// written since the previous dump shortens the stall; the trackers here record
// those lines in much less storage than one bit per line, at the cost of
// dumping a few lines that were not written.
//
// Two independent trackers stand side by side, each with its own ports:
//   g_*  the Interval-Table tracker (greedy online algorithm, K intervals,
//        Update Buffer); storage independent of the cache size. Its table
//        counts single lines unless LINES_PER_UNIT groups them.
//   b_*  the t-lines/bit bit-vector tracker; storage NUM_LINES/T bits.
// Either one is used on its own next to the L2 cache. For each: *_upd_valid/
// *_upd_line report a written line (only while *_busy is low), *_dump starts a
// dump, *_l2_req_* is the valid/ready stream of line numbers the cache must
// transfer off chip, *_dump_done marks the end of the dump. The L2 cache
// itself is outside this design.
module cache_dump_top
  import cache_dump_pkg::*;
#(
  parameter int unsigned NUM_LINES     = NUM_LINES_DEF,
  parameter int unsigned K             = NUM_INTERVALS_DEF,
  parameter int unsigned BUF_DEPTH     = BUF_DEPTH_DEF,
  parameter int unsigned LINES_PER_BIT = LINES_PER_BIT_DEF,
  parameter int unsigned LINES_PER_UNIT = 1,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // Interval-Table (greedy) tracker
  input  logic          g_upd_valid,
  input  logic [LW-1:0] g_upd_line,
  output logic          g_busy,
  input  logic          g_dump,
  output logic          g_dump_done,
  output logic          g_l2_req_valid,
  output logic [LW-1:0] g_l2_req_line,
  input  logic          g_l2_req_ready,
  output logic [CW-1:0] g_num_intervals,
  output logic [5:0]    g_events,        // {done, shift, insert, merge, extend, hit}
  output logic          g_idle,
  // t-lines/bit bit-vector tracker
  input  logic          b_upd_valid,
  input  logic [LW-1:0] b_upd_line,
  output logic          b_busy,
  input  logic          b_dump,
  output logic          b_dump_done,
  output logic          b_l2_req_valid,
  output logic [LW-1:0] b_l2_req_line,
  input  logic          b_l2_req_ready
);

  greedy_tracker #(.NUM_LINES(NUM_LINES), .K(K), .BUF_DEPTH(BUF_DEPTH),
                  .LINES_PER_UNIT(LINES_PER_UNIT)) u_greedy (
    .clk, .rst,
    .upd_valid(g_upd_valid), .upd_line(g_upd_line), .busy(g_busy),
    .dump(g_dump), .dump_done(g_dump_done),
    .l2_req_valid(g_l2_req_valid), .l2_req_line(g_l2_req_line), .l2_req_ready(g_l2_req_ready),
    .num_intervals(g_num_intervals),
    .ev_hit(g_events[0]), .ev_extend(g_events[1]), .ev_merge(g_events[2]),
    .ev_insert(g_events[3]), .ev_shift(g_events[4]), .ev_done(g_events[5]),
    .idle(g_idle)
  );

  tline_bitvector #(.NUM_LINES(NUM_LINES), .LINES_PER_BIT(LINES_PER_BIT)) u_bitvec (
    .clk, .rst,
    .upd_valid(b_upd_valid), .upd_line(b_upd_line), .busy(b_busy),
    .dump(b_dump), .dump_done(b_dump_done),
    .l2_req_valid(b_l2_req_valid), .l2_req_line(b_l2_req_line), .l2_req_ready(b_l2_req_ready)
  );

endmodule
