// Interval-Table tracker of updated L2 lines (greedy online algorithm).
//
// Between two state dumps this block records which L2 lines the processor
// has written, in at most K intervals of consecutive line numbers instead of
// one bit per line. Each reported update is queued in the Update Buffer and
// then folded into the sorted Interval Table by the controller: a line already
// covered is ignored, otherwise the nearest interval is extended or the two
// closest intervals are merged to make room, whichever adds fewer non-updated
// lines. The intervals always cover every updated line; they may also cover
// some lines that were not updated, which is the dump overhead.
// On a dump request the buffer is drained, every covered line number is sent
// to the L2 cache for transfer off chip, and the table is emptied.
//
// Interface:
//   upd_valid/upd_line  one updated line number per cycle, only while !busy
//   busy                buffer full or dump in progress: processor must stall
//   dump                one-cycle request to dump; dump_done pulses at the end
//   l2_req_*            valid/ready stream of line numbers to dump
// LINES_PER_UNIT > 1 makes the table count in groups of that many adjacent
// lines: addresses get shorter, and a dump sends whole groups. The default,
// single lines, is the main configuration.
// Structure and sizes (16384 lines, K = 16, 4-entry buffer) follow the
// published block diagram and implementation; see the submodules for the
// choices this design makes where the description is silent.
module greedy_tracker
  import cache_dump_pkg::*;
#(
  parameter int unsigned NUM_LINES = NUM_LINES_DEF,
  parameter int unsigned K         = NUM_INTERVALS_DEF,
  parameter int unsigned BUF_DEPTH = BUF_DEPTH_DEF,
  parameter int unsigned LINES_PER_UNIT = 1,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned CW = $clog2(K + 1)
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
  input  logic          l2_req_ready,
  output logic [CW-1:0] num_intervals,
  output logic          ev_hit,
  output logic          ev_extend,
  output logic          ev_merge,
  output logic          ev_insert,
  output logic          ev_shift,
  output logic          ev_done,
  output logic          idle
);

  localparam int unsigned NUM_UNITS = NUM_LINES / LINES_PER_UNIT;
  localparam int unsigned UW = $clog2(NUM_UNITS);
  localparam int unsigned GW = $clog2(NUM_UNITS + 1);
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1;

  // update buffer
  logic          buf_empty, buf_full, buf_pop;
  logic [UW-1:0] buf_head;
  // table ports
  rd_sel_e       rd_sel;
  logic [AW-1:0] rd_addr, wr_addr;
  logic          wr_en;
  logic [UW-1:0] rd_start, rd_end, wr_start, wr_end;
  // de-mux outputs
  logic          scan_valid, merge_valid, dmp_valid;
  logic [UW-1:0] scan_start, scan_end, merge_start, merge_end, dmp_start, dmp_end;
  // scan datapath
  logic [UW-1:0] line, prev_end;
  logic          scan_clear, scan_first, scan_last, hit, below, local_found;
  logic [AW-1:0] scan_idx, ext_idx, gidx;
  logic [GW-1:0] min_local, min_global;
  logic [CW-1:0] ins_pos, count;
  // merge logic
  logic          merge_en;
  logic [UW-1:0] merge_b_start, merge_b_end, merge_out_start, merge_out_end;
  // dumping logic
  logic          dump_start, dump_pending;
  logic [AW-1:0] dump_rd_addr;

  logic [UW-1:0] upd_unit;

  assign upd_unit      = UW'(upd_line / LW'(LINES_PER_UNIT));
  assign busy          = buf_full || dump_pending;
  assign num_intervals = count;

  update_buffer #(.DEPTH(BUF_DEPTH), .LW(UW)) u_buffer (
    .clk, .rst,
    .push(upd_valid), .push_data(upd_unit),
    .pop(buf_pop), .head_data(buf_head),
    .empty(buf_empty), .full(buf_full)
  );

  greedy_controller #(.NUM_LINES(NUM_UNITS), .K(K)) u_ctrl (
    .clk, .rst,
    .buf_empty, .buf_head, .buf_pop,
    .dump_req(dump), .dump_pending,
    .rd_sel, .rd_addr, .wr_en, .wr_addr, .wr_start, .wr_end, .count,
    .line, .scan_clear, .scan_first, .scan_last, .scan_idx, .prev_end,
    .scan_end, .hit, .min_local, .ext_idx, .ins_pos, .min_global, .gidx,
    .merge_rd_start(merge_start), .merge_rd_end(merge_end),
    .merge_en, .merge_b_start, .merge_b_end, .merge_out_start, .merge_out_end,
    .dump_start, .dump_rd_addr, .dump_done,
    .ev_hit, .ev_extend, .ev_merge, .ev_insert, .ev_shift, .ev_done, .idle
  );

  interval_table #(.K(K), .LW(UW)) u_table (
    .clk, .rst,
    .rd_addr, .rd_start, .rd_end,
    .wr_en, .wr_addr, .wr_start, .wr_end
  );

  interval_demux #(.LW(UW)) u_demux (
    .sel(rd_sel), .rd_start, .rd_end,
    .scan_valid, .scan_start, .scan_end,
    .merge_valid, .merge_start, .merge_end,
    .dump_valid(dmp_valid), .dump_start(dmp_start), .dump_end(dmp_end)
  );

  check_interval #(.LW(UW)) u_check (
    .valid(scan_valid), .line, .iv_start(scan_start), .iv_end(scan_end),
    .hit, .below
  );

  min_global_gap #(.NUM_LINES(NUM_UNITS), .K(K)) u_min_global (
    .clk, .rst, .clear(scan_clear), .valid(scan_valid && !hit),
    .first(scan_first), .idx(scan_idx), .cur_start(scan_start), .prev_end,
    .min_gap(min_global), .min_idx(gidx)
  );

  min_local_gap #(.NUM_LINES(NUM_UNITS), .K(K)) u_min_local (
    .clk, .rst, .clear(scan_clear), .valid(scan_valid && !hit),
    .first(scan_first), .last(scan_last), .idx(scan_idx), .line,
    .cur_start(scan_start), .cur_end(scan_end), .prev_end,
    .min_gap(min_local), .ext_idx, .ins_pos, .found(local_found)
  );

  merge_logic #(.LW(UW)) u_merge (
    .merge_en, .a_start(merge_start), .a_end(merge_end),
    .b_start(merge_b_start), .b_end(merge_b_end),
    .out_start(merge_out_start), .out_end(merge_out_end)
  );

  dumping_logic #(.NUM_LINES(NUM_LINES), .K(K), .LINES_PER_UNIT(LINES_PER_UNIT)) u_dump (
    .clk, .rst, .start(dump_start), .count,
    .rd_addr(dump_rd_addr), .rd_valid(dmp_valid), .rd_start(dmp_start), .rd_end(dmp_end),
    .dump_valid(l2_req_valid), .dump_line(l2_req_line), .dump_ready(l2_req_ready),
    .done(dump_done)
  );

  // consistency of the datapath with the controller's decisions
  a_hit_not_below: assert property (@(posedge clk) disable iff (rst) !(hit && below))
    else $error("greedy_tracker: line both inside and below an interval");
  a_extend_located: assert property (@(posedge clk) disable iff (rst) ev_extend |-> local_found)
    else $error("greedy_tracker: extension before the line's gap was found");
  a_shift_path: assert property (@(posedge clk) disable iff (rst) ev_shift |-> merge_valid)
    else $error("greedy_tracker: shift without the read port on the merge path");
  a_no_update_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !upd_valid)
    else $error("greedy_tracker: line update while busy");

endmodule
