// Controller of the greedy Interval-Table tracker.
//
// For every line number taken from the Update Buffer it runs the greedy online
// algorithm on the sorted Interval Table:
//   SCAN    read I[0..count-1], one per cycle. The check-interval, min
//           LocalGap and min GlobalGap units evaluate each entry as it is
//           read. A hit (line already inside an interval) abandons the update.
//   MERGE1  decide from the two minima. Extend the nearest interval to the
//           line when its local gap is zero, or when the table is full and
//           the local gap is no larger than the smallest global gap: the
//           interval is read, merged with the line and written back in this
//           cycle. If the table has a free entry, the line becomes an interval
//           of its own. Otherwise the two intervals around the smallest global
//           gap are merged: I[g] is read and held here ...
//   MERGE2  ... I[g+1] is read, merged with it and written back.
//   SHIFT   move intervals one place, one per cycle (read j, write j+-1), to
//           open a slot for the line at its sorted position.
//   SINGLE  write the one-line interval (line, line).
// Scan takes count <= K cycles, the merge 2 and the shift at most K-2 moves
// plus the single write, so an update needs at most 2K+1 cycles, the bound the
// published hardware quotes. The last cycle of an update also takes the next
// line from the buffer, so back-to-back updates follow without a gap.
//
// A dump request is remembered and served once the buffer has drained: the
// dumping logic walks the table, then the table is emptied for the next
// period. Busy (buffer full or dump pending) tells the processor to stall.
//
// Follows the published algorithm and its hardware description: sorted table,
// one dual-ported memory, membership abort, minimum gaps with their index,
// merge and shift. This design's own choices: gaps counted as the number of
// non-updated lines (as in the worked examples); a zero local gap and a
// not-yet-full table are handled without merging; ties go to extending the
// nearest interval; the exact cycle split of merge and shift.
module greedy_controller
  import cache_dump_pkg::*;
#(
  parameter int unsigned NUM_LINES = 16384,
  parameter int unsigned K         = 16,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned GW = $clog2(NUM_LINES + 1),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // update buffer
  input  logic          buf_empty,
  input  logic [LW-1:0] buf_head,
  output logic          buf_pop,
  // dump request from the debug infrastructure
  input  logic          dump_req,
  output logic          dump_pending,
  // interval table
  output rd_sel_e       rd_sel,
  output logic [AW-1:0] rd_addr,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [LW-1:0] wr_start,
  output logic [LW-1:0] wr_end,
  output logic [CW-1:0] count,
  // scan datapath
  output logic [LW-1:0] line,
  output logic          scan_clear,
  output logic          scan_first,
  output logic          scan_last,
  output logic [AW-1:0] scan_idx,
  output logic [LW-1:0] prev_end,
  input  logic [LW-1:0] scan_end,
  input  logic          hit,
  input  logic [GW-1:0] min_local,
  input  logic [AW-1:0] ext_idx,
  input  logic [CW-1:0] ins_pos,
  input  logic [GW-1:0] min_global,
  input  logic [AW-1:0] gidx,
  // merge logic
  input  logic [LW-1:0] merge_rd_start,
  input  logic [LW-1:0] merge_rd_end,
  output logic          merge_en,
  output logic [LW-1:0] merge_b_start,
  output logic [LW-1:0] merge_b_end,
  input  logic [LW-1:0] merge_out_start,
  input  logic [LW-1:0] merge_out_end,
  // dumping logic
  output logic          dump_start,
  input  logic [AW-1:0] dump_rd_addr,
  input  logic          dump_done,
  // one-cycle event strobes, for status and test
  output logic          ev_hit,
  output logic          ev_extend,
  output logic          ev_merge,
  output logic          ev_insert,
  output logic          ev_shift,
  output logic          ev_done,
  output logic          idle
);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_MERGE1, S_MERGE2, S_SHIFT, S_SINGLE, S_DUMP
  } cstate_e;

  cstate_e       state, state_n;
  logic [AW-1:0] idx;
  logic [AW-1:0] g_q, j_q, stop_q, single_q;
  logic          up_q, ins_q;
  logic [LW-1:0] ma_start, ma_end;

  // next-cycle values of registers written from the combinational block
  logic          take, load_ma, set_shift, inc_count, clr_count;
  logic [AW-1:0] g_n, j_n, stop_n, single_n;
  logic          up_n, ins_n;

  logic full, choose_local;

  assign full         = (int'(count) == int'(K));
  assign choose_local = (count != '0) &&
                        ((min_local == '0) || (full && (min_local <= min_global)));
  assign scan_idx     = idx;
  assign scan_first   = (idx == '0);
  assign scan_last    = (int'(idx) + 1 == int'(count));
  assign idle         = (state == S_IDLE);

  // Leave the current update: start the next one, start a pending dump, or
  // go idle. cnt_after is the table occupancy once this cycle's write is done.
  function automatic cstate_e next_after(input logic empty, input logic pend,
                                         input logic [CW-1:0] cnt_after);
    if (!empty)      return (cnt_after == '0) ? S_MERGE1 : S_SCAN;
    else if (pend)   return S_DUMP;
    else             return S_IDLE;
  endfunction

  always_comb begin
    state_n       = state;
    rd_sel        = RD_NONE;
    rd_addr       = idx;
    wr_en         = 1'b0;
    wr_addr       = '0;
    wr_start      = merge_out_start;
    wr_end        = merge_out_end;
    merge_en      = 1'b0;
    merge_b_start = line;
    merge_b_end   = line;
    buf_pop       = 1'b0;
    scan_clear    = 1'b0;
    dump_start    = 1'b0;
    take          = 1'b0;
    load_ma       = 1'b0;
    set_shift     = 1'b0;
    inc_count     = 1'b0;
    clr_count     = 1'b0;
    g_n           = g_q;
    j_n           = j_q;
    stop_n        = stop_q;
    single_n      = single_q;
    up_n          = up_q;
    ins_n         = ins_q;
    ev_hit        = 1'b0;
    ev_extend     = 1'b0;
    ev_merge      = 1'b0;
    ev_insert     = 1'b0;
    ev_shift      = 1'b0;
    ev_done       = 1'b0;

    unique case (state)
      S_IDLE: begin
        state_n = next_after(buf_empty, dump_pending, count);
        take    = !buf_empty;
      end

      S_SCAN: begin
        rd_sel = RD_SCAN;
        if (hit) begin
          ev_hit  = 1'b1;
          ev_done = 1'b1;
          state_n = next_after(buf_empty, dump_pending, count);
          take    = !buf_empty;
        end else if (scan_last) begin
          state_n = S_MERGE1;
        end
      end

      S_MERGE1: begin
        if (choose_local) begin
          // extend the nearest interval to the line
          ev_extend = 1'b1;
          ev_done   = 1'b1;
          rd_sel    = RD_MERGE;
          rd_addr   = ext_idx;
          merge_en  = 1'b1;
          wr_en     = 1'b1;
          wr_addr   = ext_idx;
          state_n   = next_after(buf_empty, dump_pending, count);
          take      = !buf_empty;
        end else if (!full) begin
          // free entry: open slot ins_pos by moving I[ins_pos..count-1] up
          ev_insert = 1'b1;
          ins_n     = 1'b1;
          single_n  = AW'(ins_pos);
          if (ins_pos == count) begin
            state_n = S_SINGLE;
          end else begin
            set_shift = 1'b1;
            up_n      = 1'b1;
            j_n       = AW'(count - 1'b1);
            stop_n    = AW'(ins_pos);
            state_n   = S_SHIFT;
          end
        end else begin
          // full: merge across the smallest global gap, first half
          ev_merge = 1'b1;
          ins_n    = 1'b0;
          rd_sel   = RD_MERGE;
          rd_addr  = gidx;
          g_n      = gidx;
          load_ma  = 1'b1;
          state_n  = S_MERGE2;
        end
      end

      S_MERGE2: begin
        rd_sel        = RD_MERGE;
        rd_addr       = g_q + 1'b1;
        merge_en      = 1'b1;
        merge_b_start = ma_start;
        merge_b_end   = ma_end;
        wr_en         = 1'b1;
        if (int'(ins_pos) >= int'(g_q) + 2) begin
          // line lies above the pair: merged pair stays at g, the
          // intervals between move down into the freed slot g+1
          wr_addr  = g_q;
          single_n = AW'(ins_pos - 1'b1);
          if (int'(ins_pos) == int'(g_q) + 2) begin
            state_n = S_SINGLE;
          end else begin
            set_shift = 1'b1;
            up_n      = 1'b0;
            j_n       = g_q + AW'(2);
            stop_n    = AW'(ins_pos - 1'b1);
            state_n   = S_SHIFT;
          end
        end else begin
          // line lies below the pair: merged pair goes to g+1, the
          // intervals ins_pos..g-1 move up, the line goes to ins_pos
          wr_addr  = g_q + 1'b1;
          single_n = AW'(ins_pos);
          if (int'(ins_pos) == int'(g_q)) begin
            state_n = S_SINGLE;
          end else begin
            set_shift = 1'b1;
            up_n      = 1'b1;
            j_n       = g_q - 1'b1;
            stop_n    = AW'(ins_pos);
            state_n   = S_SHIFT;
          end
        end
      end

      S_SHIFT: begin
        ev_shift = 1'b1;
        rd_sel   = RD_MERGE;
        rd_addr  = j_q;
        wr_en    = 1'b1;
        wr_addr  = up_q ? (j_q + 1'b1) : (j_q - 1'b1);
        if (j_q == stop_q) begin
          state_n = S_SINGLE;
        end else begin
          j_n = up_q ? (j_q - 1'b1) : (j_q + 1'b1);
        end
      end

      S_SINGLE: begin
        wr_en     = 1'b1;
        wr_addr   = single_q;
        wr_start  = line;
        wr_end    = line;
        inc_count = ins_q;
        ev_done   = 1'b1;
        state_n   = next_after(buf_empty, dump_pending, ins_q ? count + 1'b1 : count);
        take      = !buf_empty;
      end

      S_DUMP: begin
        rd_sel  = RD_DUMP;
        rd_addr = dump_rd_addr;
        if (dump_done) begin
          clr_count = 1'b1;
          state_n   = S_IDLE;
        end
      end

      default: state_n = S_IDLE;
    endcase

    if (take) begin
      buf_pop    = 1'b1;
      scan_clear = 1'b1;
    end
    // a transition into S_DUMP starts the dumping logic
    if (state != S_DUMP && state_n == S_DUMP) dump_start = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      idx          <= '0;
      count        <= '0;
      line         <= '0;
      prev_end     <= '0;
      dump_pending <= 1'b0;
      g_q          <= '0;
      j_q          <= '0;
      stop_q       <= '0;
      single_q     <= '0;
      up_q         <= 1'b0;
      ins_q        <= 1'b0;
      ma_start     <= '0;
      ma_end       <= '0;
    end else begin
      state    <= state_n;
      g_q      <= g_n;
      j_q      <= j_n;
      stop_q   <= stop_n;
      single_q <= single_n;
      up_q     <= up_n;
      ins_q    <= ins_n;
      if (take) begin
        line <= buf_head;
        idx  <= '0;
      end else if (state == S_SCAN) begin
        idx      <= idx + 1'b1;
      end
      if (state == S_SCAN) prev_end <= scan_end;
      if (load_ma) begin
        ma_start <= merge_rd_start;
        ma_end   <= merge_rd_end;
      end
      if (clr_count)      count <= '0;
      else if (inc_count) count <= count + 1'b1;
      if (dump_req) dump_pending <= 1'b1;
      else if (clr_count) dump_pending <= 1'b0;
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (rst) int'(count) <= int'(K))
    else $error("greedy_controller: more intervals than table entries");
  a_shift_unused: assert property (@(posedge clk) disable iff (rst) set_shift |-> (state_n == S_SHIFT))
    else $error("greedy_controller: shift set up without shifting");

endmodule
