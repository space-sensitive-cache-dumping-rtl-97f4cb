// min LocalGap unit: distance of the new line to its nearest interval.
//
// During the scan of the sorted Interval Table the unit finds the gap the new
// line falls into: the first interval that starts above the line (or the end
// of the table) bounds it on the right, the interval before on the left. The
// local gap to a side is the number of non-updated lines between the line and
// that interval (start - line - 1, line - end - 1). The unit keeps the smaller
// of the two, the index of the interval to extend to reach the line, and the
// insertion position (number of stored intervals that start below the line),
// which the controller needs when it has to store the line as an interval of
// its own. clear loads the "no gap" value NUM_LINES. On equal local gaps the
// left interval is extended; that tie rule is this design's choice.
// Timing: the result of scan cycle i is visible in the cycle after it.
module min_local_gap #(
  parameter int unsigned NUM_LINES = 16384,
  parameter int unsigned K         = 16,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned GW = $clog2(NUM_LINES + 1),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          valid,     // an interval is on cur_* this cycle
  input  logic          first,     // it is I[0]
  input  logic          last,      // it is the last stored interval
  input  logic [AW-1:0] idx,
  input  logic [LW-1:0] line,
  input  logic [LW-1:0] cur_start,
  input  logic [LW-1:0] cur_end,
  input  logic [LW-1:0] prev_end,  // end of I[idx-1]
  output logic [GW-1:0] min_gap,
  output logic [AW-1:0] ext_idx,   // interval to extend to the line
  output logic [CW-1:0] ins_pos,   // where the line would be inserted
  output logic          found      // the line's gap has been located
);

  logic          take_below, take_above;
  logic [GW-1:0] left_gap, right_gap, above_gap;

  always_comb begin
    take_below = valid && !found && (line < cur_start);
    take_above = valid && !found && last && (line > cur_end);
    left_gap   = GW'(line) - GW'(prev_end) - GW'(1);
    right_gap  = GW'(cur_start) - GW'(line) - GW'(1);
    above_gap  = GW'(line) - GW'(cur_end) - GW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      min_gap <= GW'(NUM_LINES);
      ext_idx <= '0;
      ins_pos <= '0;
      found   <= 1'b0;
    end else if (take_below) begin
      found   <= 1'b1;
      ins_pos <= CW'(idx);
      if (!first && (left_gap <= right_gap) && (left_gap < min_gap)) begin
        min_gap <= left_gap;
        ext_idx <= idx - 1'b1;
      end else if (right_gap < min_gap) begin
        min_gap <= right_gap;
        ext_idx <= idx;
      end
    end else if (take_above) begin
      found   <= 1'b1;
      ins_pos <= CW'(idx) + 1'b1;
      if (above_gap < min_gap) begin
        min_gap <= above_gap;
        ext_idx <= idx;
      end
    end
  end

endmodule
