// min GlobalGap unit: smallest gap between adjacent stored intervals.
//
// While the controller scans the sorted Interval Table, one interval per
// cycle, this unit computes the global gap between the interval read now and
// the one read in the previous cycle, and keeps the smallest such gap with the
// index g of its left interval (the gap lies between I[g] and I[g+1]). A gap is
// counted as the number of non-updated lines it holds, start - prev_end - 1,
// which is how the worked examples count it. clear (first cycle of a scan)
// loads the "no gap" value NUM_LINES, as the greedy algorithm initialises it.
// Only a strictly smaller gap replaces the minimum, so ties keep the leftmost
// gap; that tie rule is this design's choice.
// Timing: the result of scan cycle i is visible in the cycle after it.
module min_global_gap #(
  parameter int unsigned NUM_LINES = 16384,
  parameter int unsigned K         = 16,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned GW = $clog2(NUM_LINES + 1),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          valid,     // an interval is on cur_* this cycle
  input  logic          first,     // it is I[0]: no gap to its left
  input  logic [AW-1:0] idx,       // its index
  input  logic [LW-1:0] cur_start,
  input  logic [LW-1:0] prev_end,  // end of I[idx-1]
  output logic [GW-1:0] min_gap,
  output logic [AW-1:0] min_idx
);

  logic [GW-1:0] gap;
  logic          better;

  always_comb begin
    gap    = GW'(cur_start) - GW'(prev_end) - GW'(1);
    better = valid && !first && (gap < min_gap);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      min_gap <= GW'(NUM_LINES);
      min_idx <= '0;
    end else if (better) begin
      min_gap <= gap;
      min_idx <= idx - 1'b1;
    end
  end

endmodule
