// Check Interval: membership test of the newly updated line.
//
// Compares the line number with one stored interval (inclusive bounds) and
// reports whether the line already lies inside it (hit) or lies before it
// (below). A hit tells the controller to abandon the update, since the line is
// already recorded; "below" on the first such interval of the sorted scan
// marks where the line would have to be inserted. Combinational; qualified by
// valid so that it reports nothing while the read port serves someone else.
module check_interval #(
  parameter int unsigned LW = 14
) (
  input  logic          valid,
  input  logic [LW-1:0] line,
  input  logic [LW-1:0] iv_start,
  input  logic [LW-1:0] iv_end,
  output logic          hit,
  output logic          below
);

  always_comb begin
    hit   = valid && (line >= iv_start) && (line <= iv_end);
    below = valid && (line < iv_start);
  end

endmodule
