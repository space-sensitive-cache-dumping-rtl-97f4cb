// Merge Logic: forms the interval written back to the Interval Table.
//
// With merge_en high the output is the smallest interval covering both
// inputs (start = min of starts, end = max of ends). That serves both kinds of
// merge of the greedy algorithm: two adjacent stored intervals joined across
// their gap, and a stored interval extended to a new line (pass the line as a
// one-line interval). With merge_en low interval a passes unchanged, which is
// how the controller moves intervals while it shifts the table to keep it
// sorted. Combinational; its output feeds the table's write port.
module merge_logic #(
  parameter int unsigned LW = 14
) (
  input  logic          merge_en,
  input  logic [LW-1:0] a_start,
  input  logic [LW-1:0] a_end,
  input  logic [LW-1:0] b_start,
  input  logic [LW-1:0] b_end,
  output logic [LW-1:0] out_start,
  output logic [LW-1:0] out_end
);

  always_comb begin
    if (merge_en) begin
      out_start = (b_start < a_start) ? b_start : a_start;
      out_end   = (b_end   > a_end)   ? b_end   : a_end;
    end else begin
      out_start = a_start;
      out_end   = a_end;
    end
  end

endmodule
