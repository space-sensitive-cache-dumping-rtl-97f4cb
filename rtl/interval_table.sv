// Interval Table I[k]: the storage of the greedy tracker.
//
// A single dual-ported memory of K entries, each holding one interval as an
// inclusive (start, end) pair of line numbers. The tracker keeps the valid
// entries packed at indices 0..count-1 and sorted by start address; the table
// itself knows nothing of that order. One read port and one write port, as in
// the published hardware. The read port is asynchronous (the addressed entry
// is visible in the same cycle), so that a scan reads one interval per cycle
// and a shift moves one interval per cycle (read j, write j+-1 in the same
// cycle); the write port is synchronous. Reading an address that is written in
// the same cycle returns the old contents. Reset clears all entries to zero;
// whether the storage is reset is not stated and this is this design's choice.
module interval_table #(
  parameter int unsigned K  = 16,
  parameter int unsigned LW = 14,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // read port
  input  logic [AW-1:0] rd_addr,
  output logic [LW-1:0] rd_start,
  output logic [LW-1:0] rd_end,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [LW-1:0] wr_start,
  input  logic [LW-1:0] wr_end
);

  logic [LW-1:0] start_q [K];
  logic [LW-1:0] end_q   [K];

  assign rd_start = start_q[rd_addr];
  assign rd_end   = end_q[rd_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(K); i++) begin
        start_q[i] <= '0;
        end_q[i]   <= '0;
      end
    end else if (wr_en) begin
      start_q[wr_addr] <= wr_start;
      end_q[wr_addr]   <= wr_end;
    end
  end

  a_addr_range: assert property (@(posedge clk) disable iff (rst) wr_en |-> (int'(wr_addr) < int'(K)))
    else $error("interval_table: write outside the table");

endmodule
