// De-MUX on the Interval Table read port.
//
// The table has one read port that three consumers share: the scan datapath
// (check interval, min LocalGap, min GlobalGap), the merge logic (merges and
// the shifting of intervals) and the dumping logic. The controller's select
// lines pick the consumer; the selected one gets the interval with a valid
// flag, the others see valid low and zero data. Purely combinational. The
// block and its select lines are shown in the published block diagram; the
// zeroing of unselected outputs is this design's choice.
module interval_demux
  import cache_dump_pkg::*;
#(
  parameter int unsigned LW = 14
) (
  input  rd_sel_e       sel,
  input  logic [LW-1:0] rd_start,
  input  logic [LW-1:0] rd_end,
  output logic          scan_valid,
  output logic [LW-1:0] scan_start,
  output logic [LW-1:0] scan_end,
  output logic          merge_valid,
  output logic [LW-1:0] merge_start,
  output logic [LW-1:0] merge_end,
  output logic          dump_valid,
  output logic [LW-1:0] dump_start,
  output logic [LW-1:0] dump_end
);

  always_comb begin
    scan_valid  = (sel == RD_SCAN);
    merge_valid = (sel == RD_MERGE);
    dump_valid  = (sel == RD_DUMP);
    scan_start  = scan_valid  ? rd_start : '0;
    scan_end    = scan_valid  ? rd_end   : '0;
    merge_start = merge_valid ? rd_start : '0;
    merge_end   = merge_valid ? rd_end   : '0;
    dump_start  = dump_valid  ? rd_start : '0;
    dump_end    = dump_valid  ? rd_end   : '0;
  end

endmodule
