// Test of interval_demux: for every select value and random read data, the
// selected consumer gets the data with valid high, the others valid low and
// zero data.
module tb_interval_demux;
  import cache_dump_pkg::*;
  localparam int unsigned LW = 14;

  rd_sel_e       sel;
  logic [LW-1:0] rd_start, rd_end;
  logic          scan_valid, merge_valid, dump_valid;
  logic [LW-1:0] scan_start, scan_end, merge_start, merge_end, dump_start, dump_end;
  int checks = 0, failures = 0;

  interval_demux #(.LW(LW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      sel      = rd_sel_e'(t % 4);
      rd_start = LW'($urandom);
      rd_end   = LW'($urandom);
      #1;
      check(scan_valid  == (sel == RD_SCAN),  "scan valid");
      check(merge_valid == (sel == RD_MERGE), "merge valid");
      check(dump_valid  == (sel == RD_DUMP),  "dump valid");
      check({scan_start, scan_end}   == ((sel == RD_SCAN)  ? {rd_start, rd_end} : '0), "scan data");
      check({merge_start, merge_end} == ((sel == RD_MERGE) ? {rd_start, rd_end} : '0), "merge data");
      check({dump_start, dump_end}   == ((sel == RD_DUMP)  ? {rd_start, rd_end} : '0), "dump data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
