// Test of interval_table: random writes and reads against an array model.
// Checks that a read returns the entry at once (asynchronous read port),
// that a write shows from the next cycle, and that reading the address being
// written returns the old entry in that cycle.
module tb_interval_table;
  localparam int unsigned K  = 16;
  localparam int unsigned LW = 14;
  localparam int unsigned AW = 4;

  logic          clk = 1'b0, rst, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [LW-1:0] rd_start, rd_end, wr_start, wr_end;
  int checks = 0, failures = 0;
  int ms[K], me[K];

  always #5 clk = ~clk;

  interval_table #(.K(K), .LW(LW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; wr_en = 1'b0; rd_addr = '0; wr_addr = '0; wr_start = '0; wr_end = '0;
    foreach (ms[i]) begin ms[i] = 0; me[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      wr_en    = ($urandom % 2) == 0;
      wr_addr  = AW'($urandom);
      wr_start = LW'($urandom);
      wr_end   = LW'($urandom);
      rd_addr  = (cyc % 5 == 0) ? wr_addr : AW'($urandom);
      #1;
      check(int'(rd_start) == ms[rd_addr] && int'(rd_end) == me[rd_addr],
            $sformatf("read %0d: (%0d,%0d) expected (%0d,%0d)", rd_addr, rd_start, rd_end, ms[rd_addr], me[rd_addr]));
      @(posedge clk);
      if (wr_en) begin ms[wr_addr] = int'(wr_start); me[wr_addr] = int'(wr_end); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
