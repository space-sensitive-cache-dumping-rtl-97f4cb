// Test of min_global_gap: scans of random sorted interval lists (1 to K
// entries, gaps from 0 up, deliberate ties) are fed one interval per cycle,
// as the controller does; afterwards the minimum gap and the index of its
// left interval must equal the values computed here (leftmost on ties, the
// "no gap" value NUM_LINES for a single interval).
module tb_min_global_gap;
  localparam int unsigned NUM_LINES = 16384;
  localparam int unsigned K  = 16;
  localparam int unsigned LW = 14, GW = 15, AW = 4;

  logic          clk = 1'b0, rst, clear, valid, first;
  logic [AW-1:0] idx, min_idx;
  logic [LW-1:0] cur_start, prev_end;
  logic [GW-1:0] min_gap;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  min_global_gap #(.NUM_LINES(NUM_LINES), .K(K)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[K], e[K];
    int n, pos, best, bi, gap;
    rst = 1'b1; clear = 1'b0; valid = 1'b0; first = 1'b0; idx = '0; cur_start = '0; prev_end = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      n = 1 + ($urandom % K);
      pos = $urandom % 50;
      for (int i = 0; i < n; i++) begin
        s[i] = pos + ((t % 4 == 0) ? 3 : ($urandom % 60));
        e[i] = s[i] + ($urandom % 20);
        pos = e[i] + 1;
      end
      best = NUM_LINES; bi = 0;
      for (int i = 1; i < n; i++) begin
        gap = s[i] - e[i-1] - 1;
        if (gap < best) begin best = gap; bi = i - 1; end
      end
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int i = 0; i < n; i++) begin
        valid = 1'b1; first = (i == 0); idx = AW'(i);
        cur_start = LW'(s[i]); prev_end = (i > 0) ? LW'(e[i-1]) : LW'($urandom);
        @(negedge clk);
      end
      valid = 1'b0;
      cur_start = LW'($urandom);
      @(negedge clk);
      check(int'(min_gap) == best, $sformatf("scan %0d: min gap %0d expected %0d", t, min_gap, best));
      check(int'(min_idx) == bi, $sformatf("scan %0d: index %0d expected %0d", t, min_idx, bi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
