// Test of min_local_gap: a random sorted interval list and a line outside
// all intervals (below the first, between two, above the last, adjacent to
// one, equidistant from two) are scanned one interval per cycle; afterwards
// the smallest local gap, the interval to extend (left one on ties) and the
// insertion position must equal the values computed here.
module tb_min_local_gap;
  localparam int unsigned NUM_LINES = 16384;
  localparam int unsigned K  = 16;
  localparam int unsigned LW = 14, GW = 15, AW = 4, CW = 5;

  logic          clk = 1'b0, rst, clear, valid, first, last, found;
  logic [AW-1:0] idx, ext_idx;
  logic [LW-1:0] line, cur_start, cur_end, prev_end;
  logic [GW-1:0] min_gap;
  logic [CW-1:0] ins_pos;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  min_local_gap #(.NUM_LINES(NUM_LINES), .K(K)) dut (.*);

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
    int n, pos, l, p, best, bx, gl, gr, gi;
    rst = 1'b1; clear = 1'b0; valid = 1'b0; first = 1'b0; last = 1'b0; idx = '0;
    line = '0; cur_start = '0; cur_end = '0; prev_end = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 600; t++) begin
      n = 1 + ($urandom % K);
      pos = 2 + ($urandom % 50);
      for (int i = 0; i < n; i++) begin
        s[i] = pos + 1 + ($urandom % 40);
        e[i] = s[i] + ($urandom % 20);
        pos = e[i] + 1;
      end
      // choose a gap index gi (0..n) and a line inside it
      gi = $urandom % (n + 1);
      if (gi == 0) l = s[0] - 1 - ($urandom % 2);
      else if (gi == n) l = e[n-1] + 1 + ($urandom % 30);
      else begin
        case (t % 3)
          0: l = e[gi-1] + 1;                                   // adjacent left
          1: l = (e[gi-1] + s[gi]) / 2;                         // middle (ties)
          default: l = e[gi-1] + 1 + ($urandom % (s[gi] - e[gi-1] - 1));
        endcase
      end
      p = 0;
      while (p < n && s[p] < l) p++;
      best = NUM_LINES; bx = 0;
      if (p > 0) begin gl = l - e[p-1] - 1; best = gl; bx = p - 1; end
      if (p < n) begin gr = s[p] - l - 1; if (gr < best) begin best = gr; bx = p; end end
      clear = 1'b1;
      line = LW'(l);
      @(negedge clk);
      clear = 1'b0;
      for (int i = 0; i < n; i++) begin
        valid = 1'b1; first = (i == 0); last = (i == n - 1); idx = AW'(i);
        cur_start = LW'(s[i]); cur_end = LW'(e[i]);
        prev_end = (i > 0) ? LW'(e[i-1]) : LW'($urandom);
        @(negedge clk);
      end
      valid = 1'b0;
      cur_start = LW'($urandom);
      @(negedge clk);
      check(found, $sformatf("case %0d: gap of line %0d not found", t, l));
      check(int'(min_gap) == best, $sformatf("case %0d: line %0d gap %0d expected %0d", t, l, min_gap, best));
      check(int'(ext_idx) == bx, $sformatf("case %0d: line %0d extends %0d expected %0d", t, l, ext_idx, bx));
      check(int'(ins_pos) == p, $sformatf("case %0d: line %0d position %0d expected %0d", t, l, ins_pos, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
