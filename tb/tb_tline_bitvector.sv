// Test of tline_bitvector: random line updates, then a dump. The dumped
// stream must be the T lines of every touched T-line group in ascending
// order, every updated line among them, and the vector empty afterwards.
// With the L2 side always ready the dump must take one cycle per bit plus T
// per set bit, plus the done cycle; busy must cover the whole dump. Runs at
// T = 4 and at T = 1 (plain bit-vector).
module tb_tline_bitvector;
  localparam int unsigned NUM_LINES = 128;
  localparam int unsigned LW = 7;

  logic          clk = 1'b0, rst;
  logic          upd_valid, dump;
  logic [LW-1:0] upd_line;
  logic          busy4, done4, v4, busy1, done1, v1, ready;
  logic [LW-1:0] line4, line1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tline_bitvector #(.NUM_LINES(NUM_LINES), .LINES_PER_BIT(4)) dut4 (
    .clk, .rst, .upd_valid, .upd_line, .busy(busy4), .dump, .dump_done(done4),
    .l2_req_valid(v4), .l2_req_line(line4), .l2_req_ready(ready));
  tline_bitvector #(.NUM_LINES(NUM_LINES), .LINES_PER_BIT(1)) dut1 (
    .clk, .rst, .upd_valid, .upd_line, .busy(busy1), .dump, .dump_done(done1),
    .l2_req_valid(v1), .l2_req_line(line1), .l2_req_ready(ready));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got4[$], got1[$];
  int cyc4, cyc1;
  bit run4, run1;
  always @(posedge clk) begin
    if (v4 && ready) got4.push_back(int'(line4));
    if (v1 && ready) got1.push_back(int'(line1));
    if (busy4) cyc4++;
    if (busy1) cyc1++;
  end

  initial begin
    bit upd[NUM_LINES];
    int exp4[$], exp1[$];
    int hot, l, set4, set1;
    bit full_rate;
    rst = 1'b1; upd_valid = 1'b0; dump = 1'b0; upd_line = '0; ready = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 20; t++) begin
      upd = '{default: 1'b0};
      hot = $urandom % NUM_LINES;
      for (int u = 0; u < ((t == 3) ? 0 : 30); u++) begin
        @(negedge clk);
        l = (hot + ($urandom % 20)) % NUM_LINES;
        upd_valid = 1'b1; upd_line = LW'(l); upd[l] = 1'b1;
      end
      @(negedge clk);
      upd_valid = 1'b0;
      exp4 = {}; exp1 = {}; set4 = 0; set1 = 0;
      for (int b = 0; b < NUM_LINES / 4; b++)
        if (upd[4*b] || upd[4*b+1] || upd[4*b+2] || upd[4*b+3]) begin
          set4++;
          for (int o = 0; o < 4; o++) exp4.push_back(4 * b + o);
        end
      for (int b = 0; b < NUM_LINES; b++) if (upd[b]) begin set1++; exp1.push_back(b); end
      got4 = {}; got1 = {};
      full_rate = (t % 2 == 0);
      dump = 1'b1;
      @(negedge clk);
      dump = 1'b0;
      cyc4 = 0; cyc1 = 0;
      check(busy4 && busy1, "busy not raised by the dump");
      while (busy4 || busy1) begin
        ready = full_rate ? 1'b1 : ($urandom % 2 == 0);
        @(negedge clk);
      end
      ready = 1'b1;
      check(got4 == exp4, $sformatf("dump %0d (T=4): %0d lines, expected %0d", t, got4.size(), exp4.size()));
      check(got1 == exp1, $sformatf("dump %0d (T=1): %0d lines, expected %0d", t, got1.size(), exp1.size()));
      if (full_rate) begin
        check(cyc4 == NUM_LINES / 4 + 4 * set4 + 1, $sformatf("T=4 dump took %0d cycles, expected %0d", cyc4, NUM_LINES / 4 + 4 * set4 + 1));
        check(cyc1 == NUM_LINES + set1 + 1, $sformatf("T=1 dump took %0d cycles, expected %0d", cyc1, NUM_LINES + set1 + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
