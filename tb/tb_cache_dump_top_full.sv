// Full-size run of cache_dump_top with its default parameters: a 16384-line
// L2 (2 MB, 128-byte lines), a 16-interval table with a 4-entry buffer, and
// a 4-lines/bit vector of 4096 bits. One complete tracking period: 3000
// updates with spatial locality go to both trackers, then both dump. Each
// dumped stream is compared with an independent reference, every updated
// line must be dumped, and the dump overhead (non-updated lines dumped, as a
// share of all cache lines) is printed for both.
module tb_cache_dump_top_full;
  import greedy_ref_pkg::*;

  localparam int NUM_LINES = 16384;
  localparam int K         = 16;
  localparam int T         = 4;
  localparam int UPDATES   = 3000;

  logic        clk = 1'b0, rst;
  logic        g_upd_valid, g_busy, g_dump, g_dump_done, g_l2_req_valid, g_l2_req_ready, g_idle;
  logic [13:0] g_upd_line, g_l2_req_line;
  logic [4:0]  g_num_intervals;
  logic [5:0]  g_events;
  logic        b_upd_valid, b_busy, b_dump, b_dump_done, b_l2_req_valid, b_l2_req_ready;
  logic [13:0] b_upd_line, b_l2_req_line;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cache_dump_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g_got[$], b_got[$];
  bit g_fin = 0, b_fin = 0;
  int stalls = 0, merges = 0;
  assign g_l2_req_ready = 1'b1;
  assign b_l2_req_ready = 1'b1;
  always @(posedge clk) if (!rst) begin
    if (g_l2_req_valid) g_got.push_back(int'(g_l2_req_line));
    if (b_l2_req_valid) b_got.push_back(int'(b_l2_req_line));
    if (g_dump_done) g_fin = 1;
    if (b_dump_done) b_fin = 1;
    if (g_events[2]) merges++;
  end

  initial begin
    iv_t ref_q[$];
    bit  upd[NUM_LINES];
    bit  grp[NUM_LINES / T];
    int  exp_q[$];
    int  hot, line, moves, cyc, nupd, sent;
    rst = 1'b1;
    {g_upd_valid, b_upd_valid, g_dump, b_dump} = '0;
    g_upd_line = '0;
    b_upd_line = '0;
    hot = 1000;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    sent = 0;
    while (sent < UPDATES) begin
      @(negedge clk);
      g_upd_valid = 1'b0;
      b_upd_valid = 1'b0;
      if (g_busy) begin
        stalls++;
        continue;
      end
      if (($urandom % 50) == 0) hot = $urandom % NUM_LINES;
      line = (hot + ($urandom % 300)) % NUM_LINES;
      g_upd_valid = 1'b1; g_upd_line = 14'(line);
      b_upd_valid = 1'b1; b_upd_line = 14'(line);
      upd[line] = 1'b1;
      grp[line / T] = 1'b1;
      void'(ref_update(ref_q, line, K, moves, cyc));
      sent++;
    end
    @(negedge clk);
    g_upd_valid = 1'b0;
    b_upd_valid = 1'b0;
    g_dump = 1'b1;
    b_dump = 1'b1;
    @(negedge clk);
    g_dump = 1'b0;
    b_dump = 1'b0;
    wait (g_fin && b_fin);
    @(negedge clk);
    nupd = 0;
    foreach (upd[l]) if (upd[l]) nupd++;
    // greedy
    exp_q = {};
    foreach (ref_q[i]) for (int l = ref_q[i].s; l <= ref_q[i].e; l++) exp_q.push_back(l);
    check(g_got == exp_q, $sformatf("greedy dumped %0d lines, expected %0d", g_got.size(), exp_q.size()));
    foreach (upd[l]) if (upd[l]) check(l inside {g_got}, $sformatf("greedy missed line %0d", l));
    // bit-vector
    exp_q = {};
    foreach (grp[b]) if (grp[b]) for (int o = 0; o < T; o++) exp_q.push_back(b * T + o);
    check(b_got == exp_q, $sformatf("bitvector dumped %0d lines, expected %0d", b_got.size(), exp_q.size()));
    check(stalls > 0 && merges > 0, "no stall or no merge in the full-size run");
    $display("updated %0d lines; greedy K=%0d dumped %0d (overhead %0.2f%%), %0d-lines/bit dumped %0d (overhead %0.2f%%)",
             nupd, K, g_got.size(), 100.0 * (g_got.size() - nupd) / NUM_LINES,
             T, b_got.size(), 100.0 * (b_got.size() - nupd) / NUM_LINES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
