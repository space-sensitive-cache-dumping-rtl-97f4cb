// End-to-end test of both trackers in cache_dump_top.
//
// A random stream of line updates with spatial locality (a hot region that
// moves now and then, small offsets around it) is sent to both trackers,
// respecting busy. After each batch both are asked to dump. The lines each
// tracker dumps are compared, in order, with an independent reference:
//   greedy:    the union of the intervals of greedy_ref_pkg, ascending;
//   bitvector: all T lines of every touched T-line group, ascending.
// Every updated line must be among the dumped ones. The DUT's event strobes
// are compared in total with the reference's decisions, and each mechanism
// (hit, extend, insert, merge, shift, buffer-full stall, both dumps, an empty
// dump) must occur at least once. The overhead of each tracker is printed.
module tb_cache_dump_top;
  import greedy_ref_pkg::*;

  localparam int unsigned NUM_LINES = 256;
  localparam int unsigned K         = 4;
  localparam int unsigned BUF_DEPTH = 4;
  localparam int unsigned T         = 4;
  localparam int unsigned LW        = $clog2(NUM_LINES);
  localparam int unsigned CW        = $clog2(K + 1);
  localparam int          PHASES    = 12;
  localparam int          UPDATES   = 60;

  logic          clk = 1'b0;
  logic          rst;
  logic          g_upd_valid, g_busy, g_dump, g_dump_done, g_l2_req_valid, g_l2_req_ready, g_idle;
  logic [LW-1:0] g_upd_line, g_l2_req_line;
  logic [CW-1:0] g_num_intervals;
  logic [5:0]    g_events;
  logic          b_upd_valid, b_busy, b_dump, b_dump_done, b_l2_req_valid, b_l2_req_ready;
  logic [LW-1:0] b_upd_line, b_l2_req_line;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cache_dump_top #(.NUM_LINES(NUM_LINES), .K(K), .BUF_DEPTH(BUF_DEPTH), .LINES_PER_BIT(T)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // L2 side: accepts a request on about 3 of 4 cycles
  always @(negedge clk) begin
    g_l2_req_ready <= ($urandom % 4) != 0;
    b_l2_req_ready <= ($urandom % 4) != 0;
  end

  // collect dumped lines and events
  int g_got[$], b_got[$];
  int ev_cnt[6];
  int g_dones = 0, b_dones = 0;
  always @(posedge clk) if (!rst) begin
    if (g_l2_req_valid && g_l2_req_ready) g_got.push_back(int'(g_l2_req_line));
    if (b_l2_req_valid && b_l2_req_ready) b_got.push_back(int'(b_l2_req_line));
    for (int i = 0; i < 6; i++) if (g_events[i]) ev_cnt[i]++;
    if (g_dump_done) g_dones++;
    if (b_dump_done) b_dones++;
  end

  iv_t ref_q[$];
  bit  g_upd[NUM_LINES], b_upd[NUM_LINES], b_grp[NUM_LINES / T];
  int  ref_kind_cnt[4];
  int  ref_moves = 0, stalls = 0, empty_dumps = 0;
  int  hot = 0;
  int  g_tot_upd = 0, g_tot_dump = 0, b_tot_upd = 0, b_tot_dump = 0;

  function automatic int next_line();
    if (($urandom % 16) == 0) hot = $urandom % NUM_LINES;
    return (hot + ($urandom % 24)) % NUM_LINES;
  endfunction

  task automatic check_dumps(input int phase);
    int exp_q[$];
    int nupd;
    // greedy
    exp_q = {};
    foreach (ref_q[i]) for (int l = ref_q[i].s; l <= ref_q[i].e; l++) exp_q.push_back(l);
    check(g_got.size() == exp_q.size(),
          $sformatf("phase %0d greedy dumped %0d lines, expected %0d", phase, g_got.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < g_got.size(); i++)
      if (g_got[i] != exp_q[i]) begin
        check(0, $sformatf("phase %0d greedy dump #%0d is line %0d, expected %0d", phase, i, g_got[i], exp_q[i]));
        break;
      end
    nupd = 0;
    for (int l = 0; l < NUM_LINES; l++) if (g_upd[l]) begin
      nupd++;
      check(l inside {g_got}, $sformatf("phase %0d greedy did not dump updated line %0d", phase, l));
    end
    g_tot_upd += nupd;
    g_tot_dump += g_got.size();
    if (nupd == 0) empty_dumps++;
    // bitvector
    exp_q = {};
    for (int b = 0; b < NUM_LINES / T; b++) if (b_grp[b]) for (int o = 0; o < T; o++) exp_q.push_back(b * T + o);
    check(b_got == exp_q, $sformatf("phase %0d bitvector dumped %0d lines, expected %0d", phase, b_got.size(), exp_q.size()));
    nupd = 0;
    for (int l = 0; l < NUM_LINES; l++) if (b_upd[l]) begin
      nupd++;
      check(l inside {b_got}, $sformatf("phase %0d bitvector did not dump updated line %0d", phase, l));
    end
    b_tot_upd += nupd;
    b_tot_dump += b_got.size();
  endtask

  initial begin
    int g_sent, b_sent, line, moves, cyc, nupd_phase, gd0, bd0;
    kind_e kind;
    rst = 1'b1;
    {g_upd_valid, b_upd_valid, g_dump, b_dump} = '0;
    g_upd_line = '0;
    b_upd_line = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int ph = 0; ph < PHASES; ph++) begin
      // the last phase sends nothing: a dump of an empty record
      nupd_phase = (ph == PHASES - 1) ? 0 : UPDATES;
      g_sent = 0;
      b_sent = 0;
      while (g_sent < nupd_phase || b_sent < nupd_phase) begin
        @(negedge clk);
        g_upd_valid = 1'b0;
        b_upd_valid = 1'b0;
        // greedy: bursts in even phases fill the buffer
        if (g_sent < nupd_phase && ((ph % 2 == 0) || ($urandom % 3 == 0))) begin
          if (g_busy) stalls++;
          else begin
            line = next_line();
            g_upd_valid = 1'b1;
            g_upd_line  = LW'(line);
            g_upd[line] = 1'b1;
            kind = ref_update(ref_q, line, K, moves, cyc);
            ref_kind_cnt[kind]++;
            ref_moves += moves;
            g_sent++;
          end
        end
        if (b_sent < nupd_phase && !b_busy && ($urandom % 2 == 0)) begin
          line = (hot + ($urandom % 24)) % NUM_LINES;
          b_upd_valid = 1'b1;
          b_upd_line  = LW'(line);
          b_upd[line] = 1'b1;
          b_grp[line / T] = 1'b1;
          b_sent++;
        end
      end
      @(negedge clk);
      g_upd_valid = 1'b0;
      b_upd_valid = 1'b0;
      gd0 = g_dones;
      bd0 = b_dones;
      g_dump = 1'b1;
      b_dump = 1'b1;
      @(negedge clk);
      g_dump = 1'b0;
      b_dump = 1'b0;
      check(g_busy && b_busy, "busy not raised by the dump request");
      wait (g_dones > gd0 && b_dones > bd0);
      @(negedge clk);
      check(!g_busy && !b_busy, "busy still high after the dump");
      check_dumps(ph);
      check(g_num_intervals == 0, "greedy table not emptied by the dump");
      ref_q = {};
      g_got = {};
      b_got = {};
      g_upd = '{default: 1'b0};
      b_upd = '{default: 1'b0};
      b_grp = '{default: 1'b0};
    end
    // decisions of the DUT against the reference
    check(ev_cnt[0] == ref_kind_cnt[K_HIT],    $sformatf("hits %0d vs %0d", ev_cnt[0], ref_kind_cnt[K_HIT]));
    check(ev_cnt[1] == ref_kind_cnt[K_EXTEND], $sformatf("extends %0d vs %0d", ev_cnt[1], ref_kind_cnt[K_EXTEND]));
    check(ev_cnt[2] == ref_kind_cnt[K_MERGE],  $sformatf("merges %0d vs %0d", ev_cnt[2], ref_kind_cnt[K_MERGE]));
    check(ev_cnt[3] == ref_kind_cnt[K_INSERT], $sformatf("inserts %0d vs %0d", ev_cnt[3], ref_kind_cnt[K_INSERT]));
    check(ev_cnt[4] == ref_moves,              $sformatf("shift moves %0d vs %0d", ev_cnt[4], ref_moves));
    check(ev_cnt[5] == (PHASES - 1) * UPDATES, $sformatf("updates completed %0d", ev_cnt[5]));
    // every mechanism must have happened
    $display("mechanisms: hit=%0d extend=%0d merge=%0d insert=%0d shift=%0d stall=%0d greedy_dumps=%0d bitvector_dumps=%0d empty_dumps=%0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], stalls, g_dones, b_dones, empty_dumps);
    check(ev_cnt[0] > 0, "no membership hit happened");
    check(ev_cnt[1] > 0, "no interval extension happened");
    check(ev_cnt[2] > 0, "no global merge happened");
    check(ev_cnt[3] > 0, "no singleton insert happened");
    check(ev_cnt[4] > 0, "no interval shift happened");
    check(stalls > 0, "the update buffer never filled (no stall)");
    check(g_dones == PHASES && b_dones == PHASES, "dump count");
    check(empty_dumps > 0, "no dump of an empty record");
    $display("overhead: greedy K=%0d dumped %0d for %0d updated lines; %0d-lines/bit dumped %0d for %0d",
             K, g_tot_dump, g_tot_upd, T, b_tot_dump, b_tot_upd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
