// Test of greedy_tracker at its default size (16384 lines, K = 16, 4-entry
// buffer).
// Part 1, isolated updates: each update is sent alone; afterwards the whole
//   Interval Table must equal the reference model's, and the number of
//   cycles the controller spent must equal the reference's count, never more
//   than 2K+1.
// Part 2, back-to-back updates: bursts that fill the buffer; the processor
//   is stalled by busy; updates follow each other without idle cycles, and
//   the table is compared after each burst.
// Each part ends with dumps whose line streams are compared with the
// reference intervals.
module tb_greedy_tracker;
  import greedy_ref_pkg::*;

  localparam int unsigned NUM_LINES = 16384;
  localparam int unsigned K  = 16;
  localparam int unsigned LW = 14, CW = 5;

  logic          clk = 1'b0, rst;
  logic          upd_valid, busy, dump, dump_done, l2_req_valid, l2_req_ready, idle;
  logic [LW-1:0] upd_line, l2_req_line;
  logic [CW-1:0] num_intervals;
  logic          ev_hit, ev_extend, ev_merge, ev_insert, ev_shift, ev_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  greedy_tracker dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iv_t ref_q[$];
  int  got_q[$];
  int  hot = 0, max_cyc = 0, kinds[4];
  always @(posedge clk) if (l2_req_valid && l2_req_ready) got_q.push_back(int'(l2_req_line));
  always @(negedge clk) l2_req_ready <= ($urandom % 3) != 0;

  function automatic int next_line();
    if (($urandom % 20) == 0) hot = $urandom % NUM_LINES;
    return (hot + ($urandom % 200)) % NUM_LINES;
  endfunction

  task automatic compare_table(input string what);
    check(int'(num_intervals) == ref_q.size(),
          $sformatf("%s: %0d intervals, expected %0d", what, num_intervals, ref_q.size()));
    foreach (ref_q[i])
      if (int'(dut.u_table.start_q[i]) != ref_q[i].s || int'(dut.u_table.end_q[i]) != ref_q[i].e) begin
        check(0, $sformatf("%s: I[%0d] = (%0d,%0d), expected (%0d,%0d)", what, i,
                           dut.u_table.start_q[i], dut.u_table.end_q[i], ref_q[i].s, ref_q[i].e));
        break;
      end
  endtask

  task automatic dump_and_check(input string what);
    int exp_q[$];
    exp_q = {};
    foreach (ref_q[i]) for (int l = ref_q[i].s; l <= ref_q[i].e; l++) exp_q.push_back(l);
    got_q = {};
    @(negedge clk);
    dump = 1'b1;
    @(negedge clk);
    dump = 1'b0;
    check(busy, "busy not raised by the dump");
    wait (dump_done);
    @(posedge clk);
    @(negedge clk);
    check(got_q == exp_q, $sformatf("%s: dumped %0d lines, expected %0d", what, got_q.size(), exp_q.size()));
    check(num_intervals == 0 && !busy, "table not emptied / busy after dump");
    ref_q = {};
  endtask

  initial begin
    int line, moves, cyc, rcyc, gaps;
    bit started;
    kind_e kind;
    rst = 1'b1; upd_valid = 1'b0; upd_line = '0; dump = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // Part 1
    for (int round = 0; round < 3; round++) begin
      for (int u = 0; u < 400; u++) begin
        line = next_line();
        @(negedge clk);
        upd_valid = 1'b1;
        upd_line  = LW'(line);
        kind = ref_update(ref_q, line, K, moves, rcyc);
        kinds[kind]++;
        @(negedge clk);
        upd_valid = 1'b0;
        cyc = 0; started = 0;
        forever begin
          if (!idle) begin cyc++; started = 1; end
          else if (started) break;
          @(negedge clk);
        end
        if (cyc > max_cyc) max_cyc = cyc;
        check(cyc == rcyc, $sformatf("update %0d (line %0d, kind %0d) took %0d cycles, expected %0d",
                                     u, line, kind, cyc, rcyc));
        compare_table($sformatf("round %0d update %0d", round, u));
      end
      dump_and_check($sformatf("part 1 round %0d", round));
    end
    check(max_cyc <= 2 * K + 1, $sformatf("slowest update %0d cycles, bound %0d", max_cyc, 2 * K + 1));
    check(max_cyc == 2 * K + 1, $sformatf("worst case (%0d cycles) never reached", 2 * K + 1));
    foreach (kinds[i]) check(kinds[i] > 0, $sformatf("decision kind %0d never taken", i));

    // Part 2
    for (int burst = 0; burst < 40; burst++) begin
      for (int u = 0; u < 30; u++) begin
        @(negedge clk);
        while (busy) @(negedge clk);
        line = next_line();
        upd_valid = 1'b1;
        upd_line  = LW'(line);
        void'(ref_update(ref_q, line, K, moves, rcyc));
        @(negedge clk);
        upd_valid = 1'b0;
      end
      // count idle controller cycles while work is queued
      gaps = 0;
      while (!(idle && !busy && dut.buf_empty)) begin
        if (idle && !dut.buf_empty) gaps++;
        @(negedge clk);
      end
      check(gaps <= 1, $sformatf("burst %0d: controller idle %0d cycles with updates queued", burst, gaps));
      compare_table($sformatf("burst %0d", burst));
      if (burst % 10 == 9) dump_and_check($sformatf("part 2 burst %0d", burst));
    end
    $display("slowest update %0d cycles; hits %0d extends %0d inserts %0d merges %0d",
             max_cyc, kinds[K_HIT], kinds[K_EXTEND], kinds[K_INSERT], kinds[K_MERGE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
