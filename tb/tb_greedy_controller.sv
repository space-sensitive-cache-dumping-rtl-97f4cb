// Directed test of greedy_controller, driven through the tracker it controls
// (K = 3 intervals, 16 lines, as in the worked examples of the method).
//   Example A: table (0,3) (9,10) (14,15), line 7. Smallest local gap 1 (to
//     line 9), smallest global gap 3 (lines 11..13): interval (9,10) is
//     extended to (7,10).
//   Example B: table (0,2) (5,6) (10,10), line 14. Smallest global gap 2
//     (lines 3..4), smallest local gap 3 (lines 11..13): (0,2) and (5,6) are
//     merged to (0,6), (10,10) moves down, (14,14) is stored. This is the
//     worst case, 2K+1 = 7 cycles.
//   Example C: table (5,5) (10,10) (12,12), line 0: the pair (10,10) (12,12)
//     is merged and the line is stored below it, so (5,5) moves up.
// Also checked: a line already covered changes nothing, and the cycle count
// of every update.
module tb_greedy_controller;
  localparam int unsigned NUM_LINES = 16;
  localparam int unsigned K  = 3;
  localparam int unsigned LW = 4, CW = 2;

  logic          clk = 1'b0, rst;
  logic          upd_valid, busy, dump, dump_done, l2_req_valid, l2_req_ready, idle;
  logic [LW-1:0] upd_line, l2_req_line;
  logic [CW-1:0] num_intervals;
  logic          ev_hit, ev_extend, ev_merge, ev_insert, ev_shift, ev_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  greedy_tracker #(.NUM_LINES(NUM_LINES), .K(K), .BUF_DEPTH(4)) dut (.*);

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

  // minima seen by the controller when it decides
  int seen_local, seen_global, n_ext, n_merge, n_hit, n_shift;
  always @(posedge clk) begin
    if (ev_extend || ev_merge) begin
      seen_local  = int'(dut.min_local);
      seen_global = int'(dut.min_global);
    end
    if (ev_extend) n_ext++;
    if (ev_merge)  n_merge++;
    if (ev_hit)    n_hit++;
    if (ev_shift)  n_shift++;
  end

  // one update, returns the number of cycles the controller was busy with it
  task automatic update(input int line, output int cyc);
    bit started = 0;
    @(negedge clk);
    upd_valid = 1'b1;
    upd_line  = LW'(line);
    @(negedge clk);
    upd_valid = 1'b0;
    cyc = 0;
    forever begin
      if (!idle) begin cyc++; started = 1; end
      else if (started) break;
      @(negedge clk);
    end
  endtask

  task automatic expect_table(input int exp[6], input int n, input string what);
    check(int'(num_intervals) == n, $sformatf("%s: %0d intervals, expected %0d", what, num_intervals, n));
    for (int i = 0; i < n; i++)
      check(int'(dut.u_table.start_q[i]) == exp[2*i] && int'(dut.u_table.end_q[i]) == exp[2*i+1],
            $sformatf("%s: I[%0d] = (%0d,%0d), expected (%0d,%0d)", what, i,
                      dut.u_table.start_q[i], dut.u_table.end_q[i], exp[2*i], exp[2*i+1]));
  endtask

  task automatic do_dump();
    @(negedge clk);
    dump = 1'b1;
    @(negedge clk);
    dump = 1'b0;
    wait (dump_done);
    @(posedge clk);
    @(negedge clk);
    check(!busy, "busy still high after the dump");
  endtask

  initial begin
    int cyc;
    rst = 1'b1; upd_valid = 1'b0; upd_line = '0; dump = 1'b0; l2_req_ready = 1'b1;
    n_ext = 0; n_merge = 0; n_hit = 0; n_shift = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // Example A
    update(0, cyc);  check(cyc == 2, $sformatf("first insert took %0d cycles", cyc));
    update(1, cyc);  check(cyc == 2, $sformatf("adjacent extend took %0d cycles", cyc));
    update(2, cyc);
    update(3, cyc);
    update(9, cyc);  check(cyc == 3, $sformatf("append took %0d cycles", cyc));
    update(10, cyc);
    update(14, cyc);
    update(15, cyc);
    expect_table('{0, 3, 9, 10, 14, 15}, 3, "example A before");
    update(2, cyc);
    check(n_hit == 1 && cyc == 1, $sformatf("covered line: hit %0d, %0d cycles", n_hit, cyc));
    n_ext = 0;
    update(7, cyc);
    check(n_ext == 1, "example A: no extension");
    check(seen_local == 1 && seen_global == 3,
          $sformatf("example A: min local %0d, min global %0d, expected 1 and 3", seen_local, seen_global));
    check(cyc == K + 1, $sformatf("example A took %0d cycles, expected %0d", cyc, K + 1));
    expect_table('{0, 3, 7, 10, 14, 15}, 3, "example A after");
    do_dump();
    check(num_intervals == 0, "table not emptied by the dump");

    // Example B
    update(0, cyc); update(1, cyc); update(2, cyc);
    update(5, cyc); update(6, cyc); update(10, cyc);
    expect_table('{0, 2, 5, 6, 10, 10}, 3, "example B before");
    n_merge = 0; n_shift = 0;
    update(14, cyc);
    check(n_merge == 1, "example B: no merge");
    check(seen_global == 2 && seen_local == 3,
          $sformatf("example B: min global %0d, min local %0d, expected 2 and 3", seen_global, seen_local));
    check(n_shift == 1, $sformatf("example B: %0d moves, expected 1", n_shift));
    check(cyc == 2 * K + 1, $sformatf("example B took %0d cycles, expected %0d", cyc, 2 * K + 1));
    expect_table('{0, 6, 10, 10, 14, 14}, 3, "example B after");
    do_dump();

    // Example C
    update(5, cyc); update(10, cyc); update(12, cyc);
    expect_table('{5, 5, 10, 10, 12, 12}, 3, "example C before");
    n_merge = 0; n_shift = 0;
    update(0, cyc);
    check(n_merge == 1 && n_shift == 1, $sformatf("example C: merges %0d moves %0d", n_merge, n_shift));
    check(cyc == 2 * K + 1, $sformatf("example C took %0d cycles, expected %0d", cyc, 2 * K + 1));
    expect_table('{0, 0, 5, 5, 10, 12}, 3, "example C after");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
