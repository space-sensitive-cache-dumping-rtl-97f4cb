// Test of the greedy tracker with a coarser table granularity: 1024 lines
// tracked in units of 4 lines (256 units, 8-bit addresses), K = 8. Random
// line updates with locality go in; the reference model runs on unit
// numbers (line / 4). Each dump must send the 4 lines of every unit covered
// by the reference intervals, in ascending order, which includes every
// written line. The table is also compared after every burst.
module tb_greedy_granularity;
  import greedy_ref_pkg::*;

  localparam int unsigned NUM_LINES = 1024;
  localparam int unsigned U  = 4;
  localparam int unsigned K  = 8;
  localparam int unsigned LW = 10, CW = 4;

  logic          clk = 1'b0, rst;
  logic          upd_valid, busy, dump, dump_done, l2_req_valid, l2_req_ready, idle;
  logic [LW-1:0] upd_line, l2_req_line;
  logic [CW-1:0] num_intervals;
  logic          ev_hit, ev_extend, ev_merge, ev_insert, ev_shift, ev_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  greedy_tracker #(.NUM_LINES(NUM_LINES), .K(K), .BUF_DEPTH(4), .LINES_PER_UNIT(U)) dut (.*);

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

  int got_q[$];
  always @(posedge clk) if (l2_req_valid && l2_req_ready) got_q.push_back(int'(l2_req_line));
  always @(negedge clk) l2_req_ready <= ($urandom % 2) == 0;

  initial begin
    iv_t ref_q[$];
    bit  upd[NUM_LINES];
    int  exp_q[$];
    int  hot, line, moves, cyc, merges;
    rst = 1'b1; upd_valid = 1'b0; upd_line = '0; dump = 1'b0;
    merges = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int period = 0; period < 10; period++) begin
      upd = '{default: 1'b0};
      for (int burst = 0; burst < 5; burst++) begin
        hot = $urandom % NUM_LINES;
        for (int u = 0; u < 12; u++) begin
          @(negedge clk);
          while (busy) @(negedge clk);
          line = (hot + ($urandom % 40)) % NUM_LINES;
          upd_valid = 1'b1;
          upd_line  = LW'(line);
          upd[line] = 1'b1;
          if (ref_update(ref_q, line / U, K, moves, cyc) == K_MERGE) merges++;
          @(negedge clk);
          upd_valid = 1'b0;
        end
        while (!(idle && dut.buf_empty)) @(negedge clk);
        check(int'(num_intervals) == ref_q.size(), "interval count");
        foreach (ref_q[i])
          check(int'(dut.u_table.start_q[i]) == ref_q[i].s && int'(dut.u_table.end_q[i]) == ref_q[i].e,
                $sformatf("period %0d: I[%0d] = (%0d,%0d), expected (%0d,%0d)", period, i,
                          dut.u_table.start_q[i], dut.u_table.end_q[i], ref_q[i].s, ref_q[i].e));
      end
      exp_q = {};
      foreach (ref_q[i]) for (int l = ref_q[i].s * U; l <= ref_q[i].e * U + U - 1; l++) exp_q.push_back(l);
      got_q = {};
      @(negedge clk);
      dump = 1'b1;
      @(negedge clk);
      dump = 1'b0;
      wait (dump_done);
      @(posedge clk);
      @(negedge clk);
      check(got_q == exp_q, $sformatf("period %0d: dumped %0d lines, expected %0d", period, got_q.size(), exp_q.size()));
      foreach (upd[l]) if (upd[l]) check(l inside {got_q}, $sformatf("period %0d: line %0d not dumped", period, l));
      ref_q = {};
    end
    check(merges > 0, "no merge happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
