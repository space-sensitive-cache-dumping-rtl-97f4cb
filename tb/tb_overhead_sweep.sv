// Size sweeps on the full 16384-line L2 (2 MB, 128-byte lines), all fed
// the same stream of line writes:
//   - greedy tracker with K = 4, 8, 16, 32 intervals (buffer 4);
//   - greedy tracker with K = 16 and Update Buffer depth 4, 8, 16;
//   - t-lines/bit vector with T = 2, 4, 8, 16, 32, 64.
// Writes arrive at random cycles; each tracker has its own queue of writes
// not yet accepted, and a cycle in which that queue is non-empty while the
// tracker is busy counts as a processor stall. At the end every tracker
// dumps. Each greedy dump is compared with the reference model for its K,
// each vector dump with the touched T-line groups, and every written line
// must be in every dump. The overhead (non-written lines dumped, in percent
// of all lines) and the stall cycles are printed per configuration; only the
// correctness checks decide the result.
module tb_overhead_sweep;
  import greedy_ref_pkg::*;

  localparam int N  = 16384;
  localparam int LW = 14;
  localparam int NG = 6;                       // greedy configurations
  localparam int NB = 6;                       // bit-vector configurations
  localparam int GK [NG] = '{4, 8, 16, 32, 16, 16};
  localparam int GD [NG] = '{4, 4, 4, 4, 8, 16};
  localparam int BT [NB] = '{2, 4, 8, 16, 32, 64};
  localparam int WRITES = 2500;

  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pending queue per tracker, all fed by the same arrivals
  int  pend [NG + NB][$];
  int  got  [NG + NB][$];
  int  stalls [NG + NB];
  logic [NG+NB-1:0] busy, upd_valid, done, req_valid;
  logic [LW-1:0]    upd_line [NG + NB];
  logic [LW-1:0]    req_line [NG + NB];
  logic             dump;
  bit   [NG+NB-1:0] finished;

  for (genvar i = 0; i < NG; i++) begin : g_greedy
    logic [$clog2(GK[i] + 1)-1:0] n_iv;
    logic [5:0] unused_ev;
    logic unused_idle;
    greedy_tracker #(.NUM_LINES(N), .K(GK[i]), .BUF_DEPTH(GD[i])) dut (
      .clk, .rst, .upd_valid(upd_valid[i]), .upd_line(upd_line[i]), .busy(busy[i]),
      .dump, .dump_done(done[i]), .l2_req_valid(req_valid[i]), .l2_req_line(req_line[i]),
      .l2_req_ready(1'b1), .num_intervals(n_iv),
      .ev_hit(unused_ev[0]), .ev_extend(unused_ev[1]), .ev_merge(unused_ev[2]),
      .ev_insert(unused_ev[3]), .ev_shift(unused_ev[4]), .ev_done(unused_ev[5]), .idle(unused_idle));
  end
  for (genvar j = 0; j < NB; j++) begin : g_bitvec
    tline_bitvector #(.NUM_LINES(N), .LINES_PER_BIT(BT[j])) dut (
      .clk, .rst, .upd_valid(upd_valid[NG+j]), .upd_line(upd_line[NG+j]), .busy(busy[NG+j]),
      .dump, .dump_done(done[NG+j]), .l2_req_valid(req_valid[NG+j]), .l2_req_line(req_line[NG+j]),
      .l2_req_ready(1'b1));
  end

  // drive each tracker from its queue; collect dumps
  always @(negedge clk) begin
    for (int i = 0; i < NG + NB; i++) begin
      upd_valid[i] = 1'b0;
      if (!rst && pend[i].size() > 0) begin
        if (busy[i]) stalls[i]++;
        else begin
          upd_valid[i] = 1'b1;
          upd_line[i]  = LW'(pend[i].pop_front());
        end
      end
    end
  end
  always @(posedge clk) if (!rst)
    for (int i = 0; i < NG + NB; i++) begin
      if (req_valid[i]) got[i].push_back(int'(req_line[i]));
      if (done[i]) finished[i] = 1'b1;
    end

  initial begin
    iv_t ref_q [NG][$];
    bit  wr [N];
    int  exp_q[$];
    int  hot, line, moves, cyc, nwr;
    bit  busy_all;
    rst = 1'b1; dump = 1'b0; upd_valid = '0; finished = '0;
    foreach (upd_line[i]) upd_line[i] = '0;
    hot = 4096;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < WRITES; w++) begin
      // a write every 1..40 cycles, mostly near the current hot region
      repeat (1 + ($urandom % 40)) @(posedge clk);
      if (($urandom % 150) == 0) hot = $urandom % N;
      if (($urandom % 8) == 0) hot = (hot + 1 + ($urandom % 8)) % N;
      line = (hot + ($urandom % 64)) % N;
      wr[line] = 1'b1;
      for (int i = 0; i < NG + NB; i++) pend[i].push_back(line);
      for (int i = 0; i < NG; i++) void'(ref_update(ref_q[i], line, GK[i], moves, cyc));
    end
    // let every tracker accept and process its writes
    busy_all = 1;
    while (busy_all) begin
      @(negedge clk);
      busy_all = 0;
      for (int i = 0; i < NG + NB; i++) if (pend[i].size() > 0 || busy[i]) busy_all = 1;
    end
    repeat (2 * 32 + 8) @(negedge clk);
    dump = 1'b1;
    @(negedge clk);
    dump = 1'b0;
    wait (&finished);
    @(negedge clk);
    nwr = 0;
    foreach (wr[l]) if (wr[l]) nwr++;
    $display("%0d distinct lines written out of %0d", nwr, N);
    for (int i = 0; i < NG; i++) begin
      exp_q = {};
      foreach (ref_q[i][k]) for (int l = ref_q[i][k].s; l <= ref_q[i][k].e; l++) exp_q.push_back(l);
      check(got[i] == exp_q, $sformatf("greedy K=%0d: dumped %0d lines, expected %0d", GK[i], got[i].size(), exp_q.size()));
      foreach (wr[l]) if (wr[l] && !(l inside {got[i]})) begin
        check(0, $sformatf("greedy K=%0d missed line %0d", GK[i], l));
        break;
      end
      $display("greedy K=%0d buffer=%0d: dumped %0d, overhead %0.2f%%, stall cycles %0d",
               GK[i], GD[i], got[i].size(), 100.0 * (got[i].size() - nwr) / N, stalls[i]);
    end
    for (int j = 0; j < NB; j++) begin
      exp_q = {};
      for (int b = 0; b < N / BT[j]; b++) begin
        bit any;
        any = 0;
        for (int o = 0; o < BT[j]; o++) if (wr[b * BT[j] + o]) any = 1;
        if (any) for (int o = 0; o < BT[j]; o++) exp_q.push_back(b * BT[j] + o);
      end
      check(got[NG+j] == exp_q, $sformatf("%0d-lines/bit: dumped %0d lines, expected %0d", BT[j], got[NG+j].size(), exp_q.size()));
      check(stalls[NG+j] == 0, $sformatf("%0d-lines/bit stalled the processor", BT[j]));
      $display("%0d-lines/bit: dumped %0d, overhead %0.2f%%", BT[j], got[NG+j].size(),
               100.0 * (got[NG+j].size() - nwr) / N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
