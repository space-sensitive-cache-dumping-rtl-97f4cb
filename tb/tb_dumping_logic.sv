// Test of dumping_logic: a table model with an asynchronous read port holds
// random sorted intervals; after start the emitted line stream must be every
// line of every interval in order, held stable while the L2 side is not
// ready. With ready always high the dump must take one cycle per interval
// read plus one cycle per line, then done; an empty table ends at once.
module tb_dumping_logic;
  localparam int unsigned NUM_LINES = 1024;
  localparam int unsigned K  = 8;
  localparam int unsigned LW = 10, AW = 3, CW = 4;

  logic          clk = 1'b0, rst, start, rd_valid, dump_valid, dump_ready, done;
  logic [CW-1:0] count;
  logic [AW-1:0] rd_addr;
  logic [LW-1:0] rd_start, rd_end, dump_line;
  int checks = 0, failures = 0;
  int ts[K], te[K];

  always #5 clk = ~clk;

  dumping_logic #(.NUM_LINES(NUM_LINES), .K(K)) dut (.*);

  assign rd_valid = 1'b1;
  assign rd_start = LW'(ts[rd_addr]);
  assign rd_end   = LW'(te[rd_addr]);

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

  initial begin
    int n, pos, cyc, nlines;
    bit full_rate;
    int exp_q[$], got_q[$];
    rst = 1'b1; start = 1'b0; count = '0; dump_ready = 1'b0;
    foreach (ts[i]) begin ts[i] = 0; te[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 60; t++) begin
      n = (t % 10 == 0) ? 0 : 1 + ($urandom % K);
      full_rate = (t % 2 == 0);
      pos = $urandom % 20;
      exp_q = {};
      for (int i = 0; i < n; i++) begin
        ts[i] = pos + ($urandom % 30);
        te[i] = ts[i] + ($urandom % 12);
        pos = te[i] + 1;
        for (int l = ts[i]; l <= te[i]; l++) exp_q.push_back(l);
      end
      nlines = exp_q.size();
      count = CW'(n);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      got_q = {};
      cyc = 0;
      while (!done) begin
        dump_ready = full_rate ? 1'b1 : (($urandom % 3) == 0);
        @(posedge clk);
        if (dump_valid && dump_ready) got_q.push_back(int'(dump_line));
        @(negedge clk);
        cyc++;
      end
      check(got_q == exp_q, $sformatf("dump %0d: %0d lines, expected %0d", t, got_q.size(), nlines));
      if (full_rate)
        check(cyc == n + nlines, $sformatf("dump %0d took %0d cycles, expected %0d", t, cyc, n + nlines));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a request must stay put until accepted
  logic          held_v;
  logic [LW-1:0] held_l;
  always @(posedge clk) begin
    if (!rst && held_v) begin
      checks++;
      if (!(dump_valid && dump_line == held_l)) begin
        failures++;
        $display("FAIL: request changed before it was accepted");
      end
    end
    held_v <= !rst && dump_valid && !dump_ready;
    held_l <= dump_line;
  end
endmodule
