// Test of update_buffer: random pushes and pops (also simultaneous, also on
// a full buffer) against a queue model; checks head, empty and full every
// cycle, and that an entry is visible at the head one cycle after its push.
module tb_update_buffer;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned LW    = 14;

  logic          clk = 1'b0, rst, push, pop, empty, full;
  logic [LW-1:0] push_data, head_data;
  int checks = 0, failures = 0;
  int model[$];
  int n_full = 0, n_both_full = 0;

  always #5 clk = ~clk;

  update_buffer #(.DEPTH(DEPTH), .LW(LW)) dut (.*);

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

  initial begin
    rst = 1'b1; push = 1'b0; pop = 1'b0; push_data = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(int'(head_data) == model[0], $sformatf("head %0d expected %0d", head_data, model[0]));
      pop  = (model.size() > 0) && ($urandom % 3 != 0);
      push = ((model.size() < DEPTH) || pop) && ($urandom % 2 == 0);
      push_data = LW'($urandom);
      if (full) n_full++;
      if (full && push && pop) n_both_full++;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(int'(push_data));
    end
    check(n_full > 0 && n_both_full > 0, "full buffer never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
