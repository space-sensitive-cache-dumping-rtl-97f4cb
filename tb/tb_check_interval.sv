// Test of check_interval: lines at, just inside and just outside the bounds
// of random intervals, plus random lines, against integer comparisons; and
// nothing reported while valid is low.
module tb_check_interval;
  localparam int unsigned LW = 14;

  logic          valid, hit, below;
  logic [LW-1:0] line, iv_start, iv_end;
  int checks = 0, failures = 0;

  check_interval #(.LW(LW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, e, l;
    for (int t = 0; t < 600; t++) begin
      s = 1 + ($urandom % 16000);
      e = s + ($urandom % 40);
      case (t % 6)
        0: l = s;
        1: l = e;
        2: l = s - 1;
        3: l = e + 1;
        4: l = s + ($urandom % (e - s + 1));
        default: l = $urandom % 16384;
      endcase
      valid = (t % 10) != 9;
      iv_start = LW'(s); iv_end = LW'(e); line = LW'(l);
      #1;
      check(hit == (valid && l >= s && l <= e), $sformatf("hit line %0d in (%0d,%0d)", l, s, e));
      check(below == (valid && l < s), $sformatf("below line %0d in (%0d,%0d)", l, s, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
