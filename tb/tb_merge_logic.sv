// Test of merge_logic: random interval pairs, interval with a one-line
// interval on either side, and the pass-through used for shifts.
module tb_merge_logic;
  localparam int unsigned LW = 14;

  logic          merge_en;
  logic [LW-1:0] a_start, a_end, b_start, b_end, out_start, out_end;
  int checks = 0, failures = 0;

  merge_logic #(.LW(LW)) dut (.*);

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
    int as, ae, bs, be, es, ee;
    for (int t = 0; t < 600; t++) begin
      as = $urandom % 16000; ae = as + ($urandom % 300);
      if (t % 3 == 0) begin bs = $urandom % 16384; be = bs; end
      else begin bs = $urandom % 16000; be = bs + ($urandom % 300); end
      merge_en = (t % 4) != 3;
      a_start = LW'(as); a_end = LW'(ae); b_start = LW'(bs); b_end = LW'(be);
      #1;
      es = merge_en ? ((as < bs) ? as : bs) : as;
      ee = merge_en ? ((ae > be) ? ae : be) : ae;
      check(int'(out_start) == es && int'(out_end) == ee,
            $sformatf("merge(%0d,%0d | %0d,%0d en=%0d) = (%0d,%0d), expected (%0d,%0d)",
                      as, ae, bs, be, merge_en, out_start, out_end, es, ee));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
