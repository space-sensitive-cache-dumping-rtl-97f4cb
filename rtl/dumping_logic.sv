// Dumping Logic: turns the Interval Table into a stream of lines to dump.
//
// When the controller starts a dump, this block reads the stored intervals
// I[0..count-1] through the table's read port, one after the other, and for
// each interval issues every line number from its start to its end, in
// ascending order, to the L2 cache, which then transfers those lines off chip.
// Each request is a valid/ready handshake: the line is held until the cache
// accepts it, so the dump runs at whatever rate the off-chip link allows.
// done pulses for one cycle after the last line was accepted (or at once if
// the table is empty). The block appears by name in the published block
// diagram; the walk order and the handshake are this design's own.
// The table may count in units of LINES_PER_UNIT adjacent lines instead of
// single lines (a coarser granularity that shortens every stored address);
// each unit u is then expanded to its lines u*LINES_PER_UNIT .. +LINES_PER_UNIT-1.
// The default of one line per unit is the main configuration.
// Timing: one cycle to read each interval, then one line per accepted cycle.
module dumping_logic #(
  parameter int unsigned NUM_LINES      = 16384,
  parameter int unsigned K              = 16,
  parameter int unsigned LINES_PER_UNIT = 1,
  localparam int unsigned LW = $clog2(NUM_LINES),
  localparam int unsigned UW = $clog2(NUM_LINES / LINES_PER_UNIT),
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned CW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [CW-1:0] count,       // number of stored intervals
  // table read port (through the De-MUX)
  output logic [AW-1:0] rd_addr,
  input  logic          rd_valid,
  input  logic [UW-1:0] rd_start,
  input  logic [UW-1:0] rd_end,
  // dump requests to the L2 cache
  output logic          dump_valid,
  output logic [LW-1:0] dump_line,
  input  logic          dump_ready,
  output logic          done
);

  typedef enum logic [1:0] {D_IDLE, D_READ, D_EMIT, D_DONE} dstate_e;

  localparam int unsigned OW = (LINES_PER_UNIT > 1) ? $clog2(LINES_PER_UNIT) : 1;

  dstate_e       state;
  logic [AW-1:0] idx;
  logic [UW-1:0] cur, last_line;
  logic [OW-1:0] off;
  logic          unit_end;

  assign rd_addr    = idx;
  assign dump_valid = (state == D_EMIT);
  assign dump_line  = LW'(cur) * LW'(LINES_PER_UNIT) + LW'(off);
  assign unit_end   = (int'(off) == int'(LINES_PER_UNIT) - 1);
  assign done       = (state == D_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= D_IDLE;
      idx       <= '0;
      cur       <= '0;
      last_line <= '0;
      off       <= '0;
    end else begin
      unique case (state)
        D_IDLE: if (start) begin
          idx   <= '0;
          state <= (count == '0) ? D_DONE : D_READ;
        end
        D_READ: if (rd_valid) begin
          cur       <= rd_start;
          last_line <= rd_end;
          off       <= '0;
          state     <= D_EMIT;
        end
        D_EMIT: if (dump_ready) begin
          if (!unit_end) begin
            off <= off + 1'b1;
          end else if (cur == last_line) begin
            if (int'(idx) + 1 >= int'(count)) begin
              state <= D_DONE;
            end else begin
              idx   <= idx + 1'b1;
              state <= D_READ;
            end
          end else begin
            cur <= cur + 1'b1;
            off <= '0;
          end
        end
        D_DONE: state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

  a_valid_stable: assert property (@(posedge clk) disable iff (rst)
      (dump_valid && !dump_ready) |=> (dump_valid && $stable(dump_line)))
    else $error("dumping_logic: request dropped before it was accepted");

endmodule
