// Update Buffer: a small FIFO of cache-line numbers.
//
// Line updates reported by the processor are queued here while the interval
// tracker is still busy with an earlier update, so that the processor only has
// to stall when the buffer is full. The depth of 4 is the size the published
// evaluation settled on; the FIFO organisation (circular buffer with read and
// write pointers and an occupancy counter) is this design's own.
//
// Interface: push/push_data write the tail, pop reads the head, which is
// always visible on head_data while not empty. A push and a pop may happen in
// the same cycle, also when the buffer is full. A push into a full buffer
// without a pop is a protocol error (asserted) and is dropped.
// Timing: one cycle from push to the entry being visible at the head.
module update_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned LW    = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [LW-1:0] push_data,
  input  logic          pop,
  output logic [LW-1:0] head_data,
  output logic          empty,
  output logic          full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [LW-1:0] mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;
  logic          do_push, do_pop;

  assign empty     = (count == '0);
  assign full      = (count == CW'(DEPTH));
  assign do_pop    = pop && !empty;
  assign do_push   = push && (!full || do_pop);
  assign head_data = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        mem[wr_ptr] <= push_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop))
    else $error("update_buffer: push into a full buffer");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty)
    else $error("update_buffer: pop from an empty buffer");

endmodule
