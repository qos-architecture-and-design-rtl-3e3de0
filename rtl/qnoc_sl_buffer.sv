// qnoc_sl_buffer: flit buffer of one service level at one router input.
//
// A small first-in first-out queue of DEPTH flits (data and flit type).
// The design example uses two flits per service level, so a short
// Signalling or Real-Time packet fits in one router stage. Upstream credit
// flow control guarantees that a flit is never pushed into a full buffer;
// an assertion checks that rule.
//
// Timing: a flit pushed at a clock edge is at the head (head_valid) in the
// next cycle. pop removes the head at the clock edge; push and pop may
// happen in the same cycle. The head is read combinationally. Reset
// (active low, synchronous to clk) empties the queue.
module qnoc_sl_buffer
  import qnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  flit_t  push_flit,
  input  logic   pop,
  output logic   head_valid,
  output flit_t  head_flit,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  flit_t             mem [DEPTH];
  logic [PTR_W-1:0]  rd_ptr, wr_ptr;
  logic [CNT_W-1:0]  cnt;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= push_flit;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      cnt <= cnt + CNT_W'(push) - CNT_W'(pop);
    end
  end

  assign head_valid = (cnt != '0);
  assign head_flit  = mem[rd_ptr];
  assign count      = cnt;

  // Credit flow control must never overflow or underflow the buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push && !pop |-> cnt < CNT_W'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> cnt != '0);

endmodule
