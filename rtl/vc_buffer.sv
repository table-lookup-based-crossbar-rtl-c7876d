// vc_buffer: one virtual-channel input queue of a router input port.
//
// A circular FIFO of DEPTH flits (eight by default, the queue size the
// document uses as its unit of area).  A flit arriving on the physical
// channel is written when push is high; the flit at the head is always
// visible on head/head_valid and leaves when pop is high.  push and pop may
// happen in the same cycle.  Credit flow control upstream guarantees that a
// full queue is never pushed; an assertion checks it.  Storage is an array
// of flit_t registers; the queue is written at the end of the push cycle
// and the new head is visible in the next cycle.
module vc_buffer
  import tabarb_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  flit_t  push_flit,
  input  logic   pop,
  output logic   head_valid,
  output flit_t  head,
  output logic   full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t               mem [DEPTH];
  logic [PW-1:0]       rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign head_valid = (cnt_q != 0);
  assign head       = mem[rd_q];
  assign full       = (cnt_q == DEPTH[$bits(cnt_q)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= PW'((int'(wr_q) + 1) % DEPTH);
      if (pop)  rd_q <= PW'((int'(rd_q) + 1) % DEPTH);
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
    end
  end

  // Storage without reset; only entries that were written are ever read.
  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= push_flit;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
