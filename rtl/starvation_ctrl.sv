// starvation_ctrl: anti-starvation guard of the TabArb switch arbiter.
//
// A fixed table always answers the same request pattern with the same
// grants, so a flit that loses once can keep losing.  This block watches
// every VC head flit that requests a crossbar output: a per-VC counter
// counts the cycles in which the flit wanted an output that could take it
// (out_ready) but was not granted.  When the count reaches TIMEOUT (20 cycles
// by default, the threshold the document found best) the VC is entered into
// a FIFO of starved flits.  The FIFO head is published on starve_*; the
// request forwarders then let that flit supersede every other request for
// its output (see request_forwarder), and the entry is removed when the flit
// is granted (or stops requesting).  A VC stays marked as queued until its
// entry leaves the FIFO, so it never holds two entries.  Several starved
// flits are therefore served in FIFO order.
//
// Timing: a counter is cleared in the cycle after its VC is granted or its
// head stops requesting.  At most one VC enters the FIFO per cycle (lowest
// port, then lowest VC first when several time out together).  That limit,
// the counter rules and the FIFO depth of NP*NVC entries (one per VC, so it
// cannot overflow) are this design's choices.
module starvation_ctrl
  import tabarb_pkg::*;
#(
  parameter int unsigned NVC     = 8,
  parameter int unsigned TIMEOUT = 20,
  localparam int unsigned VW     = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NPORTS-1:0][NVC-1:0]         head_req,   // head flit wants the crossbar
  input  logic [NPORTS-1:0][NVC-1:0][1:0]    head_out,
  input  logic [NPORTS-1:0]                  out_ready,
  input  logic [NPORTS-1:0][NVC-1:0]         vc_grant,
  output logic                               starve_active,
  output logic [1:0]                         starve_port,
  output logic [VW-1:0]                      starve_vc,
  output logic [1:0]                         starve_out,
  output logic [$clog2(NPORTS*NVC+1)-1:0]    starve_count
);

  localparam int unsigned DEPTH = NPORTS * NVC;
  localparam int unsigned CW    = $clog2(TIMEOUT + 1);
  localparam int unsigned PW    = $clog2(DEPTH);

  typedef struct packed {
    logic [1:0]    port;
    logic [VW-1:0] vc;
  } entry_t;

  logic [NPORTS-1:0][NVC-1:0][CW-1:0] wait_q;
  logic [NPORTS-1:0][NVC-1:0]         queued_q;
  entry_t                             fifo_q [DEPTH];
  logic [PW-1:0]                      rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0]         cnt_q;

  logic   push, pop;
  entry_t push_e;

  // Oldest-first choice of one newly timed-out VC.
  always_comb begin
    push   = 1'b0;
    push_e = '0;
    for (int unsigned p = 0; p < NPORTS; p++)
      for (int unsigned v = 0; v < NVC; v++)
        if (!push && head_req[p][v] && !vc_grant[p][v] && !queued_q[p][v] &&
            wait_q[p][v] >= CW'(TIMEOUT)) begin
          push        = 1'b1;
          push_e.port = 2'(p);
          push_e.vc   = VW'(v);
        end
  end

  assign starve_active = (cnt_q != 0);
  assign starve_port   = fifo_q[rd_q].port;
  assign starve_vc     = fifo_q[rd_q].vc;
  assign starve_out    = head_out[starve_port][starve_vc];
  assign starve_count  = cnt_q;
  assign pop           = starve_active &&
                         (vc_grant[starve_port][starve_vc] || !head_req[starve_port][starve_vc]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q   <= '0;
      queued_q <= '0;
      rd_q     <= '0;
      wr_q     <= '0;
      cnt_q    <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) fifo_q[i] <= '0;
    end else begin
      for (int unsigned p = 0; p < NPORTS; p++)
        for (int unsigned v = 0; v < NVC; v++) begin
          if (!head_req[p][v] || vc_grant[p][v]) begin
            wait_q[p][v] <= '0;
          end else if (out_ready[head_out[p][v]] && wait_q[p][v] < CW'(TIMEOUT)) begin
            wait_q[p][v] <= wait_q[p][v] + 1'b1;
          end
        end
      if (push) begin
        fifo_q[wr_q]                        <= push_e;
        wr_q                                <= PW'((int'(wr_q) + 1) % DEPTH);
        queued_q[push_e.port][push_e.vc]    <= 1'b1;
      end
      if (pop) begin
        rd_q                             <= PW'((int'(rd_q) + 1) % DEPTH);
        queued_q[starve_port][starve_vc] <= 1'b0;
      end
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (cnt_q < DEPTH[$bits(cnt_q)-1:0] || pop));

endmodule
