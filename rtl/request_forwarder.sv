// request_forwarder: request side of one input port of the TabArb switch
// arbiter (partial / full request forwarding).
//
// Every virtual channel (VC) of the port presents its head flit's requested
// crossbar output.  Each arbitration the forwarder picks up to FWD eligible
// VCs (FWD = 0 forwards all of them: full request forwarding) in round-robin
// order starting after the VC that last won, and ORs their requests into a
// 4-bit request mask for the port.  That mask becomes the port's PRV.
//
// LAT is the arbitration latency in cycles.  With LAT = 1 the grant comes
// back in the same cycle.  With LAT = 2 it comes back one cycle later, and
// the forwarded set is remembered in a register.  A VC whose request is
// still in flight is not eligible again.  So arbitration i+1 only carries
// flits that arbitration i did not, and a new arbitration can start every
// cycle (partial request forwarding).  With full forwarding and LAT = 2 this
// leaves no eligible flit in the cycle after a forward, which is the bubble
// full forwarding needs.
//
// A VC is eligible when its head is valid, its output can take a flit
// (out_ready, from credit flow control) and its request is not in flight.
// Anti-starvation: when starve_active and the starved flit sits in this
// port (starve_here), only VC starve_vc may be forwarded; when a starved flit
// of another port waits, no VC of this port may request starve_out.
//
// When the port grant (one-hot output mask pgv) arrives, the forwarder picks
// the first forwarded VC, in the same round-robin order, that asked for that
// output and reports it on vc_grant/grant_vc; the round-robin pointer then
// moves past it.  The round-robin policy, the pointer update and the
// starvation masking are this design's choices; the document gives only
// which flits may be forwarded.
module request_forwarder
  import tabarb_pkg::*;
#(
  parameter int unsigned NVC  = 8,
  parameter int unsigned FWD  = 3,
  parameter int unsigned LAT  = 2,
  localparam int unsigned VW  = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NVC-1:0]          head_valid,
  input  logic [NVC-1:0][1:0]     head_out,
  input  logic [NPORTS-1:0]       out_ready,
  input  logic                    starve_active,
  input  logic                    starve_here,
  input  logic [VW-1:0]           starve_vc,
  input  logic [1:0]              starve_out,
  output portmask_t               req_mask,
  input  portmask_t               pgv,
  output logic [NVC-1:0]          vc_grant,
  output logic [VW-1:0]           grant_vc,
  output logic                    grant_valid
);

  localparam int unsigned NFWD = (FWD == 0 || FWD > NVC) ? NVC : FWD;

  logic [VW-1:0]  rr_q;
  logic [NVC-1:0] fwd_c;       // VCs forwarded in this cycle
  logic [NVC-1:0] fwd_q;       // VCs forwarded one cycle ago (LAT = 2)
  logic [NVC-1:0] res_set;     // VCs whose arbitration result is in pgv
  logic [NVC-1:0] eligible;

  always_comb begin
    for (int unsigned v = 0; v < NVC; v++) begin
      eligible[v] = head_valid[v] && out_ready[head_out[v]];
      if (LAT > 1 && fwd_q[v]) eligible[v] = 1'b0;
      if (starve_active) begin
        if (starve_here && VW'(v) != starve_vc) eligible[v] = 1'b0;
        if (!starve_here && head_out[v] == starve_out) eligible[v] = 1'b0;
      end
    end
  end

  // Pick up to NFWD eligible VCs in round-robin order.
  always_comb begin
    int unsigned cnt;
    int unsigned v;
    fwd_c    = '0;
    req_mask = '0;
    cnt      = 0;
    for (int unsigned i = 0; i < NVC; i++) begin
      v = (int'(rr_q) + i) % NVC;
      if (eligible[v] && cnt < NFWD) begin
        fwd_c[v]              = 1'b1;
        req_mask[head_out[v]] = 1'b1;
        cnt++;
      end
    end
  end

  assign res_set = (LAT > 1) ? fwd_q : fwd_c;

  // Map the port grant back to one of the forwarded VCs.
  always_comb begin
    int unsigned v;
    vc_grant    = '0;
    grant_vc    = '0;
    grant_valid = 1'b0;
    for (int unsigned i = 0; i < NVC; i++) begin
      v = (int'(rr_q) + i) % NVC;
      if (!grant_valid && res_set[v] && pgv[head_out[v]]) begin
        vc_grant[v] = 1'b1;
        grant_vc    = VW'(v);
        grant_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q  <= '0;
      fwd_q <= '0;
    end else begin
      fwd_q <= (LAT > 1) ? fwd_c : '0;
      if (grant_valid) rr_q <= VW'((int'(grant_vc) + 1) % NVC);
    end
  end

  // The table grants at most one output per input port.
  a_pgv_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pgv));
  // A grant only ever goes to an output that was requested by a forwarded flit.
  a_grant_matches: assert property (@(posedge clk) disable iff (!rst_n)
                                    (pgv != '0) |-> grant_valid);

endmodule
