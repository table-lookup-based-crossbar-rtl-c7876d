// tabarb_router: switch datapath of an input-queued virtual-channel router
// for a 2D mesh/torus, arbitrated by the table-lookup arbiter.
//
// Each of the four network input ports (X+, X-, Y+, Y-) has NVC virtual
// channel queues (vc_buffer) of DEPTH flits.  A flit arriving on port p is
// written into queue in_vc[p].  The head flit of every queue carries the
// route written by the routing / VC allocation stages upstream: either a
// crossbar output or ejection.  Crossbar-bound heads are arbitrated by
// tabarb_arbiter, which matches input ports to output ports with a
// precomputed maximum cardinality matching; the granted flit of each input
// port is popped and crosses the 4x4 crossbar, whose output latch presents
// it on out_valid/out_flit one cycle after the grant.  Ejection-bound heads
// leave by the ejection port of their input port (ejection_port), one per
// port per cycle, independent of the crossbar.
//
// Timing (aggressive configuration, the defaults): a head flit seen in cycle
// t is forwarded to the arbiter in t, granted and popped in t+1 and appears
// at the crossbar output in t+2.  With LAT = 1 (lite configuration) it is
// granted in t and appears in t+1.  Every flit leaving a queue returns a
// credit on credit_out one cycle later (the document's one-cycle delay before
// a freed buffer is reported).
//
// Outside this block, and so brought out as ports: the routing and VC
// allocation stages (route in the flit, downstream VC choice), credit
// counting for the downstream queues (out_ready[o] = output o may send), and
// the injection port with its multiplexers.  A flit leaves with the index of
// the VC it was stored in (out_vc); mapping that to a downstream VC is left
// to VC allocation.
module tabarb_router
  import tabarb_pkg::*;
#(
  parameter routing_e    ROUTING = ROUTE_ADAPTIVE,
  parameter int unsigned NVC     = 8,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned FWD_XP  = 3,
  parameter int unsigned FWD_XM  = 3,
  parameter int unsigned FWD_YP  = 1,
  parameter int unsigned FWD_YM  = 1,
  parameter int unsigned LAT     = 2,
  parameter int unsigned TIMEOUT = 20,
  localparam int unsigned VW     = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // network input channels
  input  logic  [NPORTS-1:0]           in_valid,
  input  logic  [NPORTS-1:0][VW-1:0]   in_vc,
  input  flit_t [NPORTS-1:0]           in_flit,
  output logic  [NPORTS-1:0][NVC-1:0]  credit_out,
  // network output channels
  input  logic  [NPORTS-1:0]           out_ready,
  output logic  [NPORTS-1:0]           out_valid,
  output flit_t [NPORTS-1:0]           out_flit,
  output logic  [NPORTS-1:0][VW-1:0]   out_vc,
  // ejection ports (one per network input port)
  input  logic  [NPORTS-1:0]           eject_ready,
  output logic  [NPORTS-1:0]           eject_valid,
  output flit_t [NPORTS-1:0]           eject_flit,
  // observation
  output logic  [2:0]                  match_count,   // crossbar grants this cycle
  output logic                         starve_active
);

  typedef struct packed {
    logic [VW-1:0] vc;
    flit_t         flit;
  } xflit_t;

  logic  [NPORTS-1:0][NVC-1:0]      head_valid, full, pop, xbar_req, eject_req, ej_pop;
  flit_t [NPORTS-1:0][NVC-1:0]      head;
  logic  [NPORTS-1:0][NVC-1:0][1:0] head_out;
  logic  [NPORTS-1:0][NVC-1:0]      vc_grant;
  logic  [NPORTS-1:0][VW-1:0]       grant_vc;
  logic  [NPORTS-1:0]               grant_valid;
  reqset_t                          pgv;
  xflit_t [NPORTS-1:0]              xin, xout;
  logic  [NPORTS-1:0][NPORTS-1:0]   sel;
  logic  [$clog2(NPORTS*NVC+1)-1:0] starve_count;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      vc_buffer #(.DEPTH(DEPTH)) u_buf (
        .clk, .rst_n,
        .push      (in_valid[p] && in_vc[p] == VW'(v)),
        .push_flit (in_flit[p]),
        .pop       (pop[p][v]),
        .head_valid(head_valid[p][v]),
        .head      (head[p][v]),
        .full      (full[p][v])
      );
      assign xbar_req[p][v]  = head_valid[p][v] && !head[p][v].eject;
      assign eject_req[p][v] = head_valid[p][v] &&  head[p][v].eject;
      assign head_out[p][v]  = head[p][v].out_port;
      assign pop[p][v]       = vc_grant[p][v] || ej_pop[p][v];
    end

    ejection_port #(.NVC(NVC)) u_eject (
      .clk, .rst_n,
      .eject_req(eject_req[p]),
      .head     (head[p]),
      .ready    (eject_ready[p]),
      .pop      (ej_pop[p]),
      .out_valid(eject_valid[p]),
      .out_flit (eject_flit[p])
    );

    assign xin[p].vc   = grant_vc[p];
    assign xin[p].flit = head[p][grant_vc[p]];
  end

  tabarb_arbiter #(
    .ROUTING(ROUTING), .NVC(NVC),
    .FWD_XP(FWD_XP), .FWD_XM(FWD_XM), .FWD_YP(FWD_YP), .FWD_YM(FWD_YM),
    .LAT(LAT), .TIMEOUT(TIMEOUT)
  ) u_arb (
    .clk, .rst_n,
    .head_valid   (xbar_req),
    .head_out     (head_out),
    .out_ready    (out_ready),
    .vc_grant     (vc_grant),
    .grant_vc     (grant_vc),
    .grant_valid  (grant_valid),
    .pgv          (pgv),
    .arv          (),
    .starve_active(starve_active),
    .starve_count (starve_count)
  );

  always_comb begin
    match_count = '0;
    for (int unsigned o = 0; o < NPORTS; o++)
      for (int unsigned i = 0; i < NPORTS; i++) begin
        sel[o][i] = grant_valid[i] && pgv[i][o];
        match_count += 3'(sel[o][i]);
      end
  end

  crossbar #(.N(NPORTS), .T(xflit_t)) u_xbar (
    .clk, .rst_n,
    .in_flit  (xin),
    .sel      (sel),
    .out_valid(out_valid),
    .out_flit (xout)
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign out_flit[o] = xout[o].flit;
    assign out_vc[o]   = xout[o].vc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else        credit_out <= pop;
  end

  // Upstream credit flow control never writes into a full queue.
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_no_write_full: assert property (@(posedge clk) disable iff (!rst_n)
        in_valid[p] |-> !full[p][in_vc[p]] || pop[p][in_vc[p]]);
  end

endmodule
