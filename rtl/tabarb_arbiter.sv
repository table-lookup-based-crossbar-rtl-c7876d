// tabarb_arbiter: table-lookup switch arbiter for the 4x4 network crossbar
// of a minimal-routed 2D mesh/torus router.
//
// Instead of picking one request per input port and then arbitrating per
// output, every input port forwards the requests of several head flits at
// once (request_forwarder).  The four port request masks are packed into the
// Aggregate Request Vector (ARV), which indexes a precomputed table
// (tabarb_table) of maximum cardinality matchings.  The Aggregate Grant
// Vector read from it is split into one grant per input port and each port
// turns its grant into a winning VC.  A starvation guard (starvation_ctrl)
// lets a flit that has waited TIMEOUT cycles override the table.
//
// Configurations (the two the document evaluates):
//   lite       : ROUTING=ROUTE_DOR, FWD_*=0 (full forwarding), LAT=1, NVC=4.
//                8-bit ARV / 256-entry table, request and grant in one cycle.
//   aggressive : ROUTING=ROUTE_ADAPTIVE, FWD=<3,3,1,1>, LAT=2, NVC=8 (the
//                defaults).  10-bit ARV / 1K-entry table, the ARV is
//                registered and looked up in the next cycle, and a new
//                arbitration still starts every cycle.
//
// Timing: requests seen in cycle t are granted in cycle t+LAT-1.  The grant
// outputs (vc_grant, grant_vc, grant_valid, pgv) are combinational in that
// cycle; the router pops the granted VC at the end of it and the flit crosses
// the crossbar in the following cycle.
// Flow control: a request for output o is only forwarded while out_ready[o]
// (a downstream credit is available), so free output ports need no table
// input: every output is free again after each cycle (flit-by-flit
// arbitration).
module tabarb_arbiter
  import tabarb_pkg::*;
#(
  parameter routing_e    ROUTING = ROUTE_ADAPTIVE,
  parameter int unsigned NVC     = 8,
  parameter int unsigned FWD_XP  = 3,
  parameter int unsigned FWD_XM  = 3,
  parameter int unsigned FWD_YP  = 1,
  parameter int unsigned FWD_YM  = 1,
  parameter int unsigned LAT     = 2,
  parameter int unsigned TIMEOUT = 20,
  localparam int unsigned VW     = (NVC > 1) ? $clog2(NVC) : 1,
  localparam fmt_e F0 = port_format(ROUTING, 0, FWD_XP),
  localparam fmt_e F1 = port_format(ROUTING, 1, FWD_XM),
  localparam fmt_e F2 = port_format(ROUTING, 2, FWD_YP),
  localparam fmt_e F3 = port_format(ROUTING, 3, FWD_YM),
  localparam int unsigned ARV_W = prv_width(F0) + prv_width(F1) + prv_width(F2) + prv_width(F3),
  localparam int unsigned AGV_W = pgv_width(F0) + pgv_width(F1) + pgv_width(F2) + pgv_width(F3)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NPORTS-1:0][NVC-1:0]       head_valid,  // head flit requests the crossbar
  input  logic [NPORTS-1:0][NVC-1:0][1:0]  head_out,    // its output port
  input  logic [NPORTS-1:0]                out_ready,
  output logic [NPORTS-1:0][NVC-1:0]       vc_grant,
  output logic [NPORTS-1:0][VW-1:0]        grant_vc,
  output logic [NPORTS-1:0]                grant_valid,
  output reqset_t                          pgv,         // one-hot output per input port
  output logic [ARV_W-1:0]                 arv,
  output logic                             starve_active,
  output logic [$clog2(NPORTS*NVC+1)-1:0]  starve_count  // flits waiting in the starvation FIFO
);

  localparam int unsigned FWD [NPORTS] = '{FWD_XP, FWD_XM, FWD_YP, FWD_YM};
  localparam fmt_e        FMT [NPORTS] = '{F0, F1, F2, F3};

  function automatic int unsigned arv_pos(int unsigned p);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < p; i++) s += prv_width(FMT[i]);
    return s;
  endfunction

  function automatic int unsigned agv_pos(int unsigned p);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < p; i++) s += pgv_width(FMT[i]);
    return s;
  endfunction

  reqset_t           req_mask;
  logic [ARV_W-1:0]  arv_lookup;
  logic [AGV_W-1:0]  agv;
  logic [1:0]        starve_port;
  logic [VW-1:0]     starve_vc;
  logic [1:0]        starve_out;

  starvation_ctrl #(.NVC(NVC), .TIMEOUT(TIMEOUT)) u_starve (
    .clk, .rst_n,
    .head_req     (head_valid),
    .head_out     (head_out),
    .out_ready    (out_ready),
    .vc_grant     (vc_grant),
    .starve_active(starve_active),
    .starve_port  (starve_port),
    .starve_vc    (starve_vc),
    .starve_out   (starve_out),
    .starve_count (starve_count)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    request_forwarder #(.NVC(NVC), .FWD(FWD[p]), .LAT(LAT)) u_fwd (
      .clk, .rst_n,
      .head_valid   (head_valid[p]),
      .head_out     (head_out[p]),
      .out_ready    (out_ready),
      .starve_active(starve_active),
      .starve_here  (starve_port == 2'(p)),
      .starve_vc    (starve_vc),
      .starve_out   (starve_out),
      .req_mask     (req_mask[p]),
      .pgv          (pgv[p]),
      .vc_grant     (vc_grant[p]),
      .grant_vc     (grant_vc[p]),
      .grant_valid  (grant_valid[p])
    );
  end

  // Pack the port request vectors into the ARV.
  for (genvar p = 0; p < NPORTS; p++) begin : g_pack
    localparam int unsigned POS = arv_pos(p);
    localparam int unsigned W   = prv_width(FMT[p]);
    assign arv[POS+:W] = W'(encode_prv(FMT[p], p, req_mask[p]));
  end

  // Lookup pipeline: with LAT = 2 the ARV is registered first.
  if (LAT > 1) begin : g_pipe
    logic [ARV_W-1:0] arv_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) arv_q <= '0;
      else        arv_q <= arv;
    end
    assign arv_lookup = arv_q;
  end else begin : g_single
    assign arv_lookup = arv;
  end

  tabarb_table #(.F0(F0), .F1(F1), .F2(F2), .F3(F3)) u_table (
    .arv(arv_lookup),
    .agv(agv)
  );

  // Split the AGV into one-hot port grants.
  for (genvar p = 0; p < NPORTS; p++) begin : g_unpack
    localparam int unsigned POS = agv_pos(p);
    localparam int unsigned W   = pgv_width(FMT[p]);
    assign pgv[p] = decode_pgv(FMT[p], p, 2'(agv[POS+:W]));
  end

  // Minimal routing: no flit leaves by the port of the same name it came in.
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      a_minimal: assert property (@(posedge clk) disable iff (!rst_n)
                                  head_valid[p][v] |-> head_out[p][v] != 2'(p));
      if (ROUTING == ROUTE_DOR && p >= 2) begin : g_dor
        a_dor_y: assert property (@(posedge clk) disable iff (!rst_n)
                                  head_valid[p][v] |-> head_out[p][v] == 2'(dor_y_output(p)));
      end
    end
  end
  // At most one input per output.
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    a_one_per_output: assert property (@(posedge clk) disable iff (!rst_n)
        $onehot0({pgv[3][o], pgv[2][o], pgv[1][o], pgv[0][o]}));
  end

endmodule
