// arb_harness: drives and checks one tabarb_arbiter configuration; used by
// tb_tabarb_arbiter for the lite and the aggressive configuration.
//
// Every VC holds an endless packet stream: its head flit requests a random
// legal output (never the port of the same name; under DOR a Y port only
// continues in Y).  A granted head is replaced in the next cycle.  Checks:
//   - latency: a lone request on an idle arbiter is granted LAT-1 cycles
//     after it is presented, not earlier;
//   - every cycle the grants form a matching (one input per output), each
//     granted VC had a valid head for the granted output;
//   - the number of grants equals the maximum matching of the ARV that was
//     looked up (decoded by the harness's own code);
//   - with full forwarding (lite) the ARV holds every eligible request;
//   - throughput: under full load an arbitration completes every cycle
//     (first half of the run, all outputs ready);
//   - anti-starvation: with one output throttled, starved flits appear and
//     are served.
module arb_harness
  import tabarb_pkg::*;
#(
  parameter routing_e    ROUTING = ROUTE_ADAPTIVE,
  parameter int unsigned NVC     = 8,
  parameter int unsigned FWD_XP  = 3,
  parameter int unsigned FWD_XM  = 3,
  parameter int unsigned FWD_YP  = 1,
  parameter int unsigned FWD_YM  = 1,
  parameter int unsigned LAT     = 2,
  parameter int unsigned CYCLES  = 3000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done,
  output int   starved,
  output real  matches_per_arb
);

  localparam bit FULL = (FWD_XP == 0);
  localparam int ARV_W = (ROUTING == ROUTE_DOR) ? 8 : (FULL ? 12 : 10);

  logic rst_n;
  logic [3:0][NVC-1:0]      head_valid, vc_grant;
  logic [3:0][NVC-1:0][1:0] head_out;
  logic [3:0]               out_ready, grant_valid;
  logic [3:0][$clog2(NVC)-1:0] grant_vc;
  reqset_t                  pgv;
  logic [ARV_W-1:0]         arv, arv_prev;
  logic                     starve_active;
  logic [$clog2(4*NVC+1)-1:0] starve_count;

  tabarb_arbiter #(.ROUTING(ROUTING), .NVC(NVC), .FWD_XP(FWD_XP), .FWD_XM(FWD_XM),
                   .FWD_YP(FWD_YP), .FWD_YM(FWD_YM), .LAT(LAT), .TIMEOUT(20)) dut (
    .clk, .rst_n, .head_valid, .head_out, .out_ready, .vc_grant, .grant_vc, .grant_valid,
    .pgv, .arv, .starve_active, .starve_count);

  function automatic int other(int p, int k);
    int n = 0;
    for (int o = 0; o < 4; o++) if (o != p) begin
      if (n == k) return o;
      n++;
    end
    return -1;
  endfunction

  function automatic int rand_out(int p);
    if (ROUTING == ROUTE_DOR && p >= 2) return (p == 2) ? 3 : 2;
    return other(p, $urandom_range(0, 2));
  endfunction

  typedef int req_t [4][4];

  function automatic req_t decode_arv(int a);
    req_t r;
    int pos = 0, w, f;
    for (int p = 0; p < 4; p++) begin
      for (int o = 0; o < 4; o++) r[p][o] = 0;
      if (ROUTING == ROUTE_DOR && p >= 2) w = 1;
      else if (!FULL && p >= 2)           w = 2;
      else                                w = 3;
      f = (a >> pos) & ((1 << w) - 1);
      if (w == 3) for (int k = 0; k < 3; k++) r[p][other(p, k)] = (f >> k) & 1;
      else if (w == 2) begin if (f != 0) r[p][other(p, f - 1)] = 1; end
      else r[p][(p == 2) ? 3 : 2] = f;
      pos += w;
    end
    return r;
  endfunction

  function automatic int max_match(req_t r);
    int best = 0, n;
    int perm [4];
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
    for (int c = 0; c < 4; c++) for (int d = 0; d < 4; d++) begin
      if (((1 << a) | (1 << b) | (1 << c) | (1 << d)) != 15) continue;
      perm = '{a, b, c, d};
      n = 0;
      for (int p = 0; p < 4; p++) n += r[p][perm[p]];
      if (n > best) best = n;
    end
    return best;
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL [%s LAT=%0d] %s", ROUTING == ROUTE_DOR ? "lite" : "aggressive", LAT, s);
  endtask

  int busy_cycles, arbs, total_matches, n, used, cnt;
  req_t r;
  bit active_prev;
  bit won [4];
  int won_vc [4];

  initial begin
    checks = 0; failures = 0; done = 0; starved = 0; matches_per_arb = 0.0;
    rst_n = 0; head_valid = '0; head_out = '0; out_ready = '1; arv_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // Latency: lone request from X+ to Y+.
    head_valid[0][0] = 1; head_out[0][0] = 2'd2;
    #1;
    checks++;
    if (LAT == 1) begin
      if (!(grant_valid[0] && vc_grant[0][0] && pgv[0] == 4'b0100)) fail("not granted in the request cycle");
    end else begin
      if (grant_valid != 0) fail("granted too early");
      @(negedge clk); #1;
      checks++;
      if (!(grant_valid[0] && vc_grant[0][0] && pgv[0] == 4'b0100)) fail("not granted after LAT cycles");
    end
    @(negedge clk);
    head_valid = '0;
    repeat (3) @(negedge clk);

    // Random full load.
    busy_cycles = 0; arbs = 0; total_matches = 0;
    for (int c = 0; c < CYCLES; c++) begin
      // Granted heads were replaced at the previous step; fill all VCs.
      for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++)
        if (!head_valid[p][v]) begin
          head_valid[p][v] = 1;
          head_out[p][v]   = 2'(rand_out(p));
        end
      // Second half: output Y- throttled to provoke starvation.
      out_ready = (c >= CYCLES / 2 && $urandom_range(0, 3) != 0) ? 4'b0111 : 4'b1111;
      #1;
      // Matching and grant sanity.
      used = 0; n = 0;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (grant_valid[p]) begin
          cnt = 0;
          for (int o = 0; o < 4; o++) if (pgv[p][o]) begin cnt++; if (used & (1 << o)) fail("output granted twice"); used |= 1 << o; end
          if (cnt != 1) fail("grant not one-hot");
          if (!head_valid[p][grant_vc[p]] || !pgv[p][head_out[p][grant_vc[p]]]) fail("granted VC did not request that output");
          if (vc_grant[p] != (NVC'(1) << grant_vc[p])) fail("vc_grant mismatch");
          n++;
        end else if (pgv[p] != 0) fail("port grant with no VC");
      end
      // Maximum matching of the looked-up ARV.
      r = decode_arv(int'(LAT > 1 ? arv_prev : arv));
      checks++;
      if (n != max_match(r)) fail($sformatf("%0d grants, maximum matching %0d", n, max_match(r)));
      // Full forwarding: every eligible request is in the ARV.
      if (FULL && !starve_active) begin
        r = decode_arv(int'(arv));
        for (int p = 0; p < 4; p++) for (int o = 0; o < 4; o++) begin
          automatic int want = 0;
          for (int v = 0; v < NVC; v++) if (head_valid[p][v] && head_out[p][v] == 2'(o) && out_ready[o]) want = 1;
          checks++;
          if (want != r[p][o]) fail("full forwarding lost a request");
        end
      end
      if (c < CYCLES / 2) begin
        if (n > 0) busy_cycles++;
        arbs++;
        total_matches += n;
      end
      if (starve_active && !active_prev) starved++;
      active_prev = starve_active;
      arv_prev = arv;
      for (int p = 0; p < 4; p++) begin
        won[p]    = grant_valid[p];
        won_vc[p] = int'(grant_vc[p]);
      end
      @(negedge clk);
      // The granted flits left at the clock edge.
      for (int p = 0; p < 4; p++) if (won[p]) head_valid[p][won_vc[p]] = 0;
    end
    // An arbitration completes every cycle under load (first half, all outputs ready).
    checks++;
    // (LAT-1 cycles of pipeline fill at the start of the run carry no grant.)
    if (busy_cycles < CYCLES / 2 - (LAT - 1)) fail($sformatf("only %0d of %0d cycles granted", busy_cycles, CYCLES / 2));
    checks++;
    if (starved == 0) fail("anti-starvation never triggered");
    matches_per_arb = real'(total_matches) / real'(arbs);
    done = 1;
  end

endmodule
