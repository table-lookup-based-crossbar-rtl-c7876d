// mp_harness: measures the matching power of one tabarb_arbiter
// configuration: the average number of crossbar matches per arbitration at a
// given input-queue occupancy.  Every input port keeps round(OCC_PCT/100*NVC)
// of its VCs holding a head flit (a granted head is replaced by a new flit on
// a random empty VC, with a random legal output), all outputs are ready.  An
// arbitration is a cycle in which the arbiter looked up a request vector
// that was not empty.  Every cycle the grants are checked to be a legal
// matching.  The starvation timeout defaults to 1000 cycles, out of reach of
// the run, so that the numbers show the matching of the table itself and
// not the anti-starvation override.  Used by tb_matching_power.
module mp_harness
  import tabarb_pkg::*;
#(
  parameter routing_e    ROUTING = ROUTE_ADAPTIVE,
  parameter int unsigned NVC     = 8,
  parameter int unsigned FWD_XP  = 3,
  parameter int unsigned FWD_XM  = 3,
  parameter int unsigned FWD_YP  = 1,
  parameter int unsigned FWD_YM  = 1,
  parameter int unsigned LAT     = 2,
  parameter int unsigned CYCLES  = 2000,
  parameter int unsigned TIMEOUT = 1000
) (
  input  logic clk,
  input  int   occ_pct,
  input  bit   start,
  output bit   done,
  output real  matches_per_arb,
  output int   checks,
  output int   failures
);

  localparam bit FULL = (FWD_XP == 0);
  localparam int ARV_W = (ROUTING == ROUTE_DOR) ? 8 :
                         ((FWD_XP == 1 && FWD_YP == 1) ? 8 :
                          ((FWD_YP == 1) ? 10 : 12));

  logic rst_n;
  logic [3:0][NVC-1:0]         head_valid, vc_grant;
  logic [3:0][NVC-1:0][1:0]    head_out;
  logic [3:0]                  grant_valid;
  logic [3:0][$clog2(NVC)-1:0] grant_vc;
  reqset_t                     pgv;
  logic [ARV_W-1:0]            arv, arv_prev;
  logic                        starve_active;
  logic [$clog2(4*NVC+1)-1:0]  starve_count;

  tabarb_arbiter #(.ROUTING(ROUTING), .NVC(NVC), .FWD_XP(FWD_XP), .FWD_XM(FWD_XM),
                   .FWD_YP(FWD_YP), .FWD_YM(FWD_YM), .LAT(LAT), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .head_valid, .head_out, .out_ready(4'hF), .vc_grant, .grant_vc, .grant_valid,
    .pgv, .arv, .starve_active, .starve_count);

  function automatic int rand_out(int p);
    int k;
    if (ROUTING == ROUTE_DOR && p >= 2) return (p == 2) ? 3 : 2;
    k = $urandom_range(0, 2);
    return (k < p) ? k : k + 1;
  endfunction

  int  target, n, used, arbs, total;
  bit  won [4];
  int  won_vc [4];

  initial begin
    done = 0; checks = 0; failures = 0; matches_per_arb = 0.0;
    rst_n = 0; head_valid = '0; head_out = '0; arv_prev = '0;
    forever begin
      wait (start);
      rst_n = 0;
      head_valid = '0;
      @(negedge clk);
      @(negedge clk);
      rst_n = 1;
      target = (occ_pct * NVC + 50) / 100;
      if (target < 1) target = 1;
      arbs = 0; total = 0; arv_prev = '0;
      for (int c = 0; c < CYCLES; c++) begin
        for (int p = 0; p < 4; p++) begin
          automatic int have = 0;
          for (int v = 0; v < NVC; v++) have += head_valid[p][v];
          while (have < target) begin
            automatic int v = $urandom_range(0, NVC - 1);
            if (!head_valid[p][v]) begin
              head_valid[p][v] = 1; head_out[p][v] = 2'(rand_out(p)); have++;
            end
          end
        end
        #1;
        used = 0; n = 0;
        for (int p = 0; p < 4; p++) if (grant_valid[p]) begin
          n++;
          checks++;
          for (int o = 0; o < 4; o++) if (pgv[p][o]) begin
            if (used & (1 << o)) begin failures++; $display("FAIL output granted twice"); end
            used |= 1 << o;
          end
          if (!head_valid[p][grant_vc[p]] || !pgv[p][head_out[p][grant_vc[p]]]) begin
            failures++; $display("FAIL grant to a VC that did not ask");
          end
        end
        if ((LAT > 1 ? arv_prev : arv) != '0) begin arbs++; total += n; end
        arv_prev = arv;
        for (int p = 0; p < 4; p++) begin won[p] = grant_valid[p]; won_vc[p] = int'(grant_vc[p]); end
        @(negedge clk);
        for (int p = 0; p < 4; p++) if (won[p]) head_valid[p][won_vc[p]] = 0;
      end
      matches_per_arb = (arbs > 0) ? real'(total) / real'(arbs) : 0.0;
      done = 1;
      wait (!start);
      done = 0;
    end
  end

endmodule
