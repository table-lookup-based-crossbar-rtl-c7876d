// tb_request_forwarder: random test of the per-port request forwarder.
//
// Two forwarders see the same random head flits, credit state and starvation
// commands: the partial-forwarding one (FWD=3, LAT=2, grant one cycle after
// the request) and a full-forwarding one (FWD=0, LAT=1, grant in the request
// cycle).  A reference model in the testbench keeps its own round-robin
// pointer and in-flight set, predicts the request mask every cycle and the
// VC that a random port grant (one-hot, drawn from the predicted requests)
// must select.  It also checks that a VC is never forwarded while its earlier
// request is in flight, which is what lets a 2-cycle lookup start a new
// arbitration every cycle.
module tb_request_forwarder;
  import tabarb_pkg::*;

  localparam int NVC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [NVC-1:0]      head_valid;
  logic [NVC-1:0][1:0] head_out;
  logic [3:0]          out_ready;
  logic                starve_active, starve_here;
  logic [2:0]          starve_vc;
  logic [1:0]          starve_out;
  portmask_t           req_a, req_b, pgv_a, pgv_b;
  logic [NVC-1:0]      vcg_a, vcg_b;
  logic [2:0]          gvc_a, gvc_b;
  logic                gv_a, gv_b;

  request_forwarder #(.NVC(NVC), .FWD(3), .LAT(2)) dut_a (
    .clk, .rst_n, .head_valid, .head_out, .out_ready, .starve_active, .starve_here,
    .starve_vc, .starve_out, .req_mask(req_a), .pgv(pgv_a), .vc_grant(vcg_a),
    .grant_vc(gvc_a), .grant_valid(gv_a));

  request_forwarder #(.NVC(NVC), .FWD(0), .LAT(1)) dut_b (
    .clk, .rst_n, .head_valid, .head_out, .out_ready, .starve_active, .starve_here,
    .starve_vc, .starve_out, .req_mask(req_b), .pgv(pgv_b), .vc_grant(vcg_b),
    .grant_vc(gvc_b), .grant_valid(gv_b));

  // Reference model state.
  class model;
    int nfwd, lat, rr;
    bit fwd_now [NVC];
    bit fwd_prev [NVC];
    function new(int nfwd_i, int lat_i);
      nfwd = nfwd_i; lat = lat_i; rr = 0;
      foreach (fwd_prev[i]) fwd_prev[i] = 0;
    endfunction
    function automatic int predict_mask(logic [NVC-1:0] hv, logic [NVC-1:0][1:0] ho,
                                        logic [3:0] ordy, bit sa, bit sh, int svc, int sout);
      int m = 0, n = 0, v;
      bit el;
      for (int i = 0; i < NVC; i++) begin
        v = (rr + i) % NVC;
        el = hv[v] && ordy[ho[v]];
        if (lat > 1 && fwd_prev[v]) el = 0;
        if (sa && sh && v != svc) el = 0;
        if (sa && !sh && int'(ho[v]) == sout) el = 0;
        fwd_now[v] = el && (n < nfwd);
        if (fwd_now[v]) begin
          n++;
          m |= 1 << ho[v];
        end
      end
      return m;
    endfunction
    // VC expected to win output o among the set whose result arrives now.
    function automatic int winner(logic [NVC-1:0][1:0] ho, int o);
      int v;
      for (int i = 0; i < NVC; i++) begin
        v = (rr + i) % NVC;
        if ((lat > 1 ? fwd_prev[v] : fwd_now[v]) && int'(ho[v]) == o) return v;
      end
      return -1;
    endfunction
  endclass

  model ma = new(3, 2);
  model mb = new(NVC, 1);

  int exp_a, exp_b, win_a, win_b, o;
  portmask_t prev_req_a;
  int grants_a = 0, grants_b = 0, starve_cycles = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_valid = '0; head_out = '0; out_ready = '1;
    starve_active = 0; starve_here = 0; starve_vc = '0; starve_out = '0;
    pgv_a = '0; pgv_b = '0; prev_req_a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // Heads change at random, except while in flight at dut_a (a head cannot
      // change before its grant comes back).
      for (int v = 0; v < NVC; v++)
        if (!ma.fwd_prev[v] && (!head_valid[v] || $urandom_range(0, 3) == 0)) begin
          head_valid[v] = ($urandom_range(0, 2) != 0);
          head_out[v]   = 2'($urandom_range(0, 3));
        end
      out_ready     = ($urandom_range(0, 7) == 0) ? 4'($urandom) : 4'hF;
      starve_active = ($urandom_range(0, 9) == 0);
      starve_here   = $urandom_range(0, 1);
      starve_vc     = 3'($urandom_range(0, NVC - 1));
      starve_out    = 2'($urandom_range(0, 3));
      if (starve_active) starve_cycles++;
      exp_a = ma.predict_mask(head_valid, head_out, out_ready, starve_active, starve_here,
                              int'(starve_vc), int'(starve_out));
      exp_b = mb.predict_mask(head_valid, head_out, out_ready, starve_active, starve_here,
                              int'(starve_vc), int'(starve_out));
      // Random one-hot grant among the requests whose result is due now.
      pgv_a = '0;
      if (prev_req_a != 0) begin
        do o = $urandom_range(0, 3); while (!prev_req_a[o]);
        if ($urandom_range(0, 4) != 0) pgv_a[o] = 1'b1;
      end
      pgv_b = '0;
      if (exp_b != 0) begin
        do o = $urandom_range(0, 3); while (!exp_b[o]);
        if ($urandom_range(0, 4) != 0) pgv_b[o] = 1'b1;
      end
      #1;
      checks += 2;
      if (int'(req_a) != exp_a) begin failures++; $display("FAIL a mask %b exp %b", req_a, 4'(exp_a)); end
      if (int'(req_b) != exp_b) begin failures++; $display("FAIL b mask %b exp %b", req_b, 4'(exp_b)); end
      win_a = -1; win_b = -1;
      for (int k = 0; k < 4; k++) if (pgv_a[k]) win_a = ma.winner(head_out, k);
      for (int k = 0; k < 4; k++) if (pgv_b[k]) win_b = mb.winner(head_out, k);
      checks += 2;
      if ((win_a >= 0) != gv_a || (gv_a && int'(gvc_a) != win_a) || (gv_a && vcg_a != (8'd1 << win_a))) begin
        failures++; $display("FAIL a grant vc %0d valid %b exp %0d", gvc_a, gv_a, win_a);
      end
      if ((win_b >= 0) != gv_b || (gv_b && int'(gvc_b) != win_b) || (gv_b && vcg_b != (8'd1 << win_b))) begin
        failures++; $display("FAIL b grant vc %0d valid %b exp %0d", gvc_b, gv_b, win_b);
      end
      // Never forward a VC that is in flight.
      for (int v = 0; v < NVC; v++) if (ma.fwd_prev[v] && ma.fwd_now[v]) begin
        failures++; $display("FAIL model forwarded in-flight vc");
      end
      if (gv_a) grants_a++;
      if (gv_b) grants_b++;
      @(posedge clk);
      #1;
      // Model state update and pops.
      if (win_a >= 0) ma.rr = (win_a + 1) % NVC;
      if (win_b >= 0) mb.rr = (win_b + 1) % NVC;
      for (int v = 0; v < NVC; v++) ma.fwd_prev[v] = ma.fwd_now[v];
      prev_req_a = 4'(exp_a);
      // Granted heads leave; only pop what neither DUT still has in flight.
      if (win_b >= 0 && !ma.fwd_prev[win_b] && win_b != win_a) head_valid[win_b] = 0;
      if (win_a >= 0 && !ma.fwd_prev[win_a]) head_valid[win_a] = 0;
    end
    checks++;
    if (grants_a < 100 || grants_b < 100 || starve_cycles < 50) begin
      failures++;
      $display("FAIL too few events: %0d %0d %0d", grants_a, grants_b, starve_cycles);
    end
    $display("grants a=%0d b=%0d starve cycles=%0d", grants_a, grants_b, starve_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
