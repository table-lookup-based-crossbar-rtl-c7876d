// tb_matching_power: matching power of the table-lookup arbiter versus
// input-queue occupancy, for the request-forwarding schemes compared in the
// evaluation: the lite DOR arbiter with full forwarding (4 VCs, 1 cycle) and
// the adaptive arbiter (8 VCs, 2 cycles) with PaRF<1,1,1,1>, <2,2,2,2>,
// <3,3,1,1>, <3,3,3,3> and full forwarding.  Occupancy runs over 0.1, 0.25,
// 0.5 and 0.8 (fraction of VCs with a head flit).  It prints the table of
// matches per arbitration and checks the expected trends at 0.8 occupancy:
// forwarding more requests never loses much matching power
// (<3,3,1,1> and <2,2,2,2> at least 5% above <1,1,1,1>, full forwarding
// not below any partial scheme), and every scheme
// finds at least one match per arbitration.
module tb_matching_power;
  import tabarb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NS = 6;
  localparam int NOCC = 4;
  int  occ_list [NOCC] = '{10, 25, 50, 80};
  string names [NS] = '{"lite FuRF (DOR)", "PaRF<1,1,1,1>", "PaRF<2,2,2,2>",
                        "PaRF<3,3,1,1>", "PaRF<3,3,3,3>", "FuRF (adaptive)"};

  int  occ;
  bit  start = 0;
  bit  done [NS];
  real mp [NS];
  int  ck [NS], fl [NS];
  real res [NS][NOCC];
  int  checks = 0, failures = 0;

  mp_harness #(.ROUTING(ROUTE_DOR), .NVC(4), .FWD_XP(0), .FWD_XM(0), .FWD_YP(0), .FWD_YM(0), .LAT(1))
    h0 (.clk, .occ_pct(occ), .start, .done(done[0]), .matches_per_arb(mp[0]), .checks(ck[0]), .failures(fl[0]));
  mp_harness #(.FWD_XP(1), .FWD_XM(1), .FWD_YP(1), .FWD_YM(1))
    h1 (.clk, .occ_pct(occ), .start, .done(done[1]), .matches_per_arb(mp[1]), .checks(ck[1]), .failures(fl[1]));
  mp_harness #(.FWD_XP(2), .FWD_XM(2), .FWD_YP(2), .FWD_YM(2))
    h2 (.clk, .occ_pct(occ), .start, .done(done[2]), .matches_per_arb(mp[2]), .checks(ck[2]), .failures(fl[2]));
  mp_harness
    h3 (.clk, .occ_pct(occ), .start, .done(done[3]), .matches_per_arb(mp[3]), .checks(ck[3]), .failures(fl[3]));
  mp_harness #(.FWD_XP(3), .FWD_XM(3), .FWD_YP(3), .FWD_YM(3))
    h4 (.clk, .occ_pct(occ), .start, .done(done[4]), .matches_per_arb(mp[4]), .checks(ck[4]), .failures(fl[4]));
  mp_harness #(.FWD_XP(0), .FWD_XM(0), .FWD_YP(0), .FWD_YM(0))
    h5 (.clk, .occ_pct(occ), .start, .done(done[5]), .matches_per_arb(mp[5]), .checks(ck[5]), .failures(fl[5]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    for (int s = 1; s < 5; s++) begin
      checks++;
      if (res[5][NOCC-1] < 0.97 * res[s][NOCC-1]) begin failures++; $display("FAIL full forwarding below %s", names[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < NOCC; k++) begin
      occ = occ_list[k];
      @(negedge clk);
      start = 1;
      while (!all_done()) @(negedge clk);
      for (int s = 0; s < NS; s++) res[s][k] = mp[s];
      @(negedge clk);
      start = 0;
      @(negedge clk);
    end
    $display("matches per arbitration  occupancy: 0.10  0.25  0.50  0.80");
    for (int s = 0; s < NS; s++)
      $display("  %-18s                 %5.2f %5.2f %5.2f %5.2f", names[s],
               res[s][0], res[s][1], res[s][2], res[s][3]);
    foreach (ck[s]) begin checks += ck[s]; failures += fl[s]; end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (res[s][NOCC-1] < 1.0) begin failures++; $display("FAIL %s below one match", names[s]); end
    end
    checks++;
    if (res[3][NOCC-1] < 1.05 * res[1][NOCC-1]) begin failures++; $display("FAIL <3,3,1,1> not above <1,1,1,1>"); end
    checks++;
    if (res[2][NOCC-1] < 1.05 * res[1][NOCC-1]) begin failures++; $display("FAIL <2,2,2,2> not above <1,1,1,1>"); end
    for (int s = 1; s < 5; s++) begin
      checks++;
      if (res[5][NOCC-1] < 0.97 * res[s][NOCC-1]) begin failures++; $display("FAIL full forwarding below %s", names[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
