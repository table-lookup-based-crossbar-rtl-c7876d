// tb_tabarb_arbiter: end-to-end test of the table-lookup switch arbiter in
// both evaluated configurations, the aggressive one (adaptive routing,
// PaRF<3,3,1,1>, 2-cycle pipelined lookup, 8 VCs, the defaults) and the lite
// one (dimension-ordered routing, full request forwarding, single-cycle
// lookup, 4 VCs).  See arb_harness for the checks.  It also prints the
// average number of matches per arbitration under full load.
module tb_tabarb_arbiter;
  import tabarb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int  ca, fa, cl, fl, sa, sl;
  bit  da, dl;
  real ma, ml;

  arb_harness u_aggr (.clk, .checks(ca), .failures(fa), .done(da), .starved(sa), .matches_per_arb(ma));
  arb_harness #(.ROUTING(ROUTE_DOR), .NVC(4), .FWD_XP(0), .FWD_XM(0), .FWD_YP(0), .FWD_YM(0),
                .LAT(1)) u_lite (.clk, .checks(cl), .failures(fl), .done(dl), .starved(sl),
                                 .matches_per_arb(ml));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cl, fa + fl + 1);
    $finish;
  end

  initial begin
    wait (da && dl);
    $display("aggressive: %0.2f matches/arbitration, %0d starvation episodes", ma, sa);
    $display("lite:       %0.2f matches/arbitration, %0d starvation episodes", ml, sl);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cl, fa + fl);
    $finish;
  end
endmodule
