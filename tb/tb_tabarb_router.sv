// tb_tabarb_router: end-to-end test of the router at its default (aggressive)
// parameters: adaptive routing, PaRF<3,3,1,1>, 2-cycle arbitration, 8 VCs
// of 8 flits per input port.
//
// Four upstream senders keep per-VC credit counters (eight per VC, returned
// by credit_out) and inject flits on random VCs; each flit carries its source
// port, VC and sequence number in its data and a random route (any output
// but the one of the same name, or ejection).  Downstream, out_ready and
// eject_ready are randomly withdrawn.  A scoreboard checks that every flit
// leaves exactly once, by the port its route names, in order within its VC,
// with its data and VC intact, and that everything drains at the end.
// The run counts each mechanism and fails if one never happened: crossbar
// traversal, ejection, ejection and crossbar from one port in the same
// cycle, four simultaneous crossbar matches, a credit stall (VC queue full
// upstream), output back-pressure and an anti-starvation episode.  It also
// reports the average number of matches per arbitration.
module tb_tabarb_router;
  import tabarb_pkg::*;

  localparam int NVC = 8, DEPTH = 8, INJECT_CYCLES = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  [3:0]          in_valid, out_ready, out_valid, eject_ready, eject_valid;
  logic  [3:0][2:0]     in_vc, out_vc;
  flit_t [3:0]          in_flit, out_flit, eject_flit;
  logic  [3:0][NVC-1:0] credit_out;
  logic  [2:0]          match_count;
  logic                 starve_active;

  tabarb_router dut (
    .clk, .rst_n, .in_valid, .in_vc, .in_flit, .credit_out, .out_ready, .out_valid,
    .out_flit, .out_vc, .eject_ready, .eject_valid, .eject_flit, .match_count, .starve_active);

  int    credits [4][NVC];
  int    seq [4][NVC];
  flit_t sb [4][NVC][$];
  int    sent = 0, recv = 0;
  int    n_xbar = 0, n_eject = 0, n_both = 0, n_four = 0, n_credit_stall = 0;
  int    n_backpressure = 0, n_starve = 0, n_arb_cycles = 0, n_matches = 0;
  bit    starve_prev = 0, injecting = 1;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, s);
  endtask

  // Check one flit leaving the router by output o (xbar) or ejection port o.
  task automatic receive(int o, bit ej, flit_t f, int vc);
    int sp, sv;
    flit_t e;
    sp = int'(f.data[63:62]);
    sv = int'(f.data[61:59]);
    checks++;
    if (sb[sp][sv].size() == 0) begin fail("flit nobody sent"); return; end
    e = sb[sp][sv].pop_front();
    recv++;
    if (f != e) fail($sformatf("port %0d vc %0d: wrong flit or order", sp, sv));
    if (ej && (!f.eject || sp != o)) fail("ejected at the wrong port");
    if (!ej && (f.eject || int'(f.out_port) != o)) fail("left by the wrong output");
    if (!ej && vc != sv) fail("out_vc wrong");
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: observe at every negedge (values latched at the last posedge).
  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < 4; o++) begin
      if (out_valid[o]) begin
        receive(o, 0, out_flit[o], int'(out_vc[o]));
        n_xbar++;
        if (eject_valid[out_flit[o].data[63:62]]) n_both++;
      end
      if (eject_valid[o]) begin receive(o, 1, eject_flit[o], 0); n_eject++; end
    end
  end

  // Mechanism counters, sampled just before the clock edge.
  always @(posedge clk) if (rst_n) begin
    n_arb_cycles++;
    n_matches += int'(match_count);
    if (match_count == 3'd4) n_four++;
    if (starve_active && !starve_prev) n_starve++;
    starve_prev <= starve_active;
    if (out_ready != 4'hF) n_backpressure++;
  end

  // Credits come back one cycle after a flit leaves its queue.
  always @(negedge clk) if (rst_n)
    for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++)
      if (credit_out[p][v]) credits[p][v]++;

  initial begin
    in_valid = '0; in_vc = '0; in_flit = '0; out_ready = '1; eject_ready = '1;
    for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++) begin
      credits[p][v] = DEPTH; seq[p][v] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < INJECT_CYCLES + 3000; c++) begin
      @(negedge clk);
      #1;
      injecting = (c < INJECT_CYCLES);
      // Load phases: heavy, with a hot VC per port so queues fill up.
      for (int p = 0; p < 4; p++) begin
        automatic int v, o;
        in_valid[p] = 0;
        if (injecting && $urandom_range(0, 9) < 9) begin
          v = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, NVC - 1);
          if (credits[p][v] == 0) n_credit_stall++;
          else begin
            credits[p][v]--;
            in_valid[p] = 1;
            in_vc[p]    = 3'(v);
            in_flit[p].eject = ($urandom_range(0, 6) == 0);
            do o = $urandom_range(0, 3); while (o == p);
            in_flit[p].out_port = 2'(o);
            in_flit[p].data = {2'(p), 3'(v), 27'(seq[p][v]), 32'($urandom)};
            seq[p][v]++;
            sb[p][v].push_back(in_flit[p]);
            sent++;
          end
        end
      end
      // Downstream back-pressure: output X- and ejection port 0 are often blocked.
      out_ready   = ($urandom_range(0, 9) < 2) ? 4'b1101 : 4'hF;
      eject_ready = ($urandom_range(0, 9) < 3) ? 4'b1110 : 4'hF;
      if (!injecting && sent == recv) break;
    end
    @(negedge clk);
    in_valid = '0;
    repeat (5) @(negedge clk);
    checks++;
    if (sent != recv) fail($sformatf("sent %0d flits, received %0d", sent, recv));
    checks++; if (n_xbar == 0)         fail("no crossbar traversal");
    checks++; if (n_eject == 0)        fail("no ejection");
    checks++; if (n_both == 0)         fail("never ejected and crossed from one port together");
    checks++; if (n_four == 0)         fail("never four matches in one arbitration");
    checks++; if (n_credit_stall == 0) fail("never a credit stall");
    checks++; if (n_backpressure == 0) fail("never output back-pressure");
    checks++; if (n_starve == 0)       fail("anti-starvation never triggered");
    $display("flits %0d: crossbar %0d ejected %0d; eject+crossbar same port %0d; 4-match cycles %0d",
             sent, n_xbar, n_eject, n_both, n_four);
    $display("credit stalls %0d, back-pressure cycles %0d, starvation episodes %0d",
             n_credit_stall, n_backpressure, n_starve);
    $display("average matches per cycle %0.2f", real'(n_matches) / real'(n_arb_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
