// tb_starvation_ctrl: directed and random test of the anti-starvation guard.
//
// Directed part (TIMEOUT = 20): VC 5 of port 1 requests and is never granted;
// it must appear as the starved flit exactly after 20 waiting cycles plus the
// one-cycle push, and leave when granted.  Three VCs that time out together
// must be served in FIFO order (port, then VC, order of entry).  A VC whose
// output is not ready does not count waiting cycles.
// Random part: a testbench model of the counters and FIFO is compared with
// the published starved flit every cycle.
module tb_starvation_ctrl;
  import tabarb_pkg::*;

  localparam int NVC = 4, TO = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][NVC-1:0]      head_req, vc_grant;
  logic [3:0][NVC-1:0][1:0] head_out;
  logic [3:0]               out_ready;
  logic                     sa;
  logic [1:0]               sp, so;
  logic [1:0]               sv;
  logic [4:0]               scount;

  starvation_ctrl #(.NVC(NVC), .TIMEOUT(TO)) dut (
    .clk, .rst_n, .head_req, .head_out, .out_ready, .vc_grant,
    .starve_active(sa), .starve_port(sp), .starve_vc(sv), .starve_out(so),
    .starve_count(scount));

  task automatic expect_state(bit a, int p, int v, string what);
    checks++;
    if (sa !== a || (a && (int'(sp) != p || int'(sv) != v))) begin
      failures++;
      $display("FAIL %s: active %b port %0d vc %0d (exp %b %0d %0d)", what, sa, sp, sv, a, p, v);
    end
  endtask

  // Model for the random phase.
  int wait_m [4][NVC];
  bit queued_m [4][NVC];
  int fifo_p [$], fifo_v [$];
  int served = 0, entered = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_req = '0; vc_grant = '0; out_ready = '1;
    for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++) head_out[p][v] = 2'((p + 1) % 4);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: single starving VC.
    @(negedge clk);
    head_req[1][3] = 1;
    for (int c = 0; c < TO; c++) begin
      @(negedge clk);
      expect_state(0, 0, 0, "not yet starved");
    end
    @(negedge clk);
    expect_state(1, 1, 3, "starved after timeout");
    checks++;
    if (so != 2'd2) begin failures++; $display("FAIL starve_out %0d", so); end
    vc_grant[1][3] = 1;
    @(negedge clk);
    vc_grant[1][3] = 0; head_req[1][3] = 0;
    expect_state(0, 0, 0, "served");
    // Output not ready: no counting.
    out_ready = 4'b1011;              // output 2 (wanted by port 1) blocked
    head_req[1][0] = 1;
    repeat (2 * TO) @(negedge clk);
    expect_state(0, 0, 0, "blocked output does not starve");
    head_req[1][0] = 0;
    out_ready = '1;
    // Three together: port 3 VC 1, port 0 VC 2, port 2 VC 0 -> FIFO order 0/2, 2/0, 3/1.
    @(negedge clk);
    head_req[3][1] = 1; head_req[0][2] = 1; head_req[2][0] = 1;
    repeat (TO + 4) @(negedge clk);
    expect_state(1, 0, 2, "fifo first");
    checks++;
    if (scount != 3) begin failures++; $display("FAIL count %0d", scount); end
    vc_grant[0][2] = 1; @(negedge clk); vc_grant[0][2] = 0; head_req[0][2] = 0;
    expect_state(1, 2, 0, "fifo second");
    vc_grant[2][0] = 1; @(negedge clk); vc_grant[2][0] = 0; head_req[2][0] = 0;
    expect_state(1, 3, 1, "fifo third");
    vc_grant[3][1] = 1; @(negedge clk); vc_grant[3][1] = 0; head_req[3][1] = 0;
    expect_state(0, 0, 0, "fifo empty");
    repeat (3) @(negedge clk);

    // Random phase against a model.
    for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++) begin
      wait_m[p][v] = 0; queued_m[p][v] = 0;
    end
    for (int c = 0; c < 5000; c++) begin
      // inputs for this cycle
      for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++) begin
        if (!head_req[p][v] && $urandom_range(0, 9) == 0) head_req[p][v] = 1;
        vc_grant[p][v] = head_req[p][v] && ($urandom_range(0, 59) == 0);
      end
      if (fifo_p.size() > 0 && head_req[fifo_p[0]][fifo_v[0]] && $urandom_range(0, 1) == 0)
        vc_grant[fifo_p[0]][fifo_v[0]] = 1;
      out_ready = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      #1;
      if (fifo_p.size() > 0) expect_state(1, fifo_p[0], fifo_v[0], "random");
      else                   expect_state(0, 0, 0, "random idle");
      // model update (what the DUT does at the next edge)
      begin
        automatic bit pushed = 0;
        automatic int pp = 0, pv = 0;
        for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++)
          if (!pushed && head_req[p][v] && !vc_grant[p][v] && !queued_m[p][v] && wait_m[p][v] >= TO) begin
            pushed = 1; pp = p; pv = v;
          end
        if (fifo_p.size() > 0 && (vc_grant[fifo_p[0]][fifo_v[0]] || !head_req[fifo_p[0]][fifo_v[0]])) begin
          queued_m[fifo_p[0]][fifo_v[0]] = 0;
          void'(fifo_p.pop_front()); void'(fifo_v.pop_front());
          served++;
        end
        if (pushed) begin
          fifo_p.push_back(pp); fifo_v.push_back(pv); queued_m[pp][pv] = 1; entered++;
        end
        for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++)
          if (!head_req[p][v] || vc_grant[p][v]) wait_m[p][v] = 0;
          else if (out_ready[head_out[p][v]] && wait_m[p][v] < TO) wait_m[p][v]++;
      end
      @(negedge clk);
      for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++)
        if (vc_grant[p][v]) head_req[p][v] = 0;
    end
    checks++;
    if (entered < 20 || served < 20) begin
      failures++; $display("FAIL too few starvation events %0d %0d", entered, served);
    end
    $display("starved flits entered %0d served %0d", entered, served);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
