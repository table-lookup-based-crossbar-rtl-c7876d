// tb_vc_buffer: random push/pop test of one 8-flit VC queue against a
// testbench queue model: head flit, head_valid and full are compared every
// cycle, including simultaneous push and pop and the full queue.
module tb_vc_buffer;
  import tabarb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  push, pop, hv, full;
  flit_t pf, head;
  flit_t q [$];
  int fulls = 0, both = 0;

  vc_buffer dut (.clk, .rst_n, .push, .push_flit(pf), .pop, .head_valid(hv), .head, .full);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; pf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      checks++;
      if (hv != (q.size() > 0) || full != (q.size() == 8) || (hv && head != q[0])) begin
        failures++;
        $display("FAIL cycle %0d: hv %b full %b size %0d", c, hv, full, q.size());
      end
      if (full) fulls++;
      // Phases: fill-biased, then drain-biased.
      pop  = hv && ($urandom_range(0, 9) < ((c / 500) % 2 ? 8 : 3));
      push = (!full || pop) && ($urandom_range(0, 9) < ((c / 500) % 2 ? 3 : 8));
      pf   = {1'($urandom), 2'($urandom), 32'($urandom), 32'($urandom)};
      if (push && pop) both++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(pf);
    end
    checks++;
    if (fulls == 0 || both == 0) begin failures++; $display("FAIL full %0d both %0d", fulls, both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
