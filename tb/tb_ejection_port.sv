// tb_ejection_port: random ejection requests from 8 VCs.  The testbench keeps
// its own round-robin pointer, checks which VC is popped each cycle and that
// the popped flit appears on the output one cycle later; a low ready must
// stop all pops.
module tb_ejection_port;
  import tabarb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  [7:0] req, pop;
  flit_t [7:0] head;
  logic        ready, ov;
  flit_t       of, exp_f;
  int rr = 0, win;
  bit exp_v;

  ejection_port #(.NVC(8)) dut (.clk, .rst_n, .eject_req(req), .head, .ready, .pop,
                                .out_valid(ov), .out_flit(of));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; ready = 0; head = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_v = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (ov != exp_v || (exp_v && of != exp_f)) begin failures++; $display("FAIL output cycle %0d", c); end
      req   = 8'($urandom) & 8'($urandom);
      ready = ($urandom_range(0, 4) != 0);
      for (int v = 0; v < 8; v++) head[v] = {1'b1, 2'($urandom), 32'($urandom), 32'($urandom)};
      win = -1;
      for (int i = 0; i < 8; i++) if (win < 0 && req[(rr + i) % 8]) win = (rr + i) % 8;
      #1;
      checks++;
      if (pop != ((win >= 0 && ready) ? (8'd1 << win) : 8'd0)) begin
        failures++; $display("FAIL pop %b win %0d", pop, win);
      end
      exp_v = (win >= 0 && ready);
      if (exp_v) begin exp_f = head[win]; rr = (win + 1) % 8; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
