// tb_crossbar: random one-hot selections on the 4x4 crossbar.  Each output
// must show, one cycle later, the flit of the input selected for it, or
// out_valid = 0 when no input was selected.
module tb_crossbar;
  import tabarb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t [3:0]      in_flit, out_flit, exp_flit;
  logic  [3:0][3:0] sel;
  logic  [3:0]      out_valid, exp_valid;
  int perm [4];

  crossbar dut (.clk, .rst_n, .in_flit, .sel, .out_valid, .out_flit);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = '0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      sel = '0;
      for (int i = 0; i < 4; i++) begin
        in_flit[i] = {1'($urandom), 2'($urandom), 32'($urandom), 32'($urandom)};
        if ($urandom_range(0, 3) != 0) sel[perm[i]][i] = 1'b1;   // input i -> output perm[i]
      end
      for (int o = 0; o < 4; o++) begin
        exp_valid[o] = 0; exp_flit[o] = '0;
        for (int i = 0; i < 4; i++) if (sel[o][i]) begin exp_valid[o] = 1; exp_flit[o] = in_flit[i]; end
      end
      @(negedge clk);
      sel = '0;
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (out_valid[o] != exp_valid[o] || (exp_valid[o] && out_flit[o] != exp_flit[o])) begin
          failures++; $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
