// crossbar: the 4x4 network crossbar with its output latches.
//
// Each output port o takes the flit of the input port whose bit is set in
// sel[o] (one-hot over inputs, from the switch arbiter's grants) and latches
// it at the clock edge (switch traversal stage), so out_valid/out_flit appear
// one cycle after the grant.  An output with no selected input latches
// out_valid = 0.  The arbiter never selects two inputs for one output; an
// assertion checks it.  The output register follows the latch drawn after
// each crossbar output in the router figure; the one-hot select encoding is
// this design's choice.
module crossbar
  import tabarb_pkg::*;
#(
  parameter int unsigned N = NPORTS,
  parameter type         T = flit_t
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  T     [N-1:0]         in_flit,
  input  logic [N-1:0][N-1:0]  sel,        // sel[o][i]: input i drives output o
  output logic [N-1:0]         out_valid,
  output T     [N-1:0]         out_flit
);

  T [N-1:0] mux;

  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      mux[o] = '0;
      for (int unsigned i = 0; i < N; i++) if (sel[o][i]) mux[o] = in_flit[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_flit  <= '0;
    end else begin
      for (int unsigned o = 0; o < N; o++) begin
        out_valid[o] <= |sel[o];
        out_flit[o]  <= mux[o];
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_chk
    a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel[o]));
  end

endmodule
