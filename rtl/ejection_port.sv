// ejection_port: the ejection port of one network input port.
//
// Flits that have reached their destination leave the router here instead of
// through the crossbar, one per cycle per input port, so a flit headed for
// ejection never blocks a flit headed for a network output.  Among the VCs
// whose head flit is marked for ejection the port picks one in round-robin
// order (starting after the last winner), pops it and latches it on
// out_valid/out_flit in the next cycle, provided the consumer is ready.
// One ejection port per input port follows the document; the round-robin
// choice and the ready input are this design's choices.
module ejection_port
  import tabarb_pkg::*;
#(
  parameter int unsigned NVC = 8,
  localparam int unsigned VW = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NVC-1:0]      eject_req,   // head valid and marked eject
  input  flit_t [NVC-1:0]     head,
  input  logic                ready,
  output logic [NVC-1:0]      pop,
  output logic                out_valid,
  output flit_t               out_flit
);

  logic [VW-1:0] rr_q;
  logic [VW-1:0] win;
  logic          any;

  always_comb begin
    int unsigned v;
    any = 1'b0;
    win = '0;
    pop = '0;
    for (int unsigned i = 0; i < NVC; i++) begin
      v = (int'(rr_q) + i) % NVC;
      if (!any && eject_req[v]) begin
        any = 1'b1;
        win = VW'(v);
      end
    end
    if (any && ready) pop[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q      <= '0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= any && ready;
      if (any && ready) begin
        out_flit <= head[win];
        rr_q     <= VW'((int'(win) + 1) % NVC);
      end
    end
  end

endmodule
