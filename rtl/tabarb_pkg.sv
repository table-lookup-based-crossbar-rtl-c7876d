// tabarb_pkg: shared types, constants and encode/decode functions of the
// table-lookup crossbar arbiter (TabArb) for a 2D mesh/torus router.
//
// The switch being arbitrated is a 4x4 crossbar between the network input
// ports and the network output ports X+, X-, Y+, Y-.  Port p has index
// PORT_XP=0, PORT_XM=1, PORT_YP=2, PORT_YM=3 on both sides.  Inside the RTL a
// request or grant is a 4-bit mask with bit o set for output o.  (Written as
// a string "X+ X- Y+ Y-" left to right, input X+ asking for Y+ and Y- is
// "0011"; that is req[PORT_YP] and req[PORT_YM] set.)
//
// Minimal routing never sends a flit back out of the port of the same name
// it arrived on, so each input port has only three candidate outputs: the
// other three ports in ascending index order (candidate 0, 1, 2).  The Port
// Request Vector (PRV) of a port is stored in the Aggregate Request Vector
// (ARV) in one of three formats:
//   FMT_MASK3 : 3 bits, bit k set = candidate k requested (several flits'
//               requests forwarded, or full request forwarding)
//   FMT_CODE2 : 2 bits, 0 = no request, k+1 = candidate k requested (only one
//               flit forwarded and each flit requests at most one output)
//   FMT_BIT1  : 1 bit, the only legal request of a Y port under dimension-
//               ordered routing (X first, then Y): Y+ input -> Y- output,
//               Y- input -> Y+ output
// The Port Grant Vector (PGV) in the Aggregate Grant Vector (AGV) is 2 bits
// (0 = no grant, k+1 = candidate k granted), or 1 bit for FMT_BIT1 ports.
// Port 0 occupies the least significant bits of the ARV and AGV.  The field
// order and code values are this design's choice.
//
// mcm() computes a maximum cardinality matching by exhaustive search; it is
// only evaluated at elaboration time, to fill the lookup table.  Among several
// maximum matchings it keeps the first one met in its search order.
package tabarb_pkg;

  localparam int unsigned NPORTS = 4;

  localparam int unsigned PORT_XP = 0;
  localparam int unsigned PORT_XM = 1;
  localparam int unsigned PORT_YP = 2;
  localparam int unsigned PORT_YM = 3;

  typedef enum logic [1:0] {
    FMT_MASK3 = 2'd0,
    FMT_CODE2 = 2'd1,
    FMT_BIT1  = 2'd2
  } fmt_e;

  typedef enum logic {
    ROUTE_DOR      = 1'b0,
    ROUTE_ADAPTIVE = 1'b1
  } routing_e;

  // Flit as stored in a VC input queue.  The routing and VC allocation
  // stages, which sit outside this RTL, write the flit's route: eject = 1
  // sends it to the ejection port of the input port it sits in, otherwise it
  // requests crossbar output out_port.  FLIT_W is the 64-bit flit of the
  // document's area comparison (eight-flit queues of 64-bit flits).
  localparam int unsigned FLIT_W = 64;

  typedef struct packed {
    logic              eject;
    logic [1:0]        out_port;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // One 4-bit output mask per input port.
  typedef logic [NPORTS-1:0] portmask_t;
  typedef portmask_t [NPORTS-1:0] reqset_t;

  // Output port name of candidate k (0..2) of input port p.
  function automatic int unsigned cand_port(int unsigned p, int unsigned k);
    return (k < p) ? k : k + 1;
  endfunction

  // Candidate index of output o at input p (o != p).
  function automatic int unsigned cand_index(int unsigned p, int unsigned o);
    return (o < p) ? o : o - 1;
  endfunction

  // Output reached by the single FMT_BIT1 request of a Y input under DOR.
  function automatic int unsigned dor_y_output(int unsigned p);
    return (p == PORT_YP) ? PORT_YM : PORT_YP;
  endfunction

  function automatic int unsigned prv_width(fmt_e f);
    case (f)
      FMT_MASK3: return 3;
      FMT_CODE2: return 2;
      default:   return 1;
    endcase
  endfunction

  function automatic int unsigned pgv_width(fmt_e f);
    return (f == FMT_BIT1) ? 1 : 2;
  endfunction

  // Format of every port's PRV from the routing algorithm and the number of
  // flits each port forwards (FWD[p] == 1: one flit, anything else: several).
  function automatic fmt_e port_format(routing_e r, int unsigned p, int unsigned fwd);
    if (r == ROUTE_DOR && (p == PORT_YP || p == PORT_YM)) return FMT_BIT1;
    if (fwd == 1) return FMT_CODE2;
    return FMT_MASK3;
  endfunction

  // Compact PRV of port p from its 4-bit request mask.
  function automatic logic [2:0] encode_prv(fmt_e f, int unsigned p, portmask_t m);
    logic [2:0] v;
    v = '0;
    case (f)
      FMT_MASK3:
        for (int unsigned k = 0; k < 3; k++) v[k] = m[cand_port(p, k)];
      FMT_CODE2:
        for (int unsigned k = 0; k < 3; k++) if (m[cand_port(p, k)]) v = 3'(k + 1);
      default:
        v[0] = m[dor_y_output(p)];
    endcase
    return v;
  endfunction

  function automatic portmask_t decode_prv(fmt_e f, int unsigned p, logic [2:0] v);
    portmask_t m;
    m = '0;
    case (f)
      FMT_MASK3:
        for (int unsigned k = 0; k < 3; k++) m[cand_port(p, k)] = v[k];
      FMT_CODE2:
        if (v[1:0] != 2'd0) m[cand_port(p, int'(v[1:0]) - 1)] = 1'b1;
      default:
        m[dor_y_output(p)] = v[0];
    endcase
    return m;
  endfunction

  function automatic logic [1:0] encode_pgv(fmt_e f, int unsigned p, portmask_t g);
    logic [1:0] v;
    v = '0;
    if (f == FMT_BIT1) v[0] = g[dor_y_output(p)];
    else for (int unsigned k = 0; k < 3; k++) if (g[cand_port(p, k)]) v = 2'(k + 1);
    return v;
  endfunction

  function automatic portmask_t decode_pgv(fmt_e f, int unsigned p, logic [1:0] v);
    portmask_t g;
    g = '0;
    if (f == FMT_BIT1) g[dor_y_output(p)] = v[0];
    else if (v != 2'd0) g[cand_port(p, int'(v) - 1)] = 1'b1;
    return g;
  endfunction

  // Maximum cardinality matching of a 4x4 bipartite request graph.  Every
  // input tries "no grant" or each output in turn (5^4 assignments); the
  // first assignment of the largest size wins.
  function automatic reqset_t mcm(reqset_t req);
    reqset_t best, cur;
    int unsigned best_n, n, code, ch;
    logic [NPORTS-1:0] used;
    logic ok;
    best   = '0;
    best_n = 0;
    for (int unsigned a = 0; a < 625; a++) begin
      code = a;
      cur  = '0;
      used = '0;
      n    = 0;
      ok   = 1'b1;
      for (int unsigned p = 0; p < NPORTS; p++) begin
        ch   = code % 5;
        code = code / 5;
        if (ch != 0) begin
          if (!req[p][ch-1] || used[ch-1]) ok = 1'b0;
          else begin
            used[ch-1]     = 1'b1;
            cur[p][ch-1]   = 1'b1;
            n++;
          end
        end
      end
      if (ok && n > best_n) begin
        best   = cur;
        best_n = n;
      end
    end
    return best;
  endfunction

endpackage
