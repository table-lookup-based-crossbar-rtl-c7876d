// tabarb_table: the maximum-cardinality-match lookup table (MCM-TAB).
//
// The Aggregate Request Vector (ARV, the concatenated compact Port Request
// Vectors of the four input ports) indexes a read-only table whose entry is
// the Aggregate Grant Vector (AGV): a maximum cardinality matching of that
// request pattern, in compact Port Grant Vector form.  The table is filled at
// elaboration time: for every index, the ARV is decoded into four request
// masks, tabarb_pkg::mcm() finds a maximum matching, and the grants are
// re-encoded.  Being constant, the table is a truth table that synthesis
// turns into hard-wired combinational logic, as the table-lookup idea
// intends; nothing is written at run time.
//
// The table is parameterized by the PRV format of each port (F0..F3, X+ to
// Y-), which follows from the routing algorithm and the number of flits each
// port forwards (see tabarb_pkg::port_format):
//   DOR, full forwarding        : MASK3,MASK3,BIT1,BIT1   8-bit ARV,  256 entries
//   adaptive, PaRF<3,3,1,1>     : MASK3,MASK3,CODE2,CODE2 10-bit ARV, 1K entries
//   adaptive, full forwarding   : MASK3 x4                12-bit ARV, 4K entries
// The defaults are the adaptive PaRF<3,3,1,1> table.
//
// Interface: arv in, agv out.  Purely combinational (zero cycles); the
// arbiter around it places any pipeline registers.
module tabarb_table
  import tabarb_pkg::*;
#(
  parameter fmt_e F0 = FMT_MASK3,
  parameter fmt_e F1 = FMT_MASK3,
  parameter fmt_e F2 = FMT_CODE2,
  parameter fmt_e F3 = FMT_CODE2,
  localparam int unsigned ARV_W = prv_width(F0) + prv_width(F1) + prv_width(F2) + prv_width(F3),
  localparam int unsigned AGV_W = pgv_width(F0) + pgv_width(F1) + pgv_width(F2) + pgv_width(F3)
) (
  input  logic [ARV_W-1:0] arv,
  output logic [AGV_W-1:0] agv
);

  localparam int unsigned ENTRIES = 1 << ARV_W;

  function automatic fmt_e fmt_of(int unsigned p);
    case (p)
      0:       return F0;
      1:       return F1;
      2:       return F2;
      default: return F3;
    endcase
  endfunction

  // Table entry for one ARV value.
  function automatic logic [AGV_W-1:0] entry(int unsigned idx);
    reqset_t     req, gnt;
    int unsigned pos;
    logic [AGV_W-1:0] e;
    logic [1:0]  pg;
    pos = 0;
    for (int unsigned p = 0; p < NPORTS; p++) begin
      req[p] = decode_prv(fmt_of(p), p, 3'((idx >> pos) & ((1 << prv_width(fmt_of(p))) - 1)));
      pos += prv_width(fmt_of(p));
    end
    gnt = mcm(req);
    e   = '0;
    pos = 0;
    for (int unsigned p = 0; p < NPORTS; p++) begin
      pg = encode_pgv(fmt_of(p), p, gnt[p]);
      for (int unsigned b = 0; b < pgv_width(fmt_of(p)); b++) e[pos+b] = pg[b];
      pos += pgv_width(fmt_of(p));
    end
    return e;
  endfunction

  logic [AGV_W-1:0] rom [ENTRIES];

  for (genvar i = 0; i < ENTRIES; i++) begin : g_entry
    localparam logic [AGV_W-1:0] E = entry(i);
    assign rom[i] = E;
  end

  assign agv = rom[arv];

endmodule
