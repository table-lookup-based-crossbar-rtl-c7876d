// tb_tabarb_table: exhaustive check of the maximum-cardinality-match table.
//
// Three tables are built: the default adaptive PaRF<3,3,1,1> table (10-bit
// ARV), the dimension-ordered full-forwarding table (8-bit ARV) and the
// adaptive full-forwarding table (12-bit ARV).  Every ARV value of each is
// applied.  The testbench decodes the ARV and AGV with its own code, checks
// that the grants form a matching of the requests (each grant requested, one
// output per input, one input per output), and that its size equals the
// maximum matching size found by trying all 24 input-to-output permutations.
// The example of the arbitration figure (X+ asks Y+,Y-; X- asks X+; Y+ asks
// Y-; Y- asks X-,Y+) must give X+->Y+, X-->X+, Y+->Y-, Y-->X-.
module tb_tabarb_table;
  import tabarb_pkg::*;

  int checks = 0, failures = 0;

  logic [9:0]  arv_a;  logic [7:0] agv_a;
  logic [7:0]  arv_d;  logic [5:0] agv_d;
  logic [11:0] arv_f;  logic [7:0] agv_f;

  tabarb_table dut_a (.arv(arv_a), .agv(agv_a));
  tabarb_table #(.F2(FMT_BIT1), .F3(FMT_BIT1)) dut_d (.arv(arv_d), .agv(agv_d));
  tabarb_table #(.F2(FMT_MASK3), .F3(FMT_MASK3)) dut_f (.arv(arv_f), .agv(agv_f));

  // Output of candidate k of input p: the other ports in ascending order.
  function automatic int other(int p, int k);
    int n = 0;
    for (int o = 0; o < 4; o++) if (o != p) begin
      if (n == k) return o;
      n++;
    end
    return -1;
  endfunction

  typedef int req_t [4][4];

  // mode 0: widths 3,3,2,2 (mask, mask, code, code)
  // mode 1: widths 3,3,1,1 (mask, mask, DOR bit, DOR bit)
  // mode 2: widths 3,3,3,3 (masks)
  function automatic void decode(int mode, int arv, int agv, output req_t r, output int g [4]);
    int pos = 0, gpos = 0, w, gw, f;
    for (int p = 0; p < 4; p++) begin
      for (int o = 0; o < 4; o++) r[p][o] = 0;
      if (mode == 2 || p < 2)      w = 3;
      else if (mode == 0)          w = 2;
      else                         w = 1;
      f = (arv >> pos) & ((1 << w) - 1);
      if (w == 3) for (int k = 0; k < 3; k++) r[p][other(p, k)] = (f >> k) & 1;
      else if (w == 2) begin if (f != 0) r[p][other(p, f - 1)] = 1; end
      else r[p][(p == 2) ? 3 : 2] = f;
      pos += w;
      gw = (w == 1) ? 1 : 2;
      f = (agv >> gpos) & ((1 << gw) - 1);
      if (gw == 1) g[p] = f ? ((p == 2) ? 3 : 2) : -1;
      else         g[p] = (f == 0) ? -1 : other(p, f - 1);
      gpos += gw;
    end
  endfunction

  function automatic int max_match(req_t r);
    int best = 0, n, used;
    int perm [4];
    for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
    for (int c = 0; c < 4; c++) for (int d = 0; d < 4; d++) begin
      used = (1 << a) | (1 << b) | (1 << c) | (1 << d);
      if (used != 15) continue;
      perm = '{a, b, c, d};
      n = 0;
      for (int p = 0; p < 4; p++) n += r[p][perm[p]];
      if (n > best) best = n;
    end
    return best;
  endfunction

  task automatic check(int mode, int arv, int agv);
    req_t r;
    int g [4];
    int n = 0, used = 0;
    bit ok = 1;
    decode(mode, arv, agv, r, g);
    for (int p = 0; p < 4; p++) if (g[p] >= 0) begin
      if (!r[p][g[p]]) ok = 0;
      if (used & (1 << g[p])) ok = 0;
      used |= 1 << g[p];
      n++;
    end
    if (n != max_match(r)) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL mode %0d arv %h agv %h: %0d matches, max %0d", mode, arv, agv, n, max_match(r));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      arv_a = 10'(i); #1; check(0, i, int'(agv_a));
    end
    for (int i = 0; i < 256; i++) begin
      arv_d = 8'(i); #1; check(1, i, int'(agv_d));
    end
    for (int i = 0; i < 4096; i++) begin
      arv_f = 12'(i); #1; check(2, i, int'(agv_f));
    end
    // Figure example on the full-forwarding table.  X+: cands X-,Y+,Y- -> Y+,Y- = 3'b110
    // X-: cands X+,Y+,Y- -> X+ = 3'b001; Y+: cands X+,X-,Y- -> Y- = 3'b100;
    // Y-: cands X+,X-,Y+ -> X-,Y+ = 3'b110.
    arv_f = {3'b110, 3'b100, 3'b001, 3'b110}; #1;
    checks++;
    // grants: X+ -> Y+ (cand 1 -> 2), X- -> X+ (cand 0 -> 1), Y+ -> Y- (cand 2 -> 3), Y- -> X- (cand 1 -> 2)
    if (agv_f != {2'd2, 2'd3, 2'd1, 2'd2}) begin
      failures++;
      $display("FAIL figure example agv %b", agv_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
