// mult_block: multiplier-less multiplier block. Multiplies one signed input sample x by NC
// constant integer coefficients at once, using only adders/subtractors and wired shifts.
//
// The block is a graph of two-input adders (see mb_pkg for the encoding). Adders are shared between
// coefficients, which is the point of a multiplier block: a product already formed for one
// coefficient can be a partial sum of another. The number of adders on the longest path from x to
// a product is the block's delay in adder-steps; MAX_STEPS bounds it (0 = no bound). Two sources
// of graph are supported:
//   * Built-in (EXT_NADD == 0): the graph is computed at elaboration from COEF, see build_graph.
//     Each coefficient is reduced to its odd part (the power of two becomes an output shift). An
//     odd part that equals an existing node costs nothing; with SHARE set, one that is the sum or
//     difference of two existing nodes (one shifted) costs one adder, provided the new node stays
//     within MAX_STEPS; these steps repeat while they realise something. Then the first odd part
//     still missing is tried at a cost of two adders (a new intermediate node plus the sum), again
//     within MAX_STEPS. If that fails it is built as a balanced tree over its canonic signed digit
//     (CSD) form, pairing digits from the least significant end, which has the fewest adder-steps
//     possible, ceil(log2(non-zero digits)); the tree's partial sums then become available to the
//     remaining coefficients. The plain CSD graph (no reuse search) is built as well and the
//     cheaper of the two is kept (fewer adders, then fewer adder-steps).
//   * External (EXT_NADD > 0): EXT_ADDS/EXT_OUTS give a graph produced by an off-line synthesis
//     tool; the block only builds it.
// An immediate assertion at time 0 reports a graph deeper than MAX_STEPS (a limit below the CSD
// minimum of some coefficient cannot be met). NADD and ADDER_STEPS give the adder count and depth.
// The adder-step measure, the CSD minimum adder-step tree with LSB-first pairing, the reuse of
// partial sums under a step limit and falling back to the minimum adder-step tree follow the
// published step-limited reuse method (one-adder "optimal" part, two-adder part, minimum
// adder-step fallback). Simplified here: right shifts of sums are not searched, and a coefficient
// left over is built as a whole tree at once rather than one digit pair at a time. The graph
// encoding and the port widths are this design's own.
//
// Interface: x (XW bits, signed) in, prod[j] = x * COEF[j] out (XW+CW bits, signed, exact, since
// |COEF[j]| <= 2**(CW-1)). Purely combinational; the delay is ADDER_STEPS adders deep.
module mult_block
  import mb_pkg::*;
#(
  parameter int      XW        = 12,           // input sample width
  parameter int      CW        = 8,            // coefficient word width (signed)
  parameter int      NC        = 3,            // number of coefficients
  parameter int      COEF [NC] = '{6, 12, 6},  // integer coefficients
  parameter int      MAX_STEPS = 0,            // adder-step limit, 0 = unconstrained
  parameter bit      SHARE     = 1'b1,         // search reuse of earlier nodes (1 and 2 adders)
  parameter int      EXT_NADD  = 0,            // >0: use the external graph below
  parameter int      EXT_MAX   = 1,            // declared length of EXT_ADDS
  parameter mb_add_t [EXT_MAX-1:0] EXT_ADDS = '0,
  parameter mb_out_t [NC-1:0]      EXT_OUTS = '0
) (
  input  logic signed [XW-1:0]    x,
  output logic signed [XW+CW-1:0] prod [NC]
);

  localparam int PW   = XW + CW;          // product width
  localparam int NW   = XW + CW + 1;      // width of internal nodes (CSD partial sums)
  localparam int MAXD = (CW + 2) / 2 + 1; // upper bound on CSD digits of one coefficient
  localparam int MAXN = (EXT_NADD > 0) ? EXT_NADD : NC * MAXD; // upper bound on adders

  typedef struct packed {
    logic [15:0]            nadd;
    mb_add_t [MAXN-1:0]     adds;
    mb_out_t [NC-1:0]       outs;
  } graph_t;

  // Graph for COEF (the default source). Works on fundamentals, the odd parts of |COEF[j]|; the
  // power-of-two factor becomes the output shift. Node values are tracked as signed multiples of x.
  //  1. A fundamental already equal (up to sign) to a node value costs nothing.
  //  2. SHARE: a fundamental f = +/-(node1 << s) +/- node2 costs one adder; among all such pairs
  //     the one giving the shallowest node is taken, and pairs that would exceed MAX_STEPS are
  //     not allowed. Steps 1-2 repeat while they realise something.
  //  3. SHARE: the first unrealised fundamental is tried with two adders (see below).
  //  4. Otherwise it is built as a balanced CSD tree (the minimum adder-step structure), its
  //     partial sums join the nodes, and the loop returns to step 1.
  function automatic graph_t build_graph(input bit share);
    graph_t g;
    longint val  [MAXN+1];  // node value as a multiple of x
    int     dep  [MAXN+1];  // adder-steps of each node
    longint fund [NC];
    int     fsh  [NC];
    int     fnode[NC];
    bit     done [NC];
    int     n, cnt, m, k, left;
    int     opn [MAXD];     // operand list of the tree level being reduced: node, shift, sign
    int     osh [MAXD];
    bit     ong [MAXD];
    longint v;
    bit     progress;
    int     ccs;
    g      = '0;
    n      = 0;
    val[0] = 1;
    dep[0] = 0;
    for (int j = 0; j < NC; j++) begin
      v        = (COEF[j] < 0) ? -longint'(COEF[j]) : longint'(COEF[j]);
      fsh[j]   = 0;
      fnode[j] = 0;
      done[j]  = (v == 0);
      if (v != 0) while (v[0] == 1'b0) begin v = v >>> 1; fsh[j]++; end
      fund[j]  = v;
    end
    forever begin
      progress = 1'b1;
      while (progress) begin
        progress = 1'b0;
        for (int j = 0; j < NC; j++) begin
          if (done[j]) continue;
          for (int i = 0; i <= n; i++)
            if (!done[j] && (val[i] == fund[j] || val[i] == -fund[j])) begin
              fnode[j] = i;
              done[j]  = 1'b1;
            end
          if (!done[j] && share) begin
            int bd, b1, b2, bs;
            bit bn1, bn2;
            bd = -1; b1 = 0; b2 = 0; bs = 0; bn1 = 1'b0; bn2 = 1'b0;
            for (int i1 = 0; i1 <= n; i1++)
              for (int i2 = 0; i2 <= n; i2++)
                for (int sh = 0; sh <= CW + 1; sh++)
                  for (int sg = 0; sg < 3; sg++) begin
                    longint t1 = val[i1] <<< sh;
                    longint r  = (sg == 1) ? -t1 + val[i2] : (sg == 2) ? t1 - val[i2] : t1 + val[i2];
                    int     d  = ((dep[i1] > dep[i2]) ? dep[i1] : dep[i2]) + 1;
                    if ((r == fund[j] || r == -fund[j]) && (MAX_STEPS == 0 || d <= MAX_STEPS)
                        && (bd < 0 || d < bd)) begin
                      bd = d; b1 = i1; b2 = i2; bs = sh; bn1 = (sg == 1); bn2 = (sg == 2);
                    end
                  end
            if (bd >= 0) begin
              g.adds[n].a  = IDX_W'(b1);
              g.adds[n].b  = IDX_W'(b2);
              g.adds[n].sa = SH_W'(bs);
              g.adds[n].sb = '0;
              g.adds[n].na = bn1;
              g.adds[n].nb = bn2;
              n++;
              val[n]   = (bn1 ? -(val[b1] <<< bs) : (val[b1] <<< bs)) + (bn2 ? -val[b2] : val[b2]);
              dep[n]   = bd;
              fnode[j] = n;
              done[j]  = 1'b1;
              progress = 1'b1;
            end
          end
        end
      end
      left = -1;
      for (int j = NC - 1; j >= 0; j--) if (!done[j]) left = j;
      if (left < 0) break;
      // Cost-2 step (SHARE): f = +/-(t << s) +/- node or +/-(node << s) +/- t, where the new
      // intermediate t = (node1 << st) +/- node2 (st >= 1, so t is odd). The pair giving the
      // shallowest f within MAX_STEPS is taken; f is then checked by stripping factors of two
      // from f -/+ (second operand).
      if (share) begin
        int     bd, c1, c2, cs, cc, corder;
        bit     cn2, fneg1, fneg2;
        longint tv, tbest;
        int     ctd;
        bd = -1; c1 = 0; c2 = 0; cs = 0; cc = 0; corder = 0; cn2 = 1'b0; fneg1 = 1'b0; fneg2 = 1'b0;
        tbest = 0; ctd = 0;
        for (int i1 = 0; i1 <= n; i1++)
          for (int i2 = 0; i2 <= n; i2++)
            for (int st = 1; st <= CW + 1; st++)
              for (int sg = 0; sg < 2; sg++) begin
                int td = ((dep[i1] > dep[i2]) ? dep[i1] : dep[i2]) + 1;
                tv = (val[i1] <<< st) + ((sg == 1) ? -val[i2] : val[i2]);
                if (tv == 0 || (MAX_STEPS != 0 && td + 1 > MAX_STEPS)) continue;
                for (int c = 0; c <= n; c++)
                  for (int o = 0; o < 2; o++)
                    for (int sc = 0; sc < 2; sc++) begin
                      // o = 0: f = +/-(t << s) + (sc ? -node : node); o = 1: roles swapped
                      longint other = (o == 0) ? val[c] : tv;
                      longint shv   = (o == 0) ? tv : val[c];
                      longint d     = fund[left] - ((sc == 1) ? -other : other);
                      int     sh    = 0;
                      int     fd    = ((td > dep[c]) ? td : dep[c]) + 1;
                      if (d == 0) continue;
                      while (d[0] == 1'b0 && sh <= CW + 1) begin d = d >>> 1; sh++; end
                      if (sh > CW + 1 || !(d == shv || d == -shv)) continue;
                      if (MAX_STEPS != 0 && fd > MAX_STEPS) continue;
                      if (bd < 0 || fd < bd) begin
                        bd = fd; c1 = i1; c2 = i2; cs = st; cn2 = (sg == 1); cc = c;
                        corder = o; fneg1 = (d != shv); fneg2 = (sc == 1); tbest = tv; ctd = td;
                        ccs = sh;
                      end
                    end
              end
        if (bd >= 0) begin
          // intermediate node t
          g.adds[n].a  = IDX_W'(c1);
          g.adds[n].b  = IDX_W'(c2);
          g.adds[n].sa = SH_W'(cs);
          g.adds[n].sb = '0;
          g.adds[n].na = 1'b0;
          g.adds[n].nb = cn2;
          n++;
          val[n] = tbest;
          dep[n] = ctd;
          // fundamental: shifted operand first, unshifted second
          g.adds[n].a  = IDX_W'((corder == 0) ? n : cc);
          g.adds[n].b  = IDX_W'((corder == 0) ? cc : n);
          g.adds[n].sa = SH_W'(ccs);
          g.adds[n].sb = '0;
          g.adds[n].na = fneg1;
          g.adds[n].nb = fneg2;
          val[n+1] = (fneg1 ? -(val[int'(g.adds[n].a)] <<< ccs) : (val[int'(g.adds[n].a)] <<< ccs))
                   + (fneg2 ? -val[int'(g.adds[n].b)] : val[int'(g.adds[n].b)]);
          dep[n+1] = bd;
          n++;
          fnode[left] = n;
          done[left]  = 1'b1;
          continue;
        end
      end
      // Minimum adder-step tree for fundamental 'left': CSD digits, least significant first,
      // reduced pairwise level by level.
      cnt = 0;
      v   = fund[left];
      for (int p = 0; v != 0; p++) begin
        if (v[0]) begin
          opn[cnt] = 0;
          osh[cnt] = p;
          ong[cnt] = v[1];           // v mod 4 == 3 gives digit -1
          v        = v + (v[1] ? 1 : -1);
          cnt++;
        end
        v = v >>> 1;
      end
      while (cnt > 1) begin
        k = 0;
        for (int i = 0; i + 1 < cnt; i += 2) begin
          m = (osh[i] < osh[i+1]) ? osh[i] : osh[i+1];
          g.adds[n].a  = IDX_W'(opn[i]);
          g.adds[n].b  = IDX_W'(opn[i+1]);
          g.adds[n].sa = SH_W'(osh[i] - m);
          g.adds[n].sb = SH_W'(osh[i+1] - m);
          g.adds[n].na = ong[i];
          g.adds[n].nb = ong[i+1];
          val[n+1] = (ong[i]   ? -(val[opn[i]]   <<< (osh[i] - m))   : (val[opn[i]]   <<< (osh[i] - m)))
                   + (ong[i+1] ? -(val[opn[i+1]] <<< (osh[i+1] - m)) : (val[opn[i+1]] <<< (osh[i+1] - m)));
          dep[n+1] = ((dep[opn[i]] > dep[opn[i+1]]) ? dep[opn[i]] : dep[opn[i+1]]) + 1;
          n++;
          opn[k] = n;
          osh[k] = m;
          ong[k] = 1'b0;
          k++;
        end
        if (cnt % 2 == 1) begin
          opn[k] = opn[cnt-1];
          osh[k] = osh[cnt-1];
          ong[k] = ong[cnt-1];
          k++;
        end
        cnt = k;
      end
      fnode[left] = opn[0];
      done[left]  = 1'b1;
    end
    for (int j = 0; j < NC; j++) begin
      if (COEF[j] == 0) begin
        g.outs[j].zero = 1'b1;
      end else begin
        g.outs[j].node = IDX_W'(fnode[j]);
        g.outs[j].sh   = SH_W'(fsh[j]);
        g.outs[j].neg  = (COEF[j] < 0) ^ (val[fnode[j]] < 0);
      end
    end
    g.nadd = 16'(n);
    return g;
  endfunction

  function automatic graph_t ext_graph();
    graph_t g;
    g = '0;
    for (int i = 0; i < EXT_NADD; i++) g.adds[i] = EXT_ADDS[i];
    g.outs = EXT_OUTS;
    g.nadd = 16'(EXT_NADD);
    return g;
  endfunction

  // With sharing, the greedy one-adder step can spend an adder on a value that a later CSD tree
  // would have produced anyway; the plain CSD graph is therefore built too and the smaller one
  // (fewer adders, then fewer adder-steps) is kept.
  function automatic int depth_of(input graph_t g);
    int d [MAXN+1];
    int worst;
    d[0] = 0;
    for (int i = 0; i < int'(g.nadd); i++) begin
      int da = d[int'(g.adds[i].a)];
      int db = d[int'(g.adds[i].b)];
      d[i+1] = ((da > db) ? da : db) + 1;
    end
    worst = 0;
    for (int j = 0; j < NC; j++)
      if (!g.outs[j].zero && d[int'(g.outs[j].node)] > worst) worst = d[int'(g.outs[j].node)];
    return worst;
  endfunction

  function automatic graph_t choose_graph();
    graph_t gs, gp;
    if (EXT_NADD > 0) return ext_graph();
    gp = build_graph(1'b0);
    if (!SHARE) return gp;
    gs = build_graph(1'b1);
    if (gs.nadd < gp.nadd || (gs.nadd == gp.nadd && depth_of(gs) <= depth_of(gp))) return gs;
    return gp;
  endfunction

  localparam graph_t G    = choose_graph();
  localparam int     NADD = int'(G.nadd);

  // Adder-steps: the deepest node that feeds an output.
  localparam int ADDER_STEPS = depth_of(G);

  logic signed [NW-1:0] node [NADD+1];

  assign node[0] = NW'(x);

  for (genvar k = 0; k < NADD; k++) begin : g_add
    localparam mb_add_t AD = G.adds[k];
    localparam int      IA = int'(AD.a);
    localparam int      IB = int'(AD.b);
    logic signed [NW-1:0] opa, opb;
    assign opa = AD.na ? -(node[IA] <<< AD.sa) : (node[IA] <<< AD.sa);
    assign opb = AD.nb ? -(node[IB] <<< AD.sb) : (node[IB] <<< AD.sb);
    assign node[k+1] = opa + opb;
  end

  for (genvar j = 0; j < NC; j++) begin : g_out
    localparam mb_out_t OD = G.outs[j];
    localparam int      IO = int'(OD.node);
    if (OD.zero) begin : g_zero
      assign prod[j] = '0;
    end else begin : g_nz
      logic signed [NW-1:0] t;
      assign t       = node[IO] <<< OD.sh;
      assign prod[j] = OD.neg ? PW'(-t) : PW'(t);
    end
  end

  initial begin
    assert (MAX_STEPS == 0 || ADDER_STEPS <= MAX_STEPS)
      else $error("mult_block: %0d adder-steps exceed the limit of %0d", ADDER_STEPS, MAX_STEPS);
  end

endmodule
