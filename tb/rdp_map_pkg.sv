// rdp_map_pkg: testbench-side data-flow graphs (DFGs) and a mapper that
// places a DFG onto the PE array.
//
// rdp_dfg holds a graph of input nodes and two-operand operations. Builders
// make the two finite-difference loop bodies the accelerator is evaluated
// with:
//   heat2d: the 2D heat stencil, loop unrolled 3x3 (21 inputs, 63 operations,
//           9 outputs): f' = C0*(f[i-1,j]+f[i+1,j]) + C1*(f[i,j-1]+f[i,j+1]) + C2*f
//   fdtd2d: one 2x2 block of the 2D FDTD update (20 inputs, 48 operations,
//           12 outputs): Hx, Hy, then Ez from the new H values.
// map() is a greedy row-by-row placer for a full-crossbar array of PEs that
// can all add and multiply: in each row it places ready operations, cheapest
// first (an operation that consumes the last use of its operands costs
// nothing), and fills the rest of the row with PASS PEs that carry values
// still needed further down. eval() computes the graph with fp_ref_pkg.
package rdp_map_pkg;
  import rdp_pkg::*;
  import fp_ref_pkg::*;

  class rdp_dfg;
    // node n: is_in[n]=1 for an input (slot in_slot[n]); otherwise op[n]
    // applied to a0[n] and a1[n] (or konst[n] when bc[n])
    bit      is_in [$];
    int      in_slot [$];
    pe_op_e  op [$];
    int      a0 [$];
    int      a1 [$];
    bit      bc [$];
    word_t   konst [$];
    int      outs [$];       // node of each output slot
    int      n_in;
    string   name;

    // mapping result
    pe_cfg_t          cfg [][];
    logic [SEL_W-1:0] osel [];
    int               rows_used;

    function new(string nm);
      name = nm;
      n_in = 0;
    endfunction

    function int input_node();
      is_in.push_back(1); in_slot.push_back(n_in); op.push_back(OP_NOP);
      a0.push_back(-1); a1.push_back(-1); bc.push_back(0); konst.push_back('0);
      n_in++;
      return is_in.size() - 1;
    endfunction

    function int opn(pe_op_e o, int x, int y);
      is_in.push_back(0); in_slot.push_back(-1); op.push_back(o);
      a0.push_back(x); a1.push_back(y); bc.push_back(0); konst.push_back('0);
      return is_in.size() - 1;
    endfunction

    function int opk(pe_op_e o, int x, word_t k);
      is_in.push_back(0); in_slot.push_back(-1); op.push_back(o);
      a0.push_back(x); a1.push_back(-1); bc.push_back(1); konst.push_back(k);
      return is_in.size() - 1;
    endfunction

    function int n_ops();
      return is_in.size() - n_in;
    endfunction

    // reference evaluation of all outputs for one input line
    function void eval(input word_t x [], output word_t y []);
      word_t v [];
      v = new[is_in.size()];
      for (int n = 0; n < is_in.size(); n++) begin
        word_t b;
        if (is_in[n]) begin v[n] = x[in_slot[n]]; continue; end
        b = bc[n] ? konst[n] : v[a1[n]];
        case (op[n])
          OP_ADD:  v[n] = fadd(v[a0[n]], b);
          OP_SUB:  v[n] = fsub(v[a0[n]], b);
          OP_MUL:  v[n] = fmul(v[a0[n]], b);
          OP_PASS: v[n] = v[a0[n]];
          default: v[n] = '0;
        endcase
      end
      y = new[outs.size()];
      foreach (outs[j]) y[j] = v[outs[j]];
    endfunction

    // greedy placement; returns 1 on success
    function bit map(int rows, int cols);
      int  nn;
      int  loc [];       // column of node in the previous row, -1 if absent
      int  uses [];      // consumers not yet placed
      bit  placed [];
      bit  is_out [];
      nn = is_in.size();
      loc = new[nn]; uses = new[nn]; placed = new[nn]; is_out = new[nn];
      cfg = new[rows];
      foreach (cfg[r]) begin
        cfg[r] = new[cols];
        foreach (cfg[r][c]) cfg[r][c] = PE_CFG_NOP;
      end
      for (int n = 0; n < nn; n++) begin
        loc[n] = is_in[n] ? in_slot[n] : -1;
        placed[n] = is_in[n];
        uses[n] = 0; is_out[n] = 0;
      end
      for (int n = 0; n < nn; n++) if (!is_in[n]) begin
        uses[a0[n]]++;
        if (!bc[n]) uses[a1[n]]++;
      end
      foreach (outs[j]) is_out[outs[j]] = 1;
      rows_used = 0;
      for (int r = 0; r < rows; r++) begin
        int  sel [$];
        int  u [];
        int  nloc [];
        int  col, carries;
        bit  any;
        u = new[nn];
        foreach (u[n]) u[n] = uses[n];
        carries = 0;
        for (int n = 0; n < nn; n++) if (loc[n] >= 0 && (u[n] > 0 || is_out[n])) carries++;
        // pick operations, cheapest first
        do begin
          int best, best_cost;
          best = -1; best_cost = 3;
          for (int n = 0; n < nn; n++) begin
            int cost;
            if (placed[n] || loc[a0[n]] < 0 || (!bc[n] && loc[a1[n]] < 0)) continue;
            if (n inside {sel}) continue;
            cost = 1;
            if (u[a0[n]] == 1 && !is_out[a0[n]]) cost--;
            if (!bc[n] && a1[n] != a0[n] && u[a1[n]] == 1 && !is_out[a1[n]]) cost--;
            if (!bc[n] && a1[n] == a0[n] && u[a0[n]] == 2 && !is_out[a0[n]]) cost--;
            if (cost < best_cost) begin best = n; best_cost = cost; end
          end
          any = 0;
          if (best >= 0 && sel.size() + carries + best_cost <= cols) begin
            sel.push_back(best);
            u[a0[best]]--;
            if (!bc[best]) u[a1[best]]--;
            carries += best_cost - 1;
            any = 1;
          end
        end while (any);
        // columns: operations first, then carried values
        nloc = new[nn];
        foreach (nloc[n]) nloc[n] = -1;
        col = 0;
        foreach (sel[i]) begin
          int n;
          n = sel[i];
          cfg[r][col].op      = op[n];
          cfg[r][col].sel_a   = SEL_W'(loc[a0[n]]);
          cfg[r][col].sel_b   = bc[n] ? '0 : SEL_W'(loc[a1[n]]);
          cfg[r][col].b_const = bc[n];
          cfg[r][col].konst   = konst[n];
          nloc[n] = col;
          placed[n] = 1;
          col++;
        end
        for (int n = 0; n < nn; n++) begin
          if (loc[n] >= 0 && (u[n] > 0 || is_out[n])) begin
            cfg[r][col].op    = OP_PASS;
            cfg[r][col].sel_a = SEL_W'(loc[n]);
            nloc[n] = col;
            col++;
          end
        end
        if (col > cols) return 0;
        foreach (uses[n]) uses[n] = u[n];
        loc = nloc;
        if (sel.size() > 0) rows_used = r + 1;
      end
      for (int n = 0; n < nn; n++) if (!placed[n]) return 0;
      osel = new[outs.size()];
      foreach (outs[j]) begin
        if (loc[outs[j]] < 0) return 0;
        osel[j] = SEL_W'(loc[outs[j]]);
      end
      return 1;
    endfunction
  endclass

  // 2D heat, 3x3 outputs from a 5x5 window without its corners
  function automatic rdp_dfg heat2d(word_t c0, word_t c1, word_t c2);
    rdp_dfg g;
    int f [5][5];
    g = new("2D-Heat");
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        f[a][b] = ((a == 0 || a == 4) && (b == 0 || b == 4)) ? -1 : g.input_node();
    for (int i = 1; i <= 3; i++)
      for (int j = 1; j <= 3; j++) begin
        int t1, t2, m1, m2, m3, s1;
        t1 = g.opn(OP_ADD, f[i-1][j], f[i+1][j]);
        t2 = g.opn(OP_ADD, f[i][j-1], f[i][j+1]);
        m1 = g.opk(OP_MUL, t1, c0);
        m2 = g.opk(OP_MUL, t2, c1);
        m3 = g.opk(OP_MUL, f[i][j], c2);
        s1 = g.opn(OP_ADD, m1, m2);
        g.outs.push_back(g.opn(OP_ADD, s1, m3));
      end
    return g;
  endfunction

  // 2D FDTD, one 2x2 block. Inputs, in slot order: Hx[i][j], Hy[i][j],
  // Ez[i][j] (4 each), Ez[i][-1] (2), Ez[-1][j] (2), Hy[2][j] (2),
  // Hx[i][2] (2). Outputs: Hx'[i][j], Hy'[i][j], Ez'[i][j].
  function automatic rdp_dfg fdtd2d(word_t cx, word_t cy, word_t czx, word_t czy);
    rdp_dfg g;
    int hx [2][3], hy [3][2], ez [3][3], hxn [2][3], hyn [3][2];
    g = new("2D-FDTD");
    // ez index offset by 1: ez[i+1][j+1] is Ez(i,j)
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) hx[i][j] = g.input_node();
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) hy[i][j] = g.input_node();
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) ez[i+1][j+1] = g.input_node();
    for (int i = 0; i < 2; i++) ez[i+1][0] = g.input_node();
    for (int j = 0; j < 2; j++) ez[0][j+1] = g.input_node();
    for (int j = 0; j < 2; j++) hyn[2][j] = g.input_node();
    for (int i = 0; i < 2; i++) hxn[i][2] = g.input_node();
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int d, m;
        d = g.opn(OP_SUB, ez[i+1][j+1], ez[i+1][j]);
        m = g.opk(OP_MUL, d, cx);
        hxn[i][j] = g.opn(OP_ADD, hx[i][j], m);
        d = g.opn(OP_SUB, ez[i+1][j+1], ez[i][j+1]);
        m = g.opk(OP_MUL, d, cy);
        hyn[i][j] = g.opn(OP_SUB, hy[i][j], m);
      end
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) g.outs.push_back(hxn[i][j]);
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) g.outs.push_back(hyn[i][j]);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int d1, m1, t, d2, m2;
        d1 = g.opn(OP_SUB, hyn[i+1][j], hyn[i][j]);
        m1 = g.opk(OP_MUL, d1, czx);
        t  = g.opn(OP_SUB, ez[i+1][j+1], m1);
        d2 = g.opn(OP_SUB, hxn[i][j+1], hxn[i][j]);
        m2 = g.opk(OP_MUL, d2, czy);
        g.outs.push_back(g.opn(OP_ADD, t, m2));
      end
    return g;
  endfunction

endpackage
