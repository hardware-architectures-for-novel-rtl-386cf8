// faid_ref_pkg: behavioural reference of the FAID decoder for testbenches.
//
// The model works on an explicit edge list rather than compressed check
// states: every check-to-variable message is recomputed from the stored
// variable-to-check messages of the other edges of its check (sign product
// and minimum magnitude). Pass 0 starts from all-zero check messages; each
// pass updates every variable node with the map table, takes hard
// decisions (sum of all check messages and the weighted channel value,
// ties to the channel sign) and stops at the first pass whose decisions
// satisfy every check, or after max_iter iterations.
package faid_ref_pkg;

  class faid_ref;
    int L, NB, MB, DV, max_iter, w1, w2;
    int rb [][];           // [NB][DV] row block
    int sh [][];           // [NB][DV] shift
    int tbl [2][];         // map tables, value for a negative channel value
    bit ch_sgn [];         // [N]
    bit ch_rel [];         // [N]
    bit dec [];            // [N] decisions of the final pass
    bit success;
    int iterations;

    function new(int L_, int NB_, int MB_, int DV_, int max_iter_, int w1_, int w2_);
      L = L_; NB = NB_; MB = MB_; DV = DV_; max_iter = max_iter_; w1 = w1_; w2 = w2_;
      rb = new[NB];
      sh = new[NB];
      foreach (rb[j]) begin rb[j] = new[DV]; sh[j] = new[DV]; end
      ch_sgn = new[NB * L];
      ch_rel = new[NB * L];
      dec    = new[NB * L];
      tbl[0] = new[7 ** (DV - 1)];
      tbl[1] = new[7 ** (DV - 1)];
    endfunction

    // check number of edge (column block j, slot e, lane k)
    function int chk_of(int j, int e, int k);
      return rb[j][e] * L + ((k - sh[j][e] + L) % L);
    endfunction

    function int lookup(bit sgn, bit rel, int ins []);
      int a, r;
      a = 0;
      foreach (ins[i]) a = a * 7 + ((sgn ? ins[i] : -ins[i]) + 3);
      r = tbl[rel][a];
      return sgn ? r : -r;
    endfunction

    function void run();
      int ne, nc;
      int v2c [];                 // per edge, edge id = (j*L + k)*DV + e
      int c2v [];
      int chk [];
      int members [][$];
      bit par [];
      ne = NB * L * DV;
      nc = MB * L;
      v2c = new[ne];
      c2v = new[ne];
      chk = new[ne];
      members = new[nc];
      par = new[nc];
      for (int j = 0; j < NB; j++)
        for (int k = 0; k < L; k++)
          for (int e = 0; e < DV; e++) begin
            int id;
            id = (j * L + k) * DV + e;
            chk[id] = chk_of(j, e, k);
            members[chk[id]].push_back(id);
          end
      foreach (c2v[i]) c2v[i] = 0;
      success = 0;
      iterations = max_iter;
      for (int pass = 0; pass <= max_iter; pass++) begin
        int nv2c [];
        nv2c = new[ne];
        if (pass > 0) begin
          for (int id = 0; id < ne; id++) begin
            int s, m;
            s = 0; m = 3;
            foreach (members[chk[id]][q]) begin
              int o;
              o = members[chk[id]][q];
              if (o != id) begin
                if (v2c[o] < 0) s ^= 1;
                if ((v2c[o] < 0 ? -v2c[o] : v2c[o]) < m) m = (v2c[o] < 0 ? -v2c[o] : v2c[o]);
              end
            end
            c2v[id] = (s != 0) ? -m : m;
          end
        end
        foreach (par[c]) par[c] = 0;
        for (int v = 0; v < NB * L; v++) begin
          int sum, w;
          for (int e = 0; e < DV; e++) begin
            int ins [];
            int n;
            ins = new[DV - 1];
            n = 0;
            for (int q = 0; q < DV; q++) if (q != e) begin ins[n] = c2v[v * DV + q]; n++; end
            nv2c[v * DV + e] = lookup(ch_sgn[v], ch_rel[v], ins);
          end
          w = ch_rel[v] ? w2 : w1;
          sum = ch_sgn[v] ? -w : w;
          for (int e = 0; e < DV; e++) sum += c2v[v * DV + e];
          dec[v] = (sum < 0) ? 1 : (sum > 0) ? 0 : ch_sgn[v];
          for (int e = 0; e < DV; e++) par[chk[v * DV + e]] ^= dec[v];
        end
        v2c = nv2c;
        begin
          bit ok;
          ok = 1;
          foreach (par[c]) if (par[c]) ok = 0;
          if (ok) begin
            success = 1;
            iterations = pass;
            return;
          end
        end
      end
    endfunction
  endclass

endpackage
