// ac_ref_pkg: reference Aho-Corasick model for the testbenches.
//
// Builds, from a pattern list, everything the engine's tables hold, the way
// an offline preprocessor would:
//  * goto trie and failure links (breadth-first),
//  * per-state 256-bit bitmap, next-state base pointer and the packed
//    next-state table (children in character order),
//  * per-state match info: pointer of the longest pattern in the state's
//    output set,
//  * root-index tables for two bytes: IDX1 numbers the first bytes of the
//    patterns from 1; IDX2 numbers the union of first and second bytes from 1;
//    code 0 means "not present". NEXT[{code1,code2}] (or NEXT[{b0,b1}] in
//    direct mode) holds the state reached from the root after the two bytes,
//  * per-state pre-hash bit vectors: bit (c mod BV_W) for every goto
//    character of the state and of each non-root state on its failure chain.
// step() is the plain byte-at-a-time automaton used as the golden model.
package ac_ref_pkg;

  class ac_model;
    int          nstates;
    int          child  [$][256];
    int          fail   [$];
    int          depth  [$];
    int          term   [$];      // pattern id ending here, -1 if none
    int          out_id [$];      // longest pattern in output set, -1 if none
    int          base   [$];
    int          acnext [$];
    logic [255:0] bitmap [$];
    logic [31:0] bv     [$];
    int          code1  [256];
    int          code2  [256];
    int          bv_w;

    function new(int bv_width = 32);
      bv_w = bv_width;
      nstates = 0;
      void'(new_state(0));
    endfunction

    function int new_state(int d);
      int row [256];
      foreach (row[i]) row[i] = -1;
      child.push_back(row);
      fail.push_back(0);
      depth.push_back(d);
      term.push_back(-1);
      out_id.push_back(-1);
      nstates++;
      return nstates - 1;
    endfunction

    function void add(string p, int id);
      int s = 0;
      for (int i = 0; i < p.len(); i++) begin
        int ch = int'(p[i]);
        if (child[s][ch] < 0) child[s][ch] = new_state(depth[s] + 1);
        s = child[s][ch];
      end
      term[s] = id;
    endfunction

    function int step(int s, int ch);
      while (s != 0 && child[s][ch] < 0) s = fail[s];
      if (child[s][ch] >= 0) return child[s][ch];
      return 0;
    endfunction

    function void build();
      int q [$];
      int seen1 [256], seen2 [256];
      int n;
      // failure links, breadth first
      for (int c = 0; c < 256; c++)
        if (child[0][c] >= 0) begin
          fail[child[0][c]] = 0;
          q.push_back(child[0][c]);
        end
      out_id[0] = -1;
      while (q.size() > 0) begin
        int r = q.pop_front();
        out_id[r] = (term[r] >= 0) ? term[r] : out_id[fail[r]];
        for (int c = 0; c < 256; c++) begin
          int u = child[r][c];
          if (u >= 0) begin
            int f = fail[r];
            while (f != 0 && child[f][c] < 0) f = fail[f];
            fail[u] = (child[f][c] >= 0 && child[f][c] != u) ? child[f][c] : 0;
            q.push_back(u);
          end
        end
      end
      // bitmaps and packed next-state table
      acnext.delete();
      for (int s = 0; s < nstates; s++) begin
        logic [255:0] bm = '0;
        base.push_back(acnext.size());
        for (int c = 0; c < 256; c++)
          if (child[s][c] >= 0) begin
            bm[c] = 1'b1;
            acnext.push_back(child[s][c]);
          end
        bitmap.push_back(bm);
      end
      // pre-hash bit vectors
      for (int s = 0; s < nstates; s++) begin
        logic [31:0] v = '0;
        int t = s;
        while (t != 0) begin
          for (int c = 0; c < 256; c++) if (child[t][c] >= 0) v[c % bv_w] = 1'b1;
          t = fail[t];
        end
        bv.push_back(v);
      end
      // root-index codes
      foreach (seen1[i]) begin seen1[i] = 0; seen2[i] = 0; end
      for (int c = 0; c < 256; c++)
        if (child[0][c] >= 0) begin
          seen1[c] = 1;
          seen2[c] = 1;
          for (int d = 0; d < 256; d++) if (child[child[0][c]][d] >= 0) seen2[d] = 1;
        end
      n = 0;
      for (int c = 0; c < 256; c++) begin
        code1[c] = 0;
        if (seen1[c] != 0) begin n++; code1[c] = n; end
      end
      n = 0;
      for (int c = 0; c < 256; c++) begin
        code2[c] = 0;
        if (seen2[c] != 0) begin n++; code2[c] = n; end
      end
    endfunction

    function int root2(int a, int b);
      return step(step(0, a), b);
    endfunction

    // NEXT table entry at address addr for the given mode. In index mode a
    // code stands for any byte that carries it; all of them lead to the same
    // state, so the first one is used.
    function int next_entry(int addr, bit direct);
      int a = -1, b = -1;
      if (direct) return root2(addr >> 8, addr & 255);
      for (int c = 255; c >= 0; c--) begin
        if (code1[c] == (addr >> 8)) a = c;
        if (code2[c] == (addr & 255)) b = c;
      end
      if (a < 0 || b < 0) return 0;
      return root2(a, b);
    endfunction
  endclass

endpackage
