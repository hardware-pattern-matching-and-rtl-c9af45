// Table builder for the variable-length signature detector testbenches.
//
// Plays the role of the host software: from a list of signatures
// (O_Patterns) it fragments them, cuts every fragment into sub-patterns for
// N = 3 and N = 4, builds the BV/EV vectors, places the sub-pattern records
// in the hashed GRP RAMs, assigns character weights, computes the summation
// tuples, places them in the TBRAMs and collision TBRAM, fills FRAM1/FRAM2,
// and emits the whole thing as a list of 64-bit host-bus writes.  It also
// offers a plain substring search over a character history, which the
// testbenches use as the independent reference.
package vl_model_pkg;
  import pm_pkg::*;

  typedef struct {
    string      text;      // fragment characters
    int         opat;      // O_Pattern it belongs to
    int         index;     // fragment number inside the O_Pattern
    int         nfrag;
    sum_t       sum;
    int         grp;
    pid_t       id;
  } frag_t;

  class vl_db;
    string           opats[$];
    frag_t           frags[$];
    host_wr_t        writes[$];
    wtuple_t         wt[256];
    int              opat_first[$];     // fragment index of first fragment per O_Pattern
    // sub-pattern vectors, per N (3,4) and per length j
    bv_t             bvs[int][string];
    ev_t             evs[int][string];
    int unsigned     seed;
    int              fail;

    function new(int unsigned s = 1);
      seed = s;
      fail = 0;
    endfunction

    function int rnd(int n);
      seed = seed * 1103515245 + 12345;
      return int'((seed >> 8) % n);
    endfunction

    function void add(string s);
      opats.push_back(s);
    endfunction

    // split an O_Pattern into fragments of at most MAXF characters
    function void fragment(int o);
      string s = opats[o];
      int    n = s.len();
      int    p = 0;
      int    k = 0;
      string parts[$];
      while (n - p > 2 * MAXF) begin
        parts.push_back(s.substr(p, p + MAXF - 1));
        p += MAXF;
      end
      if (n - p > MAXF) begin
        int h = (n - p + 1) / 2;
        parts.push_back(s.substr(p, p + h - 1));
        parts.push_back(s.substr(p + h, n - 1));
      end else parts.push_back(s.substr(p, n - 1));
      opat_first.push_back(frags.size());
      foreach (parts[i]) begin
        frag_t f;
        f.text = parts[i];
        f.opat = o;
        f.index = i;
        f.nfrag = parts.size();
        f.sum = '0; f.grp = 0; f.id = '0;
        frags.push_back(f);
        k++;
      end
    endfunction

    // sub-pattern cut: chunks of N from the start, shorter tail
    function void cut(int nn, string s);
      int n = s.len();
      int cnt = (n + nn - 1) / nn;
      for (int q = 0; q < cnt; q++) begin
        int    a = q * nn;
        int    b = (a + nn - 1 < n - 1) ? a + nn - 1 : n - 1;
        string sp = s.substr(a, b);
        int    j = sp.len();
        int    key = nn * 10 + j;
        if (!bvs.exists(key) || !bvs[key].exists(sp)) begin
          bvs[key][sp] = '0;
          evs[key][sp] = '0;
        end
        if (q == cnt - 1) evs[key][sp][L - q] = 1'b1;
        else              bvs[key][sp][L - 1 - q] = 1'b1;
      end
    endfunction

    function void emit(logic [7:0] tgt, int addr, logic [63:0] data);
      host_wr_t w;
      w.we = 1'b1; w.target = tgt; w.addr = 16'(addr); w.data = data;
      writes.push_back(w);
    endfunction

    static function logic [31:0] key_of(string sp);
      logic [31:0] k = '0;
      for (int i = 0; i < sp.len(); i++) k = {k[23:0], sp[i]};
      return k;
    endfunction

    // place the GRP tables of one bit detection unit
    function void place_grp(int nn, logic [7:0] base, int depth[4], int ptrw[4]);
      for (int j = 1; j <= nn; j++) begin
        int key = nn * 10 + j;
        bit used[int];
        int ptrs[string];
        int nptr;
        used.delete();
        ptrs.delete();
        nptr = 0;
        if (!bvs.exists(key)) continue;
        foreach (bvs[key][sp]) begin
          logic [16:0] v = {bvs[key][sp], evs[key][sp]};
          if (j == 1) begin
            emit(base + 8'(2 * (j - 1)), int'(sp[0]), 64'(v));
          end else begin
            string vs = $sformatf("%0h", v);
            int idxw = $clog2(depth[j-1]);
            bit placed = 0;
            if (!ptrs.exists(vs)) begin
              ptrs[vs] = nptr;
              emit(base + 8'(2 * (j - 1) + 1), nptr, 64'(v));
              nptr++;
              if (nptr > (1 << ptrw[j-1])) begin fail++; $display("BV-EV RAM full: N=%0d GRP(%0d)", nn, j); end
            end
            for (int w = 0; w < 4 && !placed; w++) begin
              int idx = int'(grp_hash(key_of(sp), j, 2'(w)) % 16'(depth[j-1]));
              int slot = (w << idxw) | idx;
              if (!used.exists(slot)) begin
                logic [63:0] d;
                used[slot] = 1;
                d = (64'(1) << (8 * j + ptrw[j-1])) | (64'(key_of(sp)) << ptrw[j-1]) | 64'(ptrs[vs]);
                emit(base + 8'(2 * (j - 1)), slot, d);
                placed = 1;
              end
            end
            if (!placed) begin fail++; $display("no free way: N=%0d GRP(%0d) %s", nn, j, sp); end
          end
        end
      end
    endfunction

    function sum_t sum_of(string s);
      sum_t r = '0;
      for (int i = 0; i < s.len(); i++)
        for (int e = 0; e < M; e++)
          r[e] += SW'(wt[s[i]][e]) << (i % 3);
      return r;
    endfunction

    function void build();
      int tries = 0;
      bit ok;
      foreach (opats[o]) fragment(o);
      foreach (frags[f]) begin
        cut(3, frags[f].text);
        cut(4, frags[f].text);
      end
      // character weights: distinct tuples without zero elements, re-drawn until every TBRAM group
      // holds distinct sums
      do begin
        bit taken[int];
        string seen[string];
        ok = 1;
        for (int c = 0; c < 256; c++) begin
          int t;
          do t = rnd(512); while (taken.exists(t) || t % 8 == 0 || t / 8 % 8 == 0 || t / 64 == 0);
          taken[t] = 1;
          wt[c] = wtuple_t'(t);
        end
        foreach (frags[f]) begin
          string k;
          frags[f].sum = sum_of(frags[f].text);
          frags[f].grp = int'(tbram_group(LENW'(frags[f].text.len())));
          k = $sformatf("%0d:%0h", frags[f].grp, frags[f].sum);
          if (seen.exists(k) && seen[k] != frags[f].text) ok = 0;
          seen[k] = frags[f].text;
        end
        tries++;
      end while (!ok && tries < 50);
      if (!ok) fail++;
      for (int c = 0; c < 256; c++) emit(TGT_CHAR, c, 64'(wt[c]));
      place_grp(3, TGT_BDN3, '{0, 256, 3072, 0}, '{0, 8, 10, 0});
      place_grp(4, TGT_BDN4, '{0, 384, 384, 3584}, '{0, 6, 6, 8});
      place_tbram();
      place_fram();
    endfunction

    // TBRAM record: {valid, len, col_cnt, col_ptr, start_frag, no_frag, sum}
    static function logic [63:0] tbrec(sum_t s, int len, bit st, bit nf, int cptr, int ccnt);
      return {17'd0, 1'b1, 5'(len), 3'(ccnt), 9'(cptr), st, nf, s};
    endfunction

    function void place_tbram();
      int slots[string][$];
      string done[string];
      int col_next = 0;
      foreach (frags[f]) begin
        string k;
        if (done.exists(frags[f].text)) continue;   // same fragment twice
        done[frags[f].text] = "";
        k = $sformatf("%0d:%0d", frags[f].grp, sum_hash(frags[f].sum) % 16'(2048));
        slots[k].push_back(f);
      end
      foreach (slots[k]) begin
        int f0 = slots[k][0];
        int g = frags[f0].grp;
        int a = int'(sum_hash(frags[f0].sum) % 16'(2048));
        int ncol = slots[k].size() - 1;
        for (int i = 0; i < slots[k].size(); i++) begin
          int f = slots[k][i];
          bit st = (frags[f].nfrag > 1) && frags[f].index == 0;
          bit nf = (frags[f].nfrag == 1);
          if (i == 0) begin
            frags[f].id = {1'b0, 2'(g), 11'(a)};
            emit(TGT_TBRAM + 8'(g), a, tbrec(frags[f].sum, frags[f].text.len(), st, nf, col_next, ncol));
          end else begin
            frags[f].id = {1'b1, 2'b00, 11'(col_next + i - 1)};
            emit(TGT_COLTB, col_next + i - 1, tbrec(frags[f].sum, frags[f].text.len(), st, nf, 0, 0));
          end
        end
        col_next += ncol;
      end
      // identical fragments share one record
      foreach (frags[f]) foreach (frags[h]) if (h < f && frags[h].text == frags[f].text) frags[f].id = frags[h].id;
    endfunction

    function void place_fram();
      int f2_next = 0;
      bit used[int];
      foreach (opats[o]) begin
        int f0 = opat_first[o];
        int nf = frags[f0].nfrag;
        int idx;
        bit placed = 0;
        if (nf == 1) continue;
        idx = int'(fram_hash(frags[f0].id));
        for (int w = 0; w < 4 && !placed; w++)
          if (!used.exists(w * 512 + idx)) begin
            used[w * 512 + idx] = 1;
            // {valid, first id, ptr}
            emit(TGT_FRAM1 + 8'(w), idx, {38'd0, 1'b1, frags[f0].id, 11'(f2_next)});
            placed = 1;
          end
        if (!placed) fail++;
        for (int i = 1; i < nf; i++) begin
          // {valid, last, len, id}
          emit(TGT_FRAM2, f2_next, {43'd0, 1'b1, 1'(i == nf - 1), 5'(frags[f0 + i].text.len()), frags[f0 + i].id});
          f2_next++;
        end
      end
    endfunction

    // pattern address reported for O_Pattern o
    function pid_t opat_id(int o);
      return frags[opat_first[o]].id;
    endfunction
  endclass

  // does 'pat' end at the last character of 'hist'?
  function automatic bit ends_with(string hist, string pat);
    int n = hist.len();
    int m = pat.len();
    if (m > n) return 0;
    return hist.substr(n - m, n - 1) == pat;
  endfunction

endpackage
