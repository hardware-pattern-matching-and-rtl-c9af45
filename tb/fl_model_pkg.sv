// Table builder for the fixed-length detector testbenches.
//
// Plays the role of the host software: cuts every signature into 3-character
// sub-patterns (the tail may be shorter), builds the BV/EV vectors of every
// distinct sub-pattern, assigns random weight m-tuples, computes the
// signature summation tuples, places each signature in the pattern RAM at
// baseaddress + tail offset (or, when several signatures share a tail at the
// same offset, in the collision RAM through the hash field), places the GRP
// records in the hashed ways, and emits the 64-bit host-bus writes.
package fl_model_pkg;
  import pm_pkg::host_wr_t;
  import fl_pkg::*;

  class fl_db;
    string       pats[$];
    int          pid[$];              // {col, addr} per signature
    host_wr_t    writes[$];
    fw_t         wt[string];          // weight per sub-pattern key "j:text"
    fvec_t       bv[string], ev[string];
    int          base[string];
    int          hsel[string];
    int unsigned seed;
    int          fail;

    function new(int unsigned s = 1);
      seed = s; fail = 0;
    endfunction

    function int rnd(int n);
      seed = seed * 1103515245 + 12345;
      return int'((seed >> 8) % n);
    endfunction

    function void add(string s);
      foreach (pats[i]) if (pats[i] == s) return;
      pats.push_back(s);
    endfunction

    function void emit(logic [7:0] tgt, int addr, logic [63:0] data);
      host_wr_t w;
      w.we = 1'b1; w.target = tgt; w.addr = 16'(addr); w.data = data;
      writes.push_back(w);
    endfunction

    static function int nsub(string s);
      return (s.len() + FN - 1) / FN;
    endfunction

    static function string sub(string s, int q);   // q = 1..nsub
      int a = (q - 1) * FN;
      int b = (a + FN - 1 < s.len() - 1) ? a + FN - 1 : s.len() - 1;
      return s.substr(a, b);
    endfunction

    function fsum_t sum_of(string s);
      fsum_t r = '0;
      for (int q = 1; q <= nsub(s); q++) begin
        string sp, k;
        sp = sub(s, q); k = $sformatf("%0d:%s", sp.len(), sp);
        for (int e = 0; e < FM; e++) r[e] += FSW'(wt[k][e]);
      end
      return r;
    endfunction

    function void build();
      int  tails[string][$];          // tail key -> signatures
      bit  pused[int], cused[int];
      // vectors
      foreach (pats[p]) begin
        int n;
        n = nsub(pats[p]);
        for (int q = 1; q <= n; q++) begin
          string sp, k;
          sp = sub(pats[p], q);
          k = $sformatf("%0d:%s", sp.len(), sp);
          if (!bv.exists(k)) begin
            bv[k] = '0; ev[k] = '0;
            wt[k] = {6'(1 + rnd(63)), 6'(1 + rnd(63)), 6'(1 + rnd(63))};
          end
          if (q == n) begin ev[k][FL - q] = 1'b1; tails[k].push_back(p); end
          else bv[k][FL - q] = 1'b1;
        end
      end
      // pattern RAM / collision RAM placement per tail record
      foreach (pats[p]) pid.push_back(0);
      foreach (tails[k]) begin
        bit shared;
        bit ok;
        shared = 0; ok = 0;
        foreach (tails[k][i]) foreach (tails[k][j])
          if (i < j && nsub(pats[tails[k][i]]) == nsub(pats[tails[k][j]])) shared = 1;
        base[k] = 0; hsel[k] = 0;
        if (!shared) begin
          for (int t = 0; t < 200 && !ok; t++) begin
            int b; b = rnd(1 << FZW);
            ok = 1;
            foreach (tails[k][i]) if (pused.exists((b + nsub(pats[tails[k][i]])) % (1 << FZW))) ok = 0;
            if (ok) begin
              base[k] = b;
              foreach (tails[k][i]) begin
                int a; a = (b + nsub(pats[tails[k][i]])) % (1 << FZW);
                pused[a] = 1;
                pid[tails[k][i]] = a;
                emit(FTGT_PAT, a, 64'({1'b1, sum_of(pats[tails[k][i]])}));
              end
            end
          end
        end else begin
          for (int h = 1; h <= 3 && !ok; h++) begin
            ok = 1;
            foreach (tails[k][i]) if (cused.exists(int'(fl_col_hash(sum_of(pats[tails[k][i]]), 2'(h))))) ok = 0;
            foreach (tails[k][i]) foreach (tails[k][j])
              if (i < j && fl_col_hash(sum_of(pats[tails[k][i]]), 2'(h)) == fl_col_hash(sum_of(pats[tails[k][j]]), 2'(h))) ok = 0;
            if (ok) begin
              hsel[k] = h;
              foreach (tails[k][i]) begin
                int a; a = int'(fl_col_hash(sum_of(pats[tails[k][i]]), 2'(h)));
                cused[a] = 1;
                pid[tails[k][i]] = (1 << FZW) | a;
                emit(FTGT_COL, a, 64'({1'b1, sum_of(pats[tails[k][i]])}));
              end
            end
          end
        end
        if (!ok) begin fail++; $display("cannot place tail %s", k); end
      end
      place_grp();
    endfunction

    // GRP records, EV and BV RAMs
    function void place_grp();
      int depth[3] = '{256, 512, 8192};
      for (int j = 1; j <= FN; j++) begin
        int evp[string], bvp[string];
        bit used[int];
        int nev = 1, nbv = 1;           // pointer 0 = zero vector
        logic [7:0] tg;
        int idxw;
        tg = FTGT_GRP + 8'(4 * (j - 1));
        idxw = $clog2(depth[j-1]);
        nev = 1; nbv = 1;
        evp.delete(); bvp.delete(); used.delete();
        emit(tg + 2, 0, '0);
        if (j == FN) emit(tg + 3, 0, '0);
        foreach (bv[k]) begin
          string sp;
          logic [23:0] key;
          int e, b, slot;
          bit placed;
          if (k.substr(0, 0) != $sformatf("%0d", j)) continue;
          sp = k.substr(2, k.len() - 1);
          key = '0;
          for (int i = 0; i < sp.len(); i++) key = {key[15:0], sp[i]};
          if (ev[k] == '0) e = 0;
          else begin
            string s; s = $sformatf("%h", ev[k]);
            if (!evp.exists(s)) begin evp[s] = nev; emit(tg + 2, nev, 64'(ev[k])); nev++; end
            e = evp[s];
          end
          if (bv[k] == '0) b = 0;
          else begin
            string s; s = $sformatf("%h", bv[k]);
            if (!bvp.exists(s)) begin bvp[s] = nbv; emit(tg + 3, nbv, 64'(bv[k])); nbv++; end
            b = bvp[s];
          end
          if (nev > 256 || nbv > 1024) fail++;
          placed = 0;
          for (int w = 0; w < ((j == 1) ? 1 : 3) && !placed; w++) begin
            int idx; idx = (j == 1) ? int'(key[7:0]) : int'(fl_grp_hash(key, j, 2'(w)) % 16'(depth[j-1]));
            slot = (w << idxw) | idx;
            if (!used.exists(slot)) begin
              used[slot] = 1; placed = 1;
              emit(tg + 0, slot, 64'd1 | (64'(key) << 1) | (64'(b) << (8 * j + 1)) | (64'(e) << (8 * j + 11)));
              emit(tg + 1, slot, 64'({2'(hsel.exists(k) ? hsel[k] : 0), FZW'(base.exists(k) ? base[k] : 0), wt[k]}));
            end
          end
          if (!placed) begin fail++; $display("no free GRP(%0d) way for %s", j, sp); end
        end
      end
    endfunction
  endclass
endpackage
