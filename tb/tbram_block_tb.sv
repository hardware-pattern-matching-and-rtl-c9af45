// Testbench of the TBRAM block, with small TBRAMs (32 records each) so that
// many patterns share a TBRAM address and collision lists form.
//
// The testbench places 200 random (length, Sum) patterns like the
// table-filling software: the first pattern at an address goes into the
// TBRAM of its length group, the others into a contiguous list in the
// collision TBRAM, up to 3 records per address for TBRAM 0 and 5 for the
// others (patterns beyond that are left out).  It then looks up stored
// patterns and random non-stored ones (including a stored Sum with another
// length) one at a time.  Checked for each lookup:
//  * a stored pattern is matched once, with its own pattern address
//    ({0, group, address} or {1, 00, list address}), flags, position and
//    length; anything else is not matched;
//  * in_ready returns at most 5 cycles after the acceptance cycle (one
//    TBRAM read and up to four collision-list reads).
// The test requires that lookups ending in the collision list happened.
module tbram_block_tb;
  import pm_pkg::*;

  localparam int unsigned TB_DEPTH = 32;

  logic            clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset
  logic            in_valid = 1'b0, in_ready;
  logic [LENW-1:0] in_len = '0;
  sum_t            in_sum = '0;
  pos_t            in_pos = '0;
  logic            match_valid, match_start_frag, match_no_frag;
  pid_t            match_id;
  pos_t            match_pos;
  logic [LENW-1:0] match_len;
  logic [15:0]     lookups, col_reads;
  logic            wr_en = 1'b0;
  logic [2:0]      wr_sel = '0;
  logic [15:0]     wr_addr = '0;
  logic [63:0]     wr_data = '0;

  tbram_block #(.TB_DEPTH(TB_DEPTH), .COL_DEPTH(512), .MAXCOL0(3), .MAXCOL(5)) dut (.*);

  typedef struct { int len; sum_t sum; pid_t id; bit st; bit nf; } pat_t;
  pat_t pats[$];
  int   slot[string][$];     // "group:addr" -> pattern indices

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   nmatch = 0;
  pid_t got_id;
  pos_t got_pos;
  int   got_len;
  bit   got_st, got_nf;
  always @(posedge clk) if (match_valid) begin
    nmatch++; got_id = match_id; got_pos = match_pos; got_len = int'(match_len);
    got_st = match_start_frag; got_nf = match_no_frag;
  end

  task automatic write(logic [2:0] sel, int addr, logic [63:0] d);
    wr_en <= 1'b1; wr_sel <= sel; wr_addr <= 16'(addr); wr_data <= d;
    @(posedge clk);
  endtask

  task automatic lookup(int len, sum_t s, int p, output int cycles);
    in_valid <= 1'b1; in_len <= LENW'(len); in_sum <= s; in_pos <= pos_t'(p);
    @(posedge clk);
    in_valid <= 1'b0;
    cycles = 1;
    #1;
    while (!in_ready) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    int col_next, ncol_hits, cyc, maxcyc;
    col_next = 0; ncol_hits = 0; maxcyc = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // patterns
    for (int i = 0; i < 200; i++) begin
      pat_t  p;
      int    g, a;
      string k;
      p.len = 4 + int'($urandom % 21);
      p.sum = sum_t'({$urandom, $urandom});
      p.st = $urandom % 2; p.nf = !p.st;
      g = int'(tbram_group(LENW'(p.len)));
      a = int'(sum_hash(p.sum) % 16'(TB_DEPTH));
      k = $sformatf("%0d:%0d", g, a);
      if (slot.exists(k) && slot[k].size() >= ((g == 0) ? 3 : 5)) continue;
      pats.push_back(p);
      slot[k].push_back(pats.size() - 1);
    end
    foreach (slot[k]) begin
      int g, a, n;
      void'($sscanf(k, "%d:%d", g, a));
      n = slot[k].size();
      for (int i = 0; i < n; i++) begin
        int f;
        f = slot[k][i];
        if (i == 0) begin
          pats[f].id = {1'b0, 2'(g), 11'(a)};
          write(3'(g), a, {17'd0, 1'b1, 5'(pats[f].len), 3'(n - 1), 9'(col_next), pats[f].st, pats[f].nf, pats[f].sum});
        end else begin
          pats[f].id = {1'b1, 2'b00, 11'(col_next + i - 1)};
          write(3'd4, col_next + i - 1, {17'd0, 1'b1, 5'(pats[f].len), 3'd0, 9'd0, pats[f].st, pats[f].nf, pats[f].sum});
        end
      end
      col_next += n - 1;
    end
    wr_en <= 1'b0;
    // lookups
    for (int i = 0; i < 600; i++) begin
      int   sel, len, n0;
      sum_t s;
      bit   stored;
      pat_t p;
      sel = int'($urandom % 3);
      p = pats[$urandom % pats.size()];
      if (sel == 0) begin len = p.len; s = p.sum; stored = 1; end
      else if (sel == 1) begin len = (p.len == 24) ? 23 : p.len + 1; s = p.sum; stored = 0; end
      else begin len = 4 + int'($urandom % 21); s = sum_t'({$urandom, $urandom}); stored = 0; end
      if (!stored) foreach (pats[q]) if (pats[q].len == len && pats[q].sum == s) begin stored = 1; p = pats[q]; end
      n0 = nmatch;
      lookup(len, s, i, cyc);
      if (cyc > maxcyc) maxcyc = cyc;
      check(cyc - 1 <= 5, $sformatf("lookup busy %0d cycles after acceptance", cyc - 1));
      check(nmatch - n0 == int'(stored), $sformatf("lookup %0d: %0d matches, expected %0d (id %h len %0d)", i, nmatch - n0, stored, p.id, len));
      if (stored && nmatch - n0 == 1) begin
        check(got_id == p.id && got_pos == pos_t'(i) && got_len == len && got_st == p.st && got_nf == p.nf,
              $sformatf("match id %h pos %0d len %0d, expected id %h", got_id, got_pos, got_len, p.id));
        if (p.id[PIDW-1]) ncol_hits++;
      end
    end
    check(ncol_hits > 0, "no match came from the collision TBRAM");
    check(int'(lookups) == 600, "lookup counter");
    $display("collision-list matches %0d, collision reads %0d, longest lookup %0d cycles", ncol_hits, col_reads, maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
