// Testbench of a hashed GRP(i) table (3-character sub-patterns, small ways
// so that many sub-patterns collide in the first way and must be placed in
// another one).
//
// The testbench places 150 random keys the way the table-filling software
// does: into the first of the four ways whose hashed slot is free.  Each key
// gets a pointer to one of 40 (BV, EV) pairs.  It then issues one lookup per
// cycle (with gaps) for a mix of stored and never-stored keys; two cycles
// later a stored key must hit with its own BV/EV and any other key must miss
// with all-zero vectors.  The test requires that keys were placed in ways 1-3
// too, so that every way is read.
module grp_hashed_table_tb;
  import pm_pkg::*;

  localparam int unsigned NCH = 3, WAYS = 4, WAY_DEPTH = 64, PTRW = 6;
  localparam int unsigned IDXW = $clog2(WAY_DEPTH);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  logic              rd_valid = 1'b0;
  logic [8*NCH-1:0]  rd_key = '0;
  logic              out_valid, hit;
  bv_t               bv;
  ev_t               ev;
  logic              rec_we = 1'b0, bvev_we = 1'b0;
  logic [15:0]       rec_addr = '0;
  logic [63:0]       rec_data = '0, bvev_data = '0;
  logic [PTRW-1:0]   bvev_addr = '0;

  grp_hashed_table #(.NCH(NCH), .WAYS(WAYS), .WAY_DEPTH(WAY_DEPTH), .PTRW(PTRW)) dut (.*);

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

  logic [16:0]      pair [40];
  int               ptr_of [int];
  bit               used [int];
  int               keys[$];
  int               way_use [WAYS];

  initial begin
    int nplaced;
    logic [16:0] exp_q[$];
    logic        exp_hit_q[$];
    logic        qv[$];
    for (int w = 0; w < WAYS; w++) way_use[w] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // BV-EV pairs
    for (int p = 0; p < 40; p++) begin
      pair[p] = 17'($urandom) | 17'd1;
      bvev_we <= 1'b1; bvev_addr <= PTRW'(p); bvev_data <= 64'(pair[p]);
      @(posedge clk);
    end
    bvev_we <= 1'b0;
    // records
    nplaced = 0;
    while (nplaced < 150) begin
      int  k;
      bit  placed;
      k = int'($urandom & 32'h00ff_ffff);
      if (ptr_of.exists(k)) continue;
      placed = 0;
      for (int w = 0; w < WAYS && !placed; w++) begin
        int idx, slot;
        idx  = int'(grp_hash(32'(k), NCH, 2'(w)) % 16'(WAY_DEPTH));
        slot = (w << IDXW) | idx;
        if (!used.exists(slot)) begin
          used[slot] = 1;
          placed = 1;
          way_use[w]++;
          ptr_of[k] = nplaced % 40;
          keys.push_back(k);
          rec_we <= 1'b1; rec_addr <= 16'(slot);
          rec_data <= (64'(1) << (8 * NCH + PTRW)) | (64'(k) << PTRW) | 64'(ptr_of[k]);
          @(posedge clk);
        end
      end
      if (placed) nplaced++;
      else if (used.size() > 200) break;
    end
    rec_we <= 1'b0;
    for (int w = 1; w < WAYS; w++) check(way_use[w] > 0, $sformatf("no key placed in way %0d", w));
    // lookups
    for (int i = 0; i < 700; i++) begin
      logic v;
      int   k;
      v = ($urandom % 6) != 0;
      if ($urandom % 2) k = keys[$urandom % keys.size()];
      else              k = int'($urandom & 32'h00ff_ffff);
      rd_valid <= v; rd_key <= 24'(k);
      qv.push_back(v);
      exp_hit_q.push_back(ptr_of.exists(k));
      exp_q.push_back(ptr_of.exists(k) ? pair[ptr_of[k]] : 17'd0);
      @(posedge clk);
      #1;
      if (qv.size() == 2) begin
        logic ev_, eh;
        logic [16:0] ex;
        ev_ = qv.pop_front(); eh = exp_hit_q.pop_front(); ex = exp_q.pop_front();
        check(out_valid == ev_, "out_valid is not rd_valid delayed by two cycles");
        if (ev_) begin
          check(hit == eh, $sformatf("hit %0b expected %0b", hit, eh));
          check({bv, ev} == ex, $sformatf("bv/ev %h expected %h", {bv, ev}, ex));
        end
      end
    end
    $display("ways used: %0d %0d %0d %0d", way_use[0], way_use[1], way_use[2], way_use[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
