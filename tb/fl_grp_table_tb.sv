// Testbench of a fixed-length GRP(3) table with small ways (64 records), so
// that keys collide in the first way and are placed in the others.
//
// 120 random keys are placed by the software rule (first way whose hashed
// slot is free), each with its own weights, baseaddress, hash field and
// pointers to one of 30 BVs and 30 EVs.  Lookups of stored and unknown keys
// follow, one per cycle with gaps; two cycles later a stored key must return
// its full record and an unknown key a zero record.
module fl_grp_table_tb;
  import fl_pkg::*;

  localparam int unsigned NCH = 3, NWAY = 3, DEPTH = 64, IDXW = 6;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic              rd_valid = 1'b0;
  logic [8*NCH-1:0]  rd_key = '0;
  logic              out_valid;
  frec_t             rec;
  logic              host_we = 1'b0;
  logic [1:0]        host_sel = '0;
  logic [15:0]       host_addr = '0;
  logic [63:0]       host_data = '0;

  fl_grp_table #(.NCH(NCH), .NWAY(NWAY), .DEPTH(DEPTH), .DIRECT(1'b0), .HAS_BV(1'b1)) dut (.*);

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

  task automatic hw(logic [1:0] sel, int addr, logic [63:0] d);
    host_we <= 1'b1; host_sel <= sel; host_addr <= 16'(addr); host_data <= d;
    @(posedge clk);
  endtask

  fvec_t  bvs [32], evs [32];
  frec_t  exp_rec [int];
  bit     used [int];
  int     keys [$];
  int     upper_ways;

  initial begin
    frec_t exp_q[$];
    logic  v_q[$];
    upper_ways = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 1; i < 32; i++) begin
      bvs[i] = {$urandom, $urandom}; evs[i] = {$urandom, $urandom};
      hw(2'd2, i, 64'(evs[i])); hw(2'd3, i, 64'(bvs[i]));
    end
    while (keys.size() < 120) begin
      int   k, b, e;
      bit   placed;
      frec_t r;
      k = int'($urandom & 24'hffffff);
      if (exp_rec.exists(k)) continue;
      b = 1 + int'($urandom % 31); e = 1 + int'($urandom % 31);
      r.hit = 1'b1; r.bv = bvs[b]; r.ev = evs[e]; r.w = fw_t'($urandom);
      r.base = fbase_t'($urandom); r.hsel = 2'($urandom);
      placed = 0;
      for (int w = 0; w < NWAY && !placed; w++) begin
        int slot;
        slot = (w << IDXW) | int'(fl_grp_hash(24'(k), NCH, 2'(w)) % 16'(DEPTH));
        if (!used.exists(slot)) begin
          used[slot] = 1; placed = 1;
          if (w > 0) upper_ways++;
          hw(2'd0, slot, 64'd1 | (64'(k) << 1) | (64'(b) << 25) | (64'(e) << 35));
          hw(2'd1, slot, 64'({r.hsel, r.base, r.w}));
        end
      end
      if (placed) begin keys.push_back(k); exp_rec[k] = r; end
    end
    host_we <= 1'b0;
    @(posedge clk);
    check(upper_ways > 10, "too few keys in ways 1-2");
    for (int i = 0; i < 600; i++) begin
      int k;
      bit v;
      v = ($urandom % 5) != 0;
      k = ($urandom % 2) ? keys[$urandom % keys.size()] : int'($urandom & 24'hffffff);
      rd_valid <= v; rd_key <= 24'(k);
      exp_q.push_back(exp_rec.exists(k) ? exp_rec[k] : '0);
      v_q.push_back(v);
      @(posedge clk);
      if (exp_q.size() == 3) begin
        frec_t e;
        logic  ev;
        e = exp_q.pop_front(); ev = v_q.pop_front();
        check(out_valid == ev, "out_valid latency");
        if (ev) check(rec == e, $sformatf("record mismatch at lookup %0d", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
