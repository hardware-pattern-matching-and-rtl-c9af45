// Testbench of the AND-SHIFT-OR unit (N = 4, as in BDN4).
//
// A signature set (the worked example set of the method plus random
// upper-case signatures) is cut into sub-patterns of up to 4 characters by
// the table builder, which also gives the BV/EV of every sub-pattern.  The
// testbench plays the GRP tables itself: at each character it presents, for
// j = 1..4, the (BV, EV) of the last j characters (zero if they are no
// sub-pattern).  A stream of decimal-digit filler with every signature
// embedded is fed with idle gaps.  Checked one cycle after each character:
//  * out_valid follows in_valid;
//  * for every signature ending here, PVN has the bit of its length;
//  * on filler characters (which are in no sub-pattern) PVN and edv_nz are 0.
module and_shift_or_unit_tb;
  import pm_pkg::*;
  import vl_model_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  logic in_valid = 1'b0;
  bv_t  bv [N];
  ev_t  ev [N];
  logic out_valid, edv_nz;
  pv_t  pvn;

  and_shift_or_unit #(.N(N)) dut (.*);

  int checks = 0, failures = 0, hits = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vl_db  db = new(3);
    string stream;
    for (int j = 0; j < N; j++) begin bv[j] = '0; ev[j] = '0; end
    db.add("executemalware.exe");
    db.add("usernametoolong");
    db.add("Badcommand");
    db.add("Passwords");
    db.add("commandlong");
    db.add("codewords");
    db.add("words");
    db.add("ABCD");
    db.add("XYZ");
    for (int i = 0; i < 60; i++) begin
      string s;
      int    n;
      s = "";
      n = 3 + db.rnd(22);
      for (int j = 0; j < n; j++) s = {s, string'(8'(65 + db.rnd(26)))};
      db.add(s);
    end
    foreach (db.opats[o]) db.fragment(o);
    foreach (db.frags[f]) db.cut(N, db.frags[f].text);

    stream = "";
    foreach (db.frags[f]) begin
      int nfill;
      nfill = 1 + db.rnd(5);
      for (int j = 0; j < nfill; j++) stream = {stream, string'(8'(48 + db.rnd(10)))};
      stream = {stream, db.frags[f].text};
    end

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < stream.len(); p++) begin
      pv_t exp_bits;
      bit  filler;
      string hist;
      while ($urandom % 5 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        check(out_valid == 1'b0, "out_valid without a character");
      end
      for (int j = 1; j <= N; j++) begin
        string sp;
        int    key;
        key = N * 10 + j;
        sp = (p + 1 >= j) ? stream.substr(p - j + 1, p) : "";
        if (sp != "" && db.bvs.exists(key) && db.bvs[key].exists(sp)) begin
          bv[j-1] <= db.bvs[key][sp]; ev[j-1] <= db.evs[key][sp];
        end else begin
          bv[j-1] <= '0; ev[j-1] <= '0;
        end
      end
      in_valid <= 1'b1;
      // reference: fragments that end at p
      hist = stream.substr((p >= 30) ? p - 30 : 0, p);
      exp_bits = '0;
      foreach (db.frags[f])
        if (ends_with(hist, db.frags[f].text)) exp_bits[db.frags[f].text.len()] = 1'b1;
      filler = stream[p] >= "0" && stream[p] <= "9";
      @(posedge clk);
      #1;
      check(out_valid == 1'b1, "out_valid missing");
      if (exp_bits != 0) begin
        hits++;
        check((pvn & exp_bits) == exp_bits,
              $sformatf("pos %0d: pvn %h lacks signature lengths %h", p, pvn, exp_bits));
      end
      if (filler) check(pvn == 0 && !edv_nz, $sformatf("pos %0d: pvn %h on filler", p, pvn));
    end
    in_valid <= 1'b0;
    check(hits >= db.frags.size(), "not every signature end was seen");
    $display("signature ends checked: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
