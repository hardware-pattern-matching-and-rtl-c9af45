// Testbench of a bit detection unit, configured as BDN4 (N = 4, GRP(2) and
// GRP(3) of 4 x 384 records, GRP(4) of 4 x 3584 records).
//
// The table builder cuts a signature set into sub-patterns of up to 4
// characters and emits the GRP table writes, which the testbench applies
// through the unit's write port.  A stream of decimal-digit filler with all
// signatures embedded is then scanned with idle gaps.  Checked:
//  * out_valid comes exactly 4 cycles after in_valid;
//  * for every signature ending at a character, PVN has its length;
//  * on filler characters PVN and edv_nz are zero.
module bit_detection_unit_tb;
  import pm_pkg::*;
  import vl_model_pkg::*;

  localparam int unsigned N = 4;

  logic        clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset
  logic        in_valid = 1'b0, wr_en = 1'b0;
  char_t       in_char = '0;
  logic [2:0]  wr_sel = '0;
  logic [15:0] wr_addr = '0;
  logic [63:0] wr_data = '0;
  logic        out_valid, edv_nz;
  pv_t         pvn;

  bit_detection_unit #(
    .N(N), .WAYS(4), .WAY_DEPTH('{0, 384, 384, 3584}), .PTRW('{0, 6, 6, 8})
  ) dut (.*);

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

  // expectations, one per accepted character, with the cycle it entered
  pv_t exp_q[$];
  bit  fil_q[$];
  int  cyc_q[$];
  int  cycle = 0;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    #2;
    if (out_valid) begin
      if (exp_q.size() == 0) check(1'b0, "out_valid without a character");
      else begin
        pv_t e;
        bit  f;
        int  c;
        e = exp_q.pop_front(); f = fil_q.pop_front(); c = cyc_q.pop_front();
        check(cycle - c - 1 == 4, $sformatf("latency %0d cycles, expected 4", cycle - c - 1));
        if (e != 0) begin
          hits++;
          check((pvn & e) == e, $sformatf("pvn %h lacks signature lengths %h", pvn, e));
        end
        if (f) check(pvn == 0 && !edv_nz, $sformatf("pvn %h on filler", pvn));
      end
    end
  end

  initial begin
    vl_db  db = new(5);
    string stream;
    db.add("executemalware.exe");
    db.add("usernametoolong");
    db.add("Badcommand");
    db.add("Passwords");
    db.add("commandlong");
    db.add("codewords");
    db.add("words");
    db.add("ABCD");
    db.add("XYZ");
    for (int i = 0; i < 150; i++) begin
      string s;
      int    n;
      s = "";
      n = 3 + db.rnd(22);
      for (int j = 0; j < n; j++) s = {s, string'(8'(65 + db.rnd(26)))};
      db.add(s);
    end
    foreach (db.opats[o]) db.fragment(o);
    foreach (db.frags[f]) db.cut(N, db.frags[f].text);
    db.place_grp(N, 8'h20, '{0, 384, 384, 3584}, '{0, 6, 6, 8});
    check(db.fail == 0, "table builder could not place every record");

    stream = "";
    foreach (db.frags[f]) begin
      int nfill;
      nfill = 1 + db.rnd(5);
      for (int j = 0; j < nfill; j++) stream = {stream, string'(8'(48 + db.rnd(10)))};
      stream = {stream, db.frags[f].text};
    end

    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    foreach (db.writes[i]) begin
      wr_en <= 1'b1; wr_sel <= db.writes[i].target[2:0];
      wr_addr <= db.writes[i].addr; wr_data <= db.writes[i].data;
      @(posedge clk);
    end
    wr_en <= 1'b0;
    @(posedge clk);

    for (int p = 0; p < stream.len(); p++) begin
      pv_t   e;
      string hist;
      while ($urandom % 5 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      hist = stream.substr((p >= 30) ? p - 30 : 0, p);
      e = '0;
      foreach (db.frags[f])
        if (ends_with(hist, db.frags[f].text)) e[db.frags[f].text.len()] = 1'b1;
      exp_q.push_back(e);
      fil_q.push_back(stream[p] >= "0" && stream[p] <= "9");
      cyc_q.push_back(cycle);
      in_valid <= 1'b1; in_char <= stream[p];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "characters without a result");
    check(hits >= db.frags.size(), "not every signature end was seen");
    $display("signature ends checked: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
