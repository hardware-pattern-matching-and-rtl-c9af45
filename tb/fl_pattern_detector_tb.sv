// End-to-end test of the fixed-length signature detector.
//
// A signature set (the six-pattern example of the method, the four-pattern
// overlap example, signatures sharing a tail at one offset, which go to the
// collision RAM, and a few hundred random ones up to 40 characters) is
// turned into tables by the table builder and written over the host bus.  A
// stream holding every signature once between random filler is scanned.  The
// reference is a plain substring search: every occurrence must be reported
// with its pattern address and end position, and nothing else.  The test
// also requires collision-RAM matches, several trackers busy at once, and one
// character per clock.
module fl_pattern_detector_tb;
  import pm_pkg::host_wr_t;
  import fl_pkg::*;
  import fl_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic           in_valid = 1'b0;
  logic [7:0]     in_char = '0;
  host_wr_t       host_wr = '0;
  logic           match_valid;
  logic [FZW:0]   match_id;
  logic [15:0]    match_pos;
  logic [15:0]    cnt_tail_events, cnt_trk_overflows, cnt_fifo_overflows;

  fl_pattern_detector dut (.*);

  int checks = 0, failures = 0;
  int expected[string];
  int reported = 0, spurious = 0, col_matches = 0, multi_trk = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (match_valid) begin
      string k;
      k = $sformatf("%0h:%0d", match_id, match_pos);
      reported++;
      if (match_id[FZW]) col_matches++;
      if (expected.exists(k)) begin
        expected[k]--;
        if (expected[k] == 0) expected.delete(k);
      end else begin
        spurious++;
        $display("unexpected match id=%h pos=%0d", match_id, match_pos);
      end
    end
    if ($countones(dut.g_du[0].u_du.en) >= 2 || $countones(dut.g_du[1].u_du.en) >= 2 ||
        $countones(dut.g_du[2].u_du.en) >= 2) multi_trk++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fl_db  db = new(11);
    string stream = "";
    int    order[$];
    int    t0, t1;

    db.add("nasty");  db.add("malicious"); db.add("ksbpwrds"); db.add("passwords");
    db.add("ng");     db.add("crackwords");
    db.add("abc123xyzklm8"); db.add("123xyzklm65"); db.add("xyzklmppp"); db.add("klmtrs78823");
    db.add("QQQrds"); db.add("WWWrds"); db.add("EEErds");          // same tail, same offset
    db.add("GET /cgi-bin/phf?Qalias=x%0a/bin/cat%20/etc/passwd HTTP/1.0 and more");
    for (int i = 0; i < 300; i++) begin
      string s;
      int n;
      s = ""; n = 3 + db.rnd(38);
      for (int j = 0; j < n; j++) s = {s, string'(8'(65 + db.rnd(26)))};
      db.add(s);
    end
    db.build();
    check(db.fail == 0, "table builder could not place every record");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (db.writes[i]) begin
      host_wr <= db.writes[i];
      @(posedge clk);
    end
    host_wr <= '0;
    @(posedge clk);

    foreach (db.pats[i]) order.push_back(i);
    order.shuffle();
    foreach (order[i]) begin
      int nfill;
      nfill = 5 + db.rnd(6);
      for (int j = 0; j < nfill; j++) stream = {stream, string'(8'(97 + db.rnd(26)))};
      stream = {stream, db.pats[order[i]]};
    end
    stream = {stream, "zzzzzzzzzz"};
    // the overlap example as one input text
    stream = {stream, "abc123xyzklmpppzzzzz"};

    for (int p = 0; p < stream.len(); p++) begin
      foreach (db.pats[o]) begin
        int m;
        m = db.pats[o].len();
        if (m <= p + 1 && stream.substr(p - m + 1, p) == db.pats[o]) begin
          string k;
          k = $sformatf("%0h:%0d", db.pid[o], p);
          if (expected.exists(k)) expected[k]++; else expected[k] = 1;
        end
      end
    end
    $display("stream %0d characters, %0d expected matches", stream.len(), expected.size());

    t0 = $time / 10;
    for (int p = 0; p < stream.len(); p++) begin
      in_valid <= 1'b1;
      in_char  <= stream[p];
      @(posedge clk);
    end
    t1 = $time / 10;
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);

    check(t1 - t0 == stream.len(), "stream did not advance one character per cycle");
    check(expected.size() == 0, $sformatf("%0d signature occurrences not reported", expected.size()));
    foreach (expected[k]) $display("missed %s", k);
    check(spurious == 0, $sformatf("%0d spurious matches", spurious));
    check(reported >= db.pats.size(), "fewer reports than signatures");
    check(col_matches >= 3, "collision RAM matches missing");
    check(multi_trk > 0, "never two trackers busy in one unit");
    check(cnt_fifo_overflows == 0, "address FIFO overflowed");
    check(cnt_trk_overflows == 0, "offset trackers overflowed");
    $display("reported=%0d tail_events=%0d col=%0d multi_trk=%0d", reported, cnt_tail_events, col_matches, multi_trk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
