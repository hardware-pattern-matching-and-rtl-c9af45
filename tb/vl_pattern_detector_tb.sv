// End-to-end test of the variable-length signature detector.
//
// A signature set (the small example set of the method, two signatures
// longer than Max_Fragment_Length and a few hundred random ones) is turned
// into table contents by the table builder and written over the host bus.
// A stream holding every signature once, separated by random filler, is then
// scanned.  The reference is a plain substring search of the stream: every
// signature occurrence must be reported with the right pattern address and
// end position, and nothing else may be reported.  The test also counts the
// mechanisms it relies on: two candidate lengths at one character, TBRAM
// collision-list reads, fragment joining, and the per-character rate (one
// character per clock, no stall).
module vl_pattern_detector_tb;
  import pm_pkg::*;
  import vl_model_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  logic        in_valid = 1'b0;
  char_t       in_char = '0;
  host_wr_t    host_wr = '0;
  logic        match_valid, match_sw_join, frag_valid;
  pid_t        match_id, frag_id;
  pos_t        match_pos, frag_pos;
  logic [LENW-1:0] frag_len;
  logic [15:0] cnt_candidates, cnt_dropped, cnt_fifo_overflows, cnt_lookups, cnt_col_reads, cnt_joins, cnt_queue_overflows;

  vl_pattern_detector dut (.*);

  int checks = 0, failures = 0;
  int expected[string];
  int reported = 0, spurious = 0;
  int two_len = 0;
  int last_frag_pos = -1;
  int nlong = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // collect reports
  always @(posedge clk) begin
    if (match_valid) begin
      string k;
      k = $sformatf("%0h:%0d", match_id, match_pos);
      reported++;
      if (expected.exists(k)) begin
        expected[k]--;
        if (expected[k] == 0) expected.delete(k);
      end else begin
        spurious++;
        $display("unexpected match id=%h pos=%0d", match_id, match_pos);
      end
    end
    if (frag_valid) begin
      if (int'(frag_pos) == last_frag_pos) two_len++;
      last_frag_pos = int'(frag_pos);
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vl_db  db = new(7);
    string stream = "";
    int    order[$];
    int    npat;
    int    t0, t1;

    // signature set
    db.add("executemalware.exe");
    db.add("usernametoolong");
    db.add("Badcommand");
    db.add("Passwords");
    db.add("commandlong");
    db.add("codewords");
    db.add("words");                      // ends together with two others
    db.add("GET /cgi-bin/phf?Qalias=x%0a/bin/cat%20/etc/passwd");   // 3 fragments
    db.add("\x90\x90\x90\x90\xeb\x1f\x5e\x89\x76\x08\x31\xc0\x88\x46\x07\x89\x46\x0c\xb0\x0b\x89\xf3\x8d\x4e\x08\x8d\x56");
    for (int i = 0; i < 360; i++) begin
      string s;
      int n;
      s = "";
      n = 4 + db.rnd(21);
      for (int j = 0; j < n; j++) s = {s, string'(8'(65 + db.rnd(26)))};
      db.add(s);
    end
    db.build();
    check(db.fail == 0, "table builder could not place every record");
    foreach (db.opats[o]) if (db.opats[o].len() > MAXF) nlong++;

    // load the tables
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (db.writes[i]) begin
      host_wr <= db.writes[i];
      @(posedge clk);
    end
    host_wr <= '0;
    @(posedge clk);

    // stream: filler in lower case, every signature once in random order
    npat = db.opats.size();
    for (int i = 0; i < npat; i++) order.push_back(i);
    order.shuffle();
    foreach (order[i]) begin
      int nfill;
      nfill = 6 + db.rnd(6);
      for (int j = 0; j < nfill; j++) stream = {stream, string'(8'(97 + db.rnd(26)))};
      stream = {stream, db.opats[order[i]]};
    end
    stream = {stream, "zzzzzzzzzzzzzzzzzzzz"};

    // reference matches
    for (int p = 0; p < stream.len(); p++) begin
      string hist;
      hist = stream.substr((p >= 60) ? p - 60 : 0, p);
      foreach (db.opats[o])
        if (ends_with(hist, db.opats[o])) begin
          string k;
          k = $sformatf("%0h:%0d", db.opat_id(o), p);
          if (expected.exists(k)) expected[k]++;
          else expected[k] = 1;
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
    repeat (60) @(posedge clk);

    // one character per clock, no back pressure
    check(t1 - t0 == stream.len(), "stream did not advance one character per cycle");
    check(expected.size() == 0, $sformatf("%0d signature occurrences not reported", expected.size()));
    foreach (expected[k]) $display("missed %s", k);
    check(spurious == 0, $sformatf("%0d spurious matches", spurious));
    check(reported >= npat, "fewer reports than signatures");
    // mechanisms
    check(two_len > 0, "no character with two candidate lengths");
    check(cnt_col_reads > 0, "collision TBRAM never read");
    check(int'(cnt_joins) == nlong, $sformatf("fragment joins %0d, expected %0d", cnt_joins, nlong));
    check(cnt_fifo_overflows == 0, "candidate FIFO overflowed");
    check(cnt_dropped == 0, "candidate lengths dropped");
    check(cnt_queue_overflows == 0, "O_Pattern arrival queue overflowed");
    $display("reported=%0d candidates=%0d lookups=%0d col_reads=%0d joins=%0d two_len=%0d",
             reported, cnt_candidates, cnt_lookups, cnt_col_reads, cnt_joins, two_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
