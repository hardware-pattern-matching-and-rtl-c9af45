// End-to-end test of the intrusion detection core, at its default (full)
// table sizes.
//
// A signature set (the small worked example set, two signatures longer than
// Max_Fragment_Length that must be joined from fragments, and a few hundred
// random ones) is turned into table contents by the table builder and
// written over the 64-bit host bus.  Packets are then streamed back to back,
// one byte per clock; each packet holds lower-case filler and one signature,
// so every signature is seen once, and some packets hold two signatures that
// end together ("codewords" also ends "words").  The reference is a plain
// substring search of the byte stream: every occurrence must raise exactly
// one alert with the right pattern address, packet number and byte offset,
// and nothing else may raise one.  The test also counts the mechanisms the
// design relies on and fails if one never happened: two candidate lengths
// at one character, collision-list reads in the collision TBRAM, fragment
// joins, several alerts in one packet, and the one-byte-per-clock rate.
module nids_top_tb;
  import pm_pkg::*;
  import vl_model_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  logic        in_valid = 1'b0, in_sop = 1'b0;
  char_t       in_char = '0;
  host_wr_t    host_wr = '0;
  logic        alert_valid, alert_sw_join;
  logic [15:0] alert_pkt;
  pos_t        alert_offset;
  pid_t        alert_id;
  logic [15:0] match_count, pkt_alerts, frag_count;
  logic [15:0] cnt_candidates, cnt_dropped, cnt_fifo_overflows, cnt_lookups, cnt_col_reads, cnt_joins,
               cnt_queue_overflows;

  nids_top dut (.*);

  int checks = 0, failures = 0;
  int expected[string];
  int reported = 0, spurious = 0;
  int two_len = 0, last_frag_pos = -1;
  int nlong = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (alert_valid) begin
      string k;
      k = $sformatf("%0h:%0d:%0d", alert_id, alert_pkt, alert_offset);
      reported++;
      if (expected.exists(k)) begin
        expected[k]--;
        if (expected[k] == 0) expected.delete(k);
      end else begin
        spurious++;
        $display("unexpected alert %s", k);
      end
    end
    if (dut.f_valid) begin
      if (int'(dut.f_pos) == last_frag_pos) two_len++;
      last_frag_pos = int'(dut.f_pos);
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
    vl_db  db = new(11);
    string stream;
    int    pkt_of[$];        // packet number of every byte
    int    pkt_start[$];     // first byte of every packet
    int    order[$];
    int    npat, t0, t1, multi;
    bit    pkt_hit[int];
    int    pkt_nal[int];

    db.add("executemalware.exe");
    db.add("usernametoolong");
    db.add("Badcommand");
    db.add("Passwords");
    db.add("commandlong");
    db.add("codewords");
    db.add("words");
    db.add("GET /cgi-bin/phf?Qalias=x%0a/bin/cat%20/etc/passwd");
    db.add("\x90\x90\x90\x90\xeb\x1f\x5e\x89\x76\x08\x31\xc0\x88\x46\x07\x89\x46\x0c\xb0\x0b\x89\xf3\x8d\x4e\x08\x8d\x56");
    for (int i = 0; i < 300; i++) begin
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

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (db.writes[i]) begin
      host_wr <= db.writes[i];
      @(posedge clk);
    end
    host_wr <= '0;
    @(posedge clk);

    // packets: filler + one signature + filler
    npat = db.opats.size();
    for (int i = 0; i < npat; i++) order.push_back(i);
    order.shuffle();
    stream = "";
    foreach (order[i]) begin
      int nf;
      pkt_start.push_back(stream.len());
      nf = 4 + db.rnd(8);
      for (int j = 0; j < nf; j++) begin stream = {stream, string'(8'(97 + db.rnd(26)))}; pkt_of.push_back(i); end
      for (int j = 0; j < db.opats[order[i]].len(); j++) pkt_of.push_back(i);
      stream = {stream, db.opats[order[i]]};
      nf = 4 + db.rnd(8);
      for (int j = 0; j < nf; j++) begin stream = {stream, string'(8'(97 + db.rnd(26)))}; pkt_of.push_back(i); end
    end

    multi = 0;
    for (int p = 0; p < stream.len(); p++) begin
      string hist;
      hist = stream.substr((p >= 60) ? p - 60 : 0, p);
      foreach (db.opats[o])
        if (ends_with(hist, db.opats[o])) begin
          string k;
          int    pk;
          pk = pkt_of[p];
          k = $sformatf("%0h:%0d:%0d", db.opat_id(o), pk, p - pkt_start[pk]);
          if (expected.exists(k)) expected[k]++;
          else expected[k] = 1;
          pkt_hit[pk] = 1;
          if (pkt_nal.exists(pk)) pkt_nal[pk]++; else pkt_nal[pk] = 1;
        end
    end
    foreach (pkt_nal[pk]) if (pkt_nal[pk] > 1) multi++;
    $display("%0d packets, %0d bytes, %0d expected alerts", pkt_start.size(), stream.len(), expected.size());

    t0 = $time / 10;
    for (int p = 0; p < stream.len(); p++) begin
      in_valid <= 1'b1;
      in_sop   <= (pkt_of[p] != ((p == 0) ? -1 : pkt_of[p-1]));
      in_char  <= stream[p];
      @(posedge clk);
    end
    t1 = $time / 10;
    in_valid <= 1'b0; in_sop <= 1'b0;
    repeat (60) @(posedge clk);

    check(t1 - t0 == stream.len(), "stream did not advance one byte per cycle");
    check(expected.size() == 0, $sformatf("%0d signature occurrences not reported", expected.size()));
    foreach (expected[k]) $display("missed %s", k);
    check(spurious == 0, $sformatf("%0d spurious alerts", spurious));
    check(int'(match_count) == reported, "match_count differs from the alerts seen");
    check(int'(pkt_alerts) == pkt_hit.size(), $sformatf("pkt_alerts %0d, expected %0d", pkt_alerts, pkt_hit.size()));
    check(int'(frag_count) >= reported - nlong, "fewer TBRAM confirmations than alerts");
    // mechanisms
    check(two_len > 0, "no character with two candidate lengths");
    check(cnt_col_reads > 0, "collision TBRAM never read");
    check(int'(cnt_joins) == nlong, $sformatf("fragment joins %0d, expected %0d", cnt_joins, nlong));
    check(multi > 0, "no packet with two alerts");
    check(cnt_fifo_overflows == 0 && cnt_dropped == 0 && cnt_queue_overflows == 0, "candidates lost");
    $display("alerts=%0d packets_with_alerts=%0d two_len=%0d col_reads=%0d joins=%0d multi_alert_packets=%0d",
             reported, pkt_alerts, two_len, cnt_col_reads, cnt_joins, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
