// Testbench of the O_Pattern match unit.
//
// FRAM1/FRAM2 are loaded with three fragmented O_Patterns, two of which
// share their first fragment (so one first-fragment arrival hits two FRAM1
// ways):
//   A: 0100 -> 2001 (20 chars) -> 2002 (10 chars)
//   B: 0100 -> 2003 (15 chars)
//   C: 0200 -> 2004 (24) -> 2005 (24) -> 2006 (7)
// Fragment confirmations are then applied as the TBRAM block would deliver
// them (at least 5 cycles apart), including whole signatures, fragments at
// a wrong position, a chain broken by a missing fragment (its tracker must
// expire) and a complete second occurrence of C.  The reported matches
// (address of the first fragment, end position, software-join flag) must
// equal the expected list in order, and 'joins' must count the joins.
// Finally a burst of first fragments on consecutive cycles must overflow
// the arrival queue and be counted, without any report.
module o_pattern_match_unit_tb;
  import pm_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset
  logic        in_valid = 1'b0, in_start_frag = 1'b0, in_no_frag = 1'b0;
  pid_t        in_id = '0;
  pos_t        in_pos = '0;
  logic        out_valid, out_sw_join;
  pid_t        out_id;
  pos_t        out_pos;
  logic [15:0] joins, q_overflows;
  logic        wr_en = 1'b0;
  logic [2:0]  wr_sel = '0;
  logic [15:0] wr_addr = '0;
  logic [63:0] wr_data = '0;

  o_pattern_match_unit #(.F1_DEPTH(512), .F2_DEPTH(2048), .NTRK(4), .QDEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string got[$];
  always @(posedge clk) if (out_valid) got.push_back($sformatf("%h:%0d:%0b", out_id, out_pos, out_sw_join));

  task automatic wr(logic [2:0] sel, int addr, logic [63:0] d);
    wr_en <= 1'b1; wr_sel <= sel; wr_addr <= 16'(addr); wr_data <= d;
    @(posedge clk);
  endtask

  task automatic arrive(pid_t id, bit st, bit nf, int pos);
    in_valid <= 1'b1; in_id <= id; in_start_frag <= st; in_no_frag <= nf; in_pos <= pos_t'(pos);
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
  endtask

  function automatic logic [63:0] f1(pid_t first, int ptr);
    return {38'd0, 1'b1, first, 11'(ptr)};
  endfunction
  function automatic logic [63:0] f2(pid_t id, int len, bit last);
    return {43'd0, 1'b1, last, 5'(len), id};
  endfunction

  initial begin
    string exp[$];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // FRAM1: way 0 and way 1 both for first fragment 0100, way 0 for 0200
    wr(3'd0, int'(fram_hash(14'h0100)), f1(14'h0100, 0));
    wr(3'd1, int'(fram_hash(14'h0100)), f1(14'h0100, 2));
    wr(3'd0, int'(fram_hash(14'h0200)), f1(14'h0200, 3));
    // FRAM2
    wr(3'd4, 0, f2(14'h2001, 20, 0));
    wr(3'd4, 1, f2(14'h2002, 10, 1));
    wr(3'd4, 2, f2(14'h2003, 15, 1));
    wr(3'd4, 3, f2(14'h2004, 24, 0));
    wr(3'd4, 4, f2(14'h2005, 24, 0));
    wr(3'd4, 5, f2(14'h2006, 7, 1));
    wr_en <= 1'b0;
    @(posedge clk);

    arrive(14'h0005, 0, 1, 10);  exp.push_back("0005:10:0");
    arrive(14'h0006, 1, 1, 12);  exp.push_back("0006:12:1");
    arrive(14'h0100, 1, 0, 100);
    arrive(14'h2003, 0, 0, 115); exp.push_back("0100:115:0");
    arrive(14'h2001, 0, 0, 120);
    arrive(14'h2002, 0, 0, 130); exp.push_back("0100:130:0");
    arrive(14'h0200, 1, 0, 200);
    arrive(14'h2004, 0, 0, 223);                 // wrong position
    arrive(14'h2004, 0, 0, 224);
    arrive(14'h2005, 0, 0, 260);                 // too late: tracker expires
    arrive(14'h2006, 0, 0, 267);                 // nothing waits for it
    arrive(14'h0200, 1, 0, 300);
    arrive(14'h2004, 0, 0, 324);
    arrive(14'h2005, 0, 0, 348);
    arrive(14'h2006, 0, 0, 355); exp.push_back("0200:355:0");
    arrive(14'h2002, 0, 0, 400);                 // stray later fragment
    repeat (10) @(posedge clk);
    check(got.size() == exp.size(), $sformatf("%0d reports, expected %0d", got.size(), exp.size()));
    foreach (exp[i]) check(i < got.size() && got[i] == exp[i],
                           $sformatf("report %0d is %s, expected %s", i, (i < got.size()) ? got[i] : "none", exp[i]));
    check(joins == 16'd3, $sformatf("joins %0d, expected 3", joins));
    check(q_overflows == 16'd0, "queue overflow in the spaced sequence");
    // burst: first fragments of 0100 on consecutive cycles
    for (int i = 0; i < 10; i++) begin
      in_valid <= 1'b1; in_id <= 14'h0100; in_start_frag <= 1'b1; in_no_frag <= 1'b0;
      in_pos <= pos_t'(500 + i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    check(q_overflows > 16'd0, "burst did not overflow the arrival queue");
    check(got.size() == exp.size(), "report during the burst");
    $display("reports %0d, joins %0d, queue overflows %0d", got.size(), joins, q_overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
