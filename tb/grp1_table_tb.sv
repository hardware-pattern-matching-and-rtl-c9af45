// Testbench of the GRP(1) table.
//
// Stores (BV, EV) words for 60 random characters, leaves the others empty,
// then looks up random characters one per cycle (with gaps).  Two cycles
// after each lookup out_valid must be set and bv/ev must equal the stored
// word of that character, or zero for a character that holds none.
module grp1_table_tb;
  import pm_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        rd_valid = 1'b0, wr_en = 1'b0;
  char_t       rd_char = '0, wr_addr = '0;
  logic [63:0] wr_data = '0;
  logic        out_valid;
  bv_t         bv;
  ev_t         ev;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  grp1_table dut (.*);

  int          checks = 0, failures = 0;
  logic [16:0] ref_v [256];

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

  initial begin
    logic        qv[$];
    logic [16:0] qx[$];
    for (int c = 0; c < 256; c++) ref_v[c] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 60; i++) begin
      int c;
      c = int'($urandom % 256);
      ref_v[c] = 17'($urandom) | 17'h100;
      wr_en <= 1'b1; wr_addr <= char_t'(c); wr_data <= 64'(ref_v[c]);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    for (int i = 0; i < 600; i++) begin
      logic  v;
      char_t c;
      v = ($urandom % 4) != 0;
      c = char_t'($urandom);
      rd_valid <= v; rd_char <= c;
      qv.push_back(v); qx.push_back(ref_v[c]);
      @(posedge clk);
      #1;
      if (qv.size() == 2) begin
        logic        ev_;
        logic [16:0] ex;
        ev_ = qv.pop_front(); ex = qx.pop_front();
        check(out_valid == ev_, "out_valid is not rd_valid delayed by two cycles");
        if (ev_) check({bv, ev} == ex, $sformatf("bv/ev %h expected %h", {bv, ev}, ex));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
