// Testbench of the character weight table.
//
// Writes a distinct weight tuple to each of the 256 characters through the
// write port, then reads every character back in a random order, one per
// cycle, with gaps in rd_valid.  Each read must return the written tuple
// exactly one cycle later with w_valid set; w_valid must be low one cycle
// after an idle cycle.  A rewrite of one entry during reads is checked too.
module char_table_tb;
  import pm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b1;
  logic    rd_valid = 1'b0, wr_en = 1'b0;
  char_t   rd_char = '0, wr_addr = '0;
  wtuple_t wr_data = '0;
  logic    w_valid;
  wtuple_t w;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  char_table dut (.*);

  int      checks = 0, failures = 0;
  wtuple_t ref_w [256];

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
    logic    exp_v;
    wtuple_t exp_w;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 256; c++) begin
      ref_w[c] = wtuple_t'((c * 37 + 11) % 512);
      wr_en <= 1'b1; wr_addr <= char_t'(c); wr_data <= ref_w[c];
      @(posedge clk);
    end
    wr_en <= 1'b0;
    exp_v = 1'b0; exp_w = '0;
    for (int i = 0; i < 600; i++) begin
      logic  v;
      char_t c;
      v = ($urandom % 4) != 0;
      c = (i == 300) ? 8'h42 : char_t'($urandom);
      if (i == 300) begin   // rewrite while reading
        wr_en <= 1'b1; wr_addr <= 8'h41; wr_data <= 9'h1aa;
      end else wr_en <= 1'b0;
      rd_valid <= v; rd_char <= c;
      @(posedge clk);
      #1;
      if (i == 300) ref_w[8'h41] = 9'h1aa;
      exp_v = v; exp_w = ref_w[c];
      check(w_valid == exp_v, $sformatf("w_valid %0b expected %0b", w_valid, exp_v));
      if (exp_v) check(w == exp_w, $sformatf("weight %h expected %h", w, exp_w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
