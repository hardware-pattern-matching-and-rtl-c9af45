// Testbench of the sub-window switch: random GRP(1..3) records and phases;
// one cycle later detection unit k must hold the record of GRP(n) with
// n = ((phase - k - 1) mod 3) + 1 and 'full' exactly when n = 3.
module fl_sub_window_switch_tb;
  import fl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic          in_valid = 1'b0;
  logic [1:0]    phase = '0;
  frec_t         grp [FN];
  logic          out_valid;
  frec_t         unit_rec [FN];
  logic [FN-1:0] unit_full;

  fl_sub_window_switch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frec_t g [FN];
    logic [1:0] ph;
    logic v;
    for (int n = 0; n < FN; n++) grp[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 300; i++) begin
      for (int n = 0; n < FN; n++) g[n] = frec_t'({$urandom, $urandom, $urandom, $urandom});
      ph = 2'($urandom % 3);
      v = 1'($urandom);
      for (int n = 0; n < FN; n++) grp[n] = g[n];
      phase = ph; in_valid = v;
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid");
      for (int k = 0; k < FN; k++) begin
        int n;
        n = (int'(ph) - k - 1 + 6) % 3;
        check(unit_rec[k] == g[n], $sformatf("unit %0d record at phase %0d: %h %h", k, ph, unit_rec[k], g[n]));
        check(unit_full[k] == (n == 2), "full flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
