// Testbench of the summation block.
//
// Feeds a random stream of weight tuples (with idle cycles) and after every
// cycle compares all MAXF accumulators with a reference computed from the
// history of accepted weights: ACCk is the sum over the last k weights, the
// oldest of them multiplied by 1, the next by 2, then 4, 1, 2, 4, ...
// (elements kept to SW bits).  acc_valid must follow w_valid by one cycle
// and the accumulators must hold during idle cycles.
module summation_block_tb;
  import pm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b1;
  logic    w_valid = 1'b0;
  wtuple_t w = '0;
  logic    acc_valid;
  sum_t    acc [MAXF];
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset

  summation_block dut (.*);

  int      checks = 0, failures = 0;
  wtuple_t hist[$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic sum_t ref_acc(int k);   // ACC(k+1)
    sum_t r;
    r = '0;
    for (int d = 0; d <= k; d++)
      if (d < hist.size())
        for (int e = 0; e < M; e++)
          r[e] = r[e] + (SW'(hist[d][e]) << ((k - d) % 3));
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nbad;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      logic    v;
      wtuple_t x;
      v = ($urandom % 5) != 0;
      x = wtuple_t'($urandom);
      w_valid <= v; w <= x;
      @(posedge clk);
      #1;
      if (v) hist.push_front(x);
      check(acc_valid == v, "acc_valid does not follow w_valid by one cycle");
      nbad = 0;
      for (int k = 0; k < MAXF; k++)
        if (acc[k] != ref_acc(k)) begin
          nbad++;
          if (nbad == 1) $display("ACC%0d = %h, expected %h", k + 1, acc[k], ref_acc(k));
        end
      check(nbad == 0, "accumulators differ from the reference");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
