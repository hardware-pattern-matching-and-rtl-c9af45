// Testbench of the pattern match unit.
//
// Random PVN3/PVN4 vectors (sparse, so that 0, 1, 2 or more common lengths
// occur), random accumulator values and positions are applied, with idle
// cycles; the FIFO output is drained with a random ready, stalled for long
// stretches so that the FIFO fills up.  A queue model of the unit gives the
// expected entries: per character the two shortest lengths of at least 4
// found in both vectors, each with its own ACC, in order; entries beyond
// the free FIFO space are lost and counted as overflows, lengths beyond two
// are counted as dropped.  Every popped entry, out_valid, and the three
// counters are compared with the model; the test requires that two-length
// characters, drops and overflows all occurred.
module pattern_match_unit_tb;
  import pm_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic            clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // a real edge, so that every register is reset
  logic            in_valid = 1'b0, out_ready = 1'b0;
  pv_t             pvn3 = '0, pvn4 = '0;
  sum_t            acc [MAXF];
  pos_t            pos = '0;
  logic            out_valid;
  logic [LENW-1:0] out_len;
  sum_t            out_sum;
  pos_t            out_pos;
  logic [15:0]     candidates, dropped, overflows;

  pattern_match_unit #(.DEPTH(DEPTH), .MIN_LEN(4)) dut (.*);

  typedef struct { int len; sum_t sum; pos_t pos; } ent_t;
  ent_t model[$];
  int   m_cand = 0, m_drop = 0, m_ovf = 0, n_two = 0;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < MAXF; k++) acc[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic v, rdy;
      pv_t  a, b, c;
      int   lens[$];
      bit   pop;
      v = ($urandom % 4) != 0;
      lens.delete();
      a = '0; b = '0;
      for (int n = 1; n <= MAXF; n++) begin
        if ($urandom % 6 == 0) a[n] = 1'b1;
        if ($urandom % 2 == 0) b[n] = a[n];
      end
      rdy = ((i / 200) % 2 == 0) ? 1'b1 : (($urandom % 3) == 0);
      in_valid <= v; pvn3 <= a; pvn4 <= b; pos <= pos_t'(i);
      for (int k = 0; k < MAXF; k++) acc[k] <= sum_t'({$urandom, $urandom});
      out_ready <= rdy;
      #1;
      // model: output side (before the edge)
      check(out_valid == (model.size() != 0), "out_valid differs from the model");
      pop = rdy && model.size() != 0;
      if (pop) begin
        ent_t e;
        e = model.pop_front();
        check(int'(out_len) == e.len && out_sum == e.sum && out_pos == e.pos,
              $sformatf("entry len %0d pos %0d, expected len %0d pos %0d", out_len, out_pos, e.len, e.pos));
      end
      // model: input side
      c = a & b;
      for (int n = 4; n <= MAXF; n++) if (c[n]) lens.push_back(n);
      if (v) begin
        if (lens.size() >= 2) n_two++;
        if (lens.size() > 2) m_drop += lens.size() - 2;
        for (int q = 0; q < lens.size() && q < 2; q++) begin
          if (model.size() < DEPTH) begin
            ent_t e;
            e.len = lens[q]; e.sum = acc[lens[q] - 1]; e.pos = pos_t'(i);
            model.push_back(e);
            m_cand++;
          end else m_ovf++;
        end
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    #1;
    check(int'(candidates) == m_cand, $sformatf("candidates %0d, expected %0d", candidates, m_cand));
    check(int'(dropped) == m_drop, $sformatf("dropped %0d, expected %0d", dropped, m_drop));
    check(int'(overflows) == m_ovf, $sformatf("overflows %0d, expected %0d", overflows, m_ovf));
    check(n_two > 0 && m_drop > 0 && m_ovf > 0, "two lengths, drops or overflows never happened");
    $display("two-length characters %0d, dropped %0d, overflows %0d", n_two, m_drop, m_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
