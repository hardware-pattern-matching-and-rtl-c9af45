// Testbench of a detection unit against a reference model.
//
// The model keeps the list of partial matches {offset, ACC} of the unit
// (the MSB '1' of DV being the implicit entry {1, 0}).  Random GRP records
// are applied with vectors whose bits lie in the first six offsets, so that
// partial matches chain; every third record is a GRP(N) record.  Each cycle
// the set of tail events {Temp, baseaddress, offset, hash field} must equal
// the model's, and DV must equal the model's vector.  The test requires
// chains of at least four sub-patterns and several simultaneous trackers.
module fl_detection_unit_tb;
  import fl_pkg::*;

  localparam int unsigned NTRK = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic        in_valid = 1'b0;
  frec_t       rec = '0;
  logic        full = 1'b0;
  logic [15:0] pos = '0;
  fevt_t       evt [NTRK+1];
  fvec_t       dv;
  logic        trk_overflow;

  fl_detection_unit #(.NTRK(NTRK)) dut (.*);

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

  function automatic fsum_t addw(fsum_t a, fw_t w);
    for (int e = 0; e < FM; e++) a[e] += FSW'(w[e]);
    return a;
  endfunction

  function automatic fvec_t rvec();
    fvec_t v;
    v = '0;
    for (int i = 1; i <= 6; i++) if ($urandom % 3 == 0) v[FL - i] = 1'b1;
    return v;
  endfunction

  initial begin
    int    m_off[$];
    fsum_t m_acc[$];
    fvec_t m_dv;
    string exp_ev[$];
    int    max_off, max_trk;
    max_off = 0; max_trk = 0;
    m_dv = {1'b1, {(FL-1){1'b0}}};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      frec_t r;
      logic  f, v;
      string got[$];
      got.delete();
      v = ($urandom % 8) != 0;
      f = (i % 3 == 2);
      r = '0;
      if ($urandom % 4 != 0) begin
        r.hit = 1'b1; r.bv = f ? rvec() : '0; r.ev = rvec();
        r.w = fw_t'($urandom); r.base = fbase_t'($urandom); r.hsel = 2'($urandom);
      end
      rec = r; full = f; in_valid = v; pos = 16'(i);
      // model
      exp_ev.delete();
      if (v) begin
        if (r.ev[FL-1]) exp_ev.push_back($sformatf("%h/%h/1/%0d", addw('0, r.w), r.base, r.hsel));
        foreach (m_off[j]) if (r.ev[FL - m_off[j]])
          exp_ev.push_back($sformatf("%h/%h/%0d/%0d", addw(m_acc[j], r.w), r.base, m_off[j], r.hsel));
        if (f) begin
          int    no[$];
          fsum_t na[$];
          no.delete(); na.delete();
          foreach (m_off[j]) if (m_off[j] < FL && r.bv[FL - m_off[j]]) begin
            no.push_back(m_off[j] + 1); na.push_back(addw(m_acc[j], r.w));
            if (m_off[j] + 1 > max_off) max_off = m_off[j] + 1;
          end
          if (r.bv[FL-1]) begin no.push_back(2); na.push_back(addw('0, r.w)); end
          m_off = no; m_acc = na;
          if (m_off.size() > max_trk) max_trk = m_off.size();
          m_dv = '0; m_dv[FL-1] = 1'b1;
          foreach (m_off[j]) m_dv[FL - m_off[j]] = 1'b1;
        end
      end
      @(posedge clk);
      #1;
      for (int j = 0; j <= NTRK; j++)
        if (evt[j].valid) got.push_back($sformatf("%h/%h/%0d/%0d", evt[j].temp, evt[j].base, evt[j].off, evt[j].hsel));
      got.sort(); exp_ev.sort();
      check(got == exp_ev, $sformatf("cycle %0d: events %p expected %p", i, got, exp_ev));
      check(dv == m_dv, $sformatf("cycle %0d: DV", i));
      check(!trk_overflow, "tracker overflow");
    end
    check(max_off >= 5, "no chain of four sub-patterns");
    check(max_trk >= 3, "never three trackers at once");
    $display("max offset %0d, max trackers %0d", max_off, max_trk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
