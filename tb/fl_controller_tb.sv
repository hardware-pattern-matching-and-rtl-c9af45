// Testbench of the controller: the pattern RAM and collision RAM are filled
// with random summation tuples (some entries left invalid); random requests
// are issued one per cycle (with gaps) with the stored tuple, a tuple that
// differs in one element, or an invalid entry.  Two cycles later a match
// with {collision, address} and the request position must be reported
// exactly for equal tuples of valid entries.
module fl_controller_tb;
  import fl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic           req_valid = 1'b0, req_col = 1'b0;
  logic [FZW-1:0] req_addr = '0;
  fsum_t          req_temp = '0;
  logic [15:0]    req_pos = '0;
  logic           match_valid;
  logic [FZW:0]   match_id;
  logic [15:0]    match_pos;
  logic           host_we = 1'b0, host_col = 1'b0;
  logic [15:0]    host_addr = '0;
  logic [63:0]    host_data = '0;

  fl_controller dut (.*);

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

  fsum_t pat [256], col [256];
  bit    pv [256], cv [256];

  initial begin
    bit          ev_q[$];
    logic [FZW:0] id_q[$];
    logic [15:0] pos_q[$];
    int          nmatch;
    nmatch = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 256; i++) begin
      pat[i] = fsum_t'({$urandom, $urandom}); col[i] = fsum_t'({$urandom, $urandom});
      pv[i] = ($urandom % 5) != 0; cv[i] = ($urandom % 5) != 0;
      host_we = 1'b1; host_col = 1'b0; host_addr = 16'(i * 16 + 3); host_data = 64'({pv[i], pat[i]});
      @(posedge clk); #1;
      host_col = 1'b1; host_addr = 16'(i * 2); host_data = 64'({cv[i], col[i]});
      @(posedge clk); #1;
    end
    host_we = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      int    a;
      bit    cl, v, same, exp_m;
      fsum_t t;
      a = int'($urandom % 256); cl = 1'($urandom); v = ($urandom % 6) != 0; same = 1'($urandom);
      t = cl ? col[a] : pat[a];
      if (!same) t[$urandom % 3] ^= FSW'(1 << ($urandom % FSW));
      exp_m = v && same && (cl ? cv[a] : pv[a]);
      req_valid = v; req_col = cl; req_addr = cl ? FZW'(a * 2) : FZW'(a * 16 + 3);
      req_temp = t; req_pos = 16'(c);
      ev_q.push_back(exp_m); id_q.push_back({cl, req_addr}); pos_q.push_back(16'(c));
      @(posedge clk); #1;
      if (ev_q.size() == 2) begin
        bit e;
        logic [FZW:0] id;
        logic [15:0] p;
        e = ev_q.pop_front(); id = id_q.pop_front(); p = pos_q.pop_front();
        check(match_valid == e, $sformatf("request %0d match", c - 1));
        if (e) begin
          nmatch++;
          check(match_id == id && match_pos == p, "match id/pos");
        end
      end
    end
    check(nmatch > 200, "too few matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
