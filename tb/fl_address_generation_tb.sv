// Testbench of the address generation unit.
//
// Random bursts of tail events on 15 lanes (sometimes several per cycle,
// with idle stretches) are compared against a queue model: requests must
// come out one per cycle in arrival order (lane order within a cycle) with
// address (baseaddress + offset) mod Z for hash field 0 and the collision
// hash of Temp otherwise.  A burst larger than the FIFO must raise
// 'overflow', and the model drops the same events.
module fl_address_generation_tb;
  import fl_pkg::*;

  localparam int unsigned NIN = 15, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  fevt_t          evt [NIN];
  logic           req_valid, req_col, overflow;
  logic [FZW-1:0] req_addr;
  fsum_t          req_temp;
  logic [15:0]    req_pos;

  fl_address_generation #(.NIN(NIN), .DEPTH(DEPTH)) dut (.*);

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
    fevt_t q[$];
    int    novf, nreq;
    novf = 0; nreq = 0;
    for (int i = 0; i < NIN; i++) evt[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int c = 0; c < 2000; c++) begin
      fevt_t e [NIN];
      bit    exp_v, exp_ovf;
      fevt_t head;
      int    burst;
      burst = (c % 200 == 100 || c % 200 == 101) ? 15 : ((c % 3 == 0) ? int'($urandom % 3) : 0);
      for (int i = 0; i < NIN; i++) begin
        e[i] = fevt_t'({$urandom, $urandom, $urandom});
        e[i].valid = (i < burst) ? 1'($urandom % 4 != 0) || burst > 10 : 1'b0;
      end
      // model: pop, then push
      exp_v = q.size() > 0;
      if (exp_v) head = q.pop_front();
      exp_ovf = 1'b0;
      for (int i = 0; i < NIN; i++)
        if (e[i].valid) begin
          if (q.size() < DEPTH) q.push_back(e[i]); else exp_ovf = 1'b1;
        end
      for (int i = 0; i < NIN; i++) evt[i] = e[i];
      @(posedge clk);
      #1;
      check(req_valid == exp_v, $sformatf("cycle %0d req_valid", c));
      if (exp_v && req_valid) begin
        nreq++;
        check(req_col == (head.hsel != 0), "req_col");
        check(req_addr == ((head.hsel == 0) ? head.base + FZW'(head.off) : FZW'(fl_col_hash(head.temp, head.hsel))),
              $sformatf("cycle %0d address", c));
        check(req_temp == head.temp && req_pos == head.pos, "temp/pos");
      end
      check(overflow == exp_ovf, $sformatf("cycle %0d overflow", c));
      if (exp_ovf) novf++;
    end
    check(novf > 0, "FIFO never overflowed");
    $display("requests %0d, overflow cycles %0d", nreq, novf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
