// Pattern match unit of the variable-length signature detector.
//
// BDN3 and BDN4 split every pattern into sub-patterns in two different ways.
// A pattern is a candidate only if both units see a complete match of the
// same length ending at the same character, i.e. if PVN3 AND PVN4 has a bit
// set.  For each such length n the unit forwards the summation m-tuple ACCn
// of the last n characters, with n and the character position, into the
// FIFO in front of the TBRAM block, which confirms or rejects it.
//
// Lengths 1..MIN_LEN-1 are excluded here (such short signatures are not
// kept in the TBRAMs).  Pre-processing keeps at most two candidate lengths
// per character, so at most two entries are written per cycle; any further
// bits are dropped and counted in 'dropped'.  FIFO overflow is counted in
// 'overflows'.  The FIFO is read with a valid/ready handshake.
//
// Timing: in_valid with pvn3/pvn4/acc/pos in cycle t; the entry is visible
// at the FIFO output from cycle t+1.
module pattern_match_unit
  import pm_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,   // FIFO entries (power of two)
  parameter int unsigned MIN_LEN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pv_t               pvn3,
  input  pv_t               pvn4,
  input  sum_t              acc [MAXF],
  input  pos_t              pos,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [LENW-1:0]   out_len,
  output sum_t              out_sum,
  output pos_t              out_pos,
  output logic [15:0]       candidates,  // entries written
  output logic [15:0]       dropped,
  output logic [15:0]       overflows
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic [LENW-1:0] len;
    sum_t            sum;
    pos_t            pos;
  } ent_t;

  ent_t          fifo [DEPTH];
  logic [AW:0]   wp_q, rp_q;
  logic [AW:0]   count;
  assign count = wp_q - rp_q;

  pv_t common;
  int unsigned l1, l2, nset;
  always_comb begin
    common = pvn3 & pvn4;
    for (int unsigned n = 1; n < MIN_LEN; n++) common[n] = 1'b0;
    l1 = 0; l2 = 0; nset = 0;
    for (int unsigned n = 1; n <= MAXF; n++)
      if (common[n]) begin
        if (nset == 0) l1 = n;
        else if (nset == 1) l2 = n;
        nset = nset + 1;
      end
  end

  logic       pop;
  int unsigned nwr;
  assign pop = out_valid && out_ready;
  always_comb begin
    nwr = 0;
    if (in_valid) nwr = (nset > 2) ? 2 : nset;
  end

  always_ff @(posedge clk) begin
    if (in_valid && nset >= 1 && int'(count) - int'(pop) < int'(DEPTH))
      fifo[wp_q[AW-1:0]] <= '{len: LENW'(l1), sum: acc[l1-1], pos: pos};
    if (in_valid && nset >= 2 && int'(count) - int'(pop) < int'(DEPTH) - 1)
      fifo[AW'(wp_q[AW-1:0] + 1'b1)] <= '{len: LENW'(l2), sum: acc[l2-1], pos: pos};
  end

  int unsigned space;
  int unsigned nacc;
  always_comb begin
    space = DEPTH - int'(count) + int'(pop);
    nacc  = (nwr > space) ? space : nwr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0;
      candidates <= '0; dropped <= '0; overflows <= '0;
    end else begin
      wp_q <= wp_q + (AW+1)'(nacc);
      if (pop) rp_q <= rp_q + 1'b1;
      candidates <= candidates + 16'(nacc);
      if (in_valid && nset > 2) dropped <= dropped + 16'(nset - 2);
      if (nacc < nwr) overflows <= overflows + 16'(nwr - nacc);
    end
  end

  ent_t head;
  assign head      = fifo[rp_q[AW-1:0]];
  assign out_valid = (count != 0);
  assign out_len   = head.len;
  assign out_sum   = head.sum;
  assign out_pos   = head.pos;
endmodule
