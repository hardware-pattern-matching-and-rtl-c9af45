// Summation block of the variable-length signature detector.
//
// MAXF accumulation units ACC1..ACCMAXF.  After each character, ACCk holds
// the summation m-tuple of the last k characters, in which the characters
// are taken in groups of three from the oldest one and weighted 1, 2 and 4
// inside each group:  ACC1 = W(c);  ACCk = ACC(k-1) (previous character) +
// 2^((k-1) mod 3) * W(c).  The multipliers are shifts.  All MAXF sums are
// offered in parallel to the pattern match unit, which picks the one whose
// length the two bit detection units agree on.
//
// The low elements of the first accumulators can never be wide (ACC1 holds
// one 3-bit weight), so synthesis finds some of their top bits constant.
//
// Timing: w_valid/w in cycle t update the registers at the end of cycle t;
// acc_valid is high for one cycle in t+1.  With bw = 3 and 24 characters the
// largest element is 8 groups * 49 = 392, which fits in SW = 9 bits.
module summation_block
  import pm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    w_valid,
  input  wtuple_t w,
  output logic    acc_valid,
  output sum_t    acc [MAXF]     // acc[k-1] = ACCk
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid <= 1'b0;
      for (int k = 0; k < MAXF; k++) acc[k] <= '0;
    end else begin
      acc_valid <= w_valid;
      if (w_valid) begin
        for (int e = 0; e < M; e++) acc[0][e] <= SW'(w[e]);
        for (int k = 1; k < MAXF; k++)
          for (int e = 0; e < M; e++)
            acc[k][e] <= acc[k-1][e] + (SW'(w[e]) << (k % 3));
      end
    end
  end
endmodule
