// Sub-window switch of the fixed-length detector.
//
// Each cycle the GRP(n) lookups of the sub-windows T_n (the last n
// characters, n = 1..N) return one record each.  Detection unit d_k (k =
// 0..N-1) follows the sub-pattern alignment that ends a full sub-pattern when
// the window phase equals k, so at phase ph it receives the record of
// GRP(n) with n = ((ph - k - 1) mod N) + 1: GRP(1), then GRP(2), ..., GRP(N),
// then GRP(1) again.  The flag 'full' marks the GRP(N) record, the only one
// that updates DV; the others are tail checks only.
//
// Timing: one register stage; inputs in cycle t, outputs in t+1.
// Paper: the rotating input source of the detection units.  Own: the phase
// numbering and the output register.
module fl_sub_window_switch
  import fl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  phase,        // 0..FN-1
  input  frec_t       grp [FN],     // grp[n-1] = record of GRP(n)
  output logic        out_valid,
  output frec_t       unit_rec [FN],
  output logic [FN-1:0] unit_full
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < FN; k++) begin
      int n;
      n = (int'(phase) - k - 1 + 2 * FN) % FN;   // n-1
      unit_rec[k]  <= grp[n];
      unit_full[k] <= (n == FN - 1);
    end
  end
endmodule
