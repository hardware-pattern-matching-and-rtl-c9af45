// AND-SHIFT-OR unit of a bit detection unit (BDN3 or BDN4).
//
// A pattern may start at any character, so the unit keeps N sets of
// detection vector DV, position vector PV (and end detection vector EDV),
// one per character phase; the set of phase i is updated on the characters
// whose offset is i modulo N.  For each character the sub-pattern of length
// X that ends with it (the last X characters, from table GRP(X)) extends
// the partial matches that were recorded X characters earlier, in phase k
// with X = (i - k) mod N (0 meaning N):
//     tempDV  = OR_k (DV_k AND (BV_X & '0'))
//     tempEDV = OR_k (DV_k AND EV_X)
//     DV_i    = "100..0" OR (tempDV >> 1),   EDV_i = tempEDV.
// Bit L of DV (sub-pattern offset 1) is always '1': a new pattern can start
// at every character.
//
// PV_k is a MAXF-bit vector of the character lengths of the partial matches
// counted by DV_k.  A partial match that has completed v sub-patterns is
// v .. N*v characters long; when it is extended by an X-character
// sub-pattern its lengths move up by X.  The same is done with the tail
// hits (EV) to give PVN: bit n set means a complete pattern n characters
// long ends at this character.  This follows the pseudocode of the method
// with one simplification of this design: the length range of v completed
// sub-patterns is taken as v .. N*v.
//
// Timing: in_valid with the N table outputs in cycle t; pvn, edv_nz and
// out_valid in cycle t+1.  Phases advance only on valid characters.
module and_shift_or_unit
  import pm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  bv_t  bv [N],     // bv[j-1], ev[j-1]: record of GRP(j), last j characters
  input  ev_t  ev [N],
  output logic out_valid,
  output logic edv_nz,     // active EDV non-zero: some pattern tail matched
  output pv_t  pvn         // lengths of the complete patterns ending here
);
  localparam int unsigned PHW = (N > 1) ? $clog2(N) : 1;
  localparam ev_t DV_INIT = ev_t'(1) << L;

  ev_t             dv_q [N];
  pv_t             pv_q [N];
  logic [PHW-1:0]  ph_q;

  // lengths a partial match of v completed sub-patterns can have
  function automatic pv_t len_range(input int unsigned v);
    pv_t r;
    r = '0;
    for (int unsigned n = 1; n <= MAXF; n++)
      if (n >= v && n <= N * v) r[n] = 1'b1;
    return r;
  endfunction

  ev_t tdv, tedv, dvbv, dvev;
  pv_t pvb, pve;
  int unsigned x;

  always_comb begin
    tdv = '0; tedv = '0; pvb = '0; pve = '0;
    dvbv = '0; dvev = '0; x = 0;
    for (int unsigned k = 0; k < N; k++) begin
      x = (int'(ph_q) >= int'(k)) ? (int'(ph_q) - int'(k)) : (int'(ph_q) + int'(N) - int'(k));
      if (x == 0) x = N;
      dvbv = dv_q[k] & {bv[x-1], 1'b0};
      dvev = dv_q[k] & ev[x-1];
      tdv  = tdv  | dvbv;
      tedv = tedv | dvev;
      // first sub-pattern of a pattern: the match is X characters long
      if (dvbv[L]) pvb[x] = 1'b1;
      if (dvev[L]) pve[x] = 1'b1;
      // later sub-patterns: move the recorded lengths up by X
      for (int unsigned v = 1; v <= L; v++) begin
        if (dvbv[L-v]) pvb = pvb | ((pv_q[k] & len_range(v)) << x);
        if (dvev[L-v]) pve = pve | ((pv_q[k] & len_range(v)) << x);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        dv_q[k] <= DV_INIT;
        pv_q[k] <= '0;
      end
      ph_q      <= '0;
      out_valid <= 1'b0;
      edv_nz    <= 1'b0;
      pvn       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dv_q[ph_q] <= DV_INIT | (tdv >> 1);
        pv_q[ph_q] <= pvb;
        ph_q       <= (int'(ph_q) == int'(N) - 1) ? '0 : ph_q + 1'b1;
        edv_nz     <= |tedv;
        pvn        <= pve;
      end
    end
  end
endmodule
