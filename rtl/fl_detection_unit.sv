// Detection unit d_k of the fixed-length detector.
//
// Holds the L-bit detection vector DV (its MSB is a constant '1': a
// signature may start at every sub-pattern boundary of this alignment) and
// NTRK offset trackers {enabled, offsetd, ACC m-tuple}, one per '1' of DV
// below the MSB.  For every arriving GRP record:
//   EDV = DV AND EV; for each '1' of EDV (the MSB or a tracker at offset o)
//   a tail event {Temp = ACC + W, baseaddress, offset o, hash field} is
//   issued;
// and only for a GRP(N) record ('full'):
//   DV  = '1' & ((DV AND BV) >> 1); a tracker whose bit survives moves to
//   offset o+1 and adds W to its ACC, the others are cleared; a surviving MSB
//   starts a new tracker at offset 2 with ACC = W.
// A miss forwards a zero record, which clears DV on a GRP(N) slot.  When
// all trackers are busy a new '1' is dropped and 'trk_overflow' pulses.
//
// Timing: record in cycle t, events (one lane for the MSB, one per tracker)
// registered in t+1.
// Paper: DV/EDV/ACC/Temp equations and four offsetd/ACC/Temp sets.  Own: the
// tracker allocation order and the event lane format.
module fl_detection_unit
  import fl_pkg::*;
#(
  parameter int unsigned NTRK = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  frec_t       rec,
  input  logic        full,
  input  logic [15:0] pos,
  output fevt_t       evt [NTRK+1],
  output fvec_t       dv,
  output logic        trk_overflow
);
  logic [NTRK-1:0]  en;
  logic [FOFFW-1:0] off [NTRK];
  fsum_t            acc [NTRK];

  function automatic fsum_t add_w(fsum_t a, fw_t w);
    fsum_t r;
    for (int e = 0; e < FM; e++) r[e] = a[e] + FSW'(w[e]);
    return r;
  endfunction

  fvec_t edv;
  assign edv = dv & rec.ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= {1'b1, {(FL-1){1'b0}}};
      en <= '0;
      trk_overflow <= 1'b0;
      for (int i = 0; i <= NTRK; i++) evt[i] <= '0;
      for (int i = 0; i < NTRK; i++) begin off[i] <= '0; acc[i] <= '0; end
    end else begin
      trk_overflow <= 1'b0;
      for (int i = 0; i <= NTRK; i++) evt[i].valid <= 1'b0;
      if (in_valid) begin
        // tail checks: lane 0 = MSB (offset 1, ACC 0), lane i+1 = tracker i
        if (edv[FL-1]) begin
          evt[0].valid <= 1'b1;
          evt[0].temp  <= add_w('0, rec.w);
          evt[0].base  <= rec.base;
          evt[0].off   <= FOFFW'(1);
          evt[0].hsel  <= rec.hsel;
          evt[0].pos   <= pos;
        end
        for (int i = 0; i < NTRK; i++)
          if (en[i] && edv[FL - int'(off[i])]) begin
            evt[i+1].valid <= 1'b1;
            evt[i+1].temp  <= add_w(acc[i], rec.w);
            evt[i+1].base  <= rec.base;
            evt[i+1].off   <= off[i];
            evt[i+1].hsel  <= rec.hsel;
            evt[i+1].pos   <= pos;
          end
        // DV update on a GRP(N) record
        if (full) begin
          logic [NTRK-1:0] en_n;
          logic            placed;
          fvec_t           hitv;
          hitv = dv & rec.bv;
          dv <= {1'b1, hitv[FL-1:1]};
          en_n = '0;
          for (int i = 0; i < NTRK; i++)
            if (en[i] && int'(off[i]) < FL && hitv[FL - int'(off[i])]) begin
              en_n[i] = 1'b1;
              off[i] <= off[i] + 1'b1;
              acc[i] <= add_w(acc[i], rec.w);
            end
          placed = 1'b0;
          if (hitv[FL-1]) begin
            for (int i = 0; i < NTRK; i++)
              if (!en_n[i] && !placed) begin
                en_n[i] = 1'b1;
                placed = 1'b1;
                off[i] <= FOFFW'(2);
                acc[i] <= add_w('0, rec.w);
              end
            trk_overflow <= !placed;
          end
          en <= en_n;
        end
      end
    end
  end
endmodule
