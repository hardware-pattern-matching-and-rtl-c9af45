// O_Pattern match unit: joins fragment matches into matches of original
// signatures (O_Patterns) that were longer than Max_Fragment_Length.
//
// Each confirmed pattern arrives with its pattern (TBRAM) address, its two
// flag bits and the position of its last character:
//  * no_fragbit = 1: the pattern is a whole O_Pattern and is reported at
//    once (with start_fragbit also 1 the joining is left to software, which
//    is flagged by sw_join);
//  * start_fragbit = 1, no_fragbit = 0: the first fragment of a longer
//    O_Pattern.  FRAM1, four RAM ways addressed by a hash of the pattern
//    address, holds for up to four O_Patterns with this first fragment a
//    pointer into FRAM2.  FRAM2 holds the following fragments in order,
//    each as {pattern address, length, last}.  A tracker is started per
//    FRAM1 hit that waits for the next fragment to end exactly 'length'
//    characters after the previous one;
//  * both flags 0: a later fragment.  A tracker waiting for this address
//    at this position advances to the next FRAM2 entry, or, at the last
//    fragment, reports the O_Pattern (identified by its first fragment's
//    address and the position of its last character).
// Trackers whose expected position has passed are dropped.
//
// Words: FRAM1 (LSB first) {FRAM2 pointer (11), first-fragment address (14),
// valid}; FRAM2 {fragment address (14), length (5), last, valid}.
// Arrivals are queued in a small FIFO; one first fragment takes 2 + 2 x (number
// of FRAM1 hits) cycles, any other arrival 1 or 2 cycles.
module o_pattern_match_unit
  import pm_pkg::*;
#(
  parameter int unsigned F1_DEPTH = 512,    // per FRAM1 way
  parameter int unsigned F2_DEPTH = 2048,
  parameter int unsigned NTRK     = 4,      // concurrently followed O_Patterns
  parameter int unsigned QDEPTH   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pid_t        in_id,
  input  logic        in_start_frag,
  input  logic        in_no_frag,
  input  pos_t        in_pos,
  output logic        out_valid,
  output pid_t        out_id,
  output pos_t        out_pos,
  output logic        out_sw_join,
  output logic [15:0] joins,          // O_Patterns completed from fragments
  output logic [15:0] q_overflows,
  input  logic        wr_en,
  input  logic [2:0]  wr_sel,         // 0..3 FRAM1 way, 4 FRAM2
  input  logic [15:0] wr_addr,
  input  logic [63:0] wr_data
);
  localparam int unsigned F1AW = $clog2(F1_DEPTH);
  localparam int unsigned F2AW = $clog2(F2_DEPTH);
  localparam int unsigned QAW  = $clog2(QDEPTH);

  typedef struct packed {
    logic            valid;
    pid_t            first;
    logic [F2AW-1:0] ptr;
  } f1rec_t;

  typedef struct packed {
    logic            valid;
    logic            last;
    logic [LENW-1:0] len;
    pid_t            id;
  } f2rec_t;

  typedef struct packed {
    pid_t id;
    logic start_frag;
    logic no_frag;
    pos_t pos;
  } arr_t;

  typedef struct packed {
    logic            valid;
    pid_t            first;
    pid_t            exp_id;
    pos_t            exp_pos;
    logic            last;
    logic [F2AW-1:0] ptr;
  } trk_t;

  // ---- arrival queue --------------------------------------------------------
  arr_t        q [QDEPTH];
  logic [QAW:0] qw_q, qr_q;
  logic         q_pop;
  logic         q_empty;
  assign q_empty = (qw_q == qr_q);
  arr_t cur;
  assign cur = q[qr_q[QAW-1:0]];

  always_ff @(posedge clk)
    if (in_valid && (qw_q - qr_q) != (QAW+1)'(QDEPTH))
      q[qw_q[QAW-1:0]] <= '{id: in_id, start_frag: in_start_frag, no_frag: in_no_frag, pos: in_pos};

  // ---- FRAM1 / FRAM2 --------------------------------------------------------
  f1rec_t          f1_q [4];
  f2rec_t          f2_q;
  logic [F1AW-1:0] f1_ra;
  logic [F2AW-1:0] f2_ra;
  assign f1_ra = F1AW'(fram_hash(cur.id));

  for (genvar w = 0; w < 4; w++) begin : g_f1
    f1rec_t ram [F1_DEPTH];
    initial for (int i = 0; i < int'(F1_DEPTH); i++) ram[i] = '0;
    always_ff @(posedge clk) begin
      if (wr_en && wr_sel == 3'(w)) ram[wr_addr[F1AW-1:0]] <= f1rec_t'(wr_data[$bits(f1rec_t)-1:0]);
      f1_q[w] <= ram[f1_ra];
    end
  end

  f2rec_t f2_ram [F2_DEPTH];
  initial for (int i = 0; i < int'(F2_DEPTH); i++) f2_ram[i] = '0;
  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == 3'd4) f2_ram[wr_addr[F2AW-1:0]] <= f2rec_t'(wr_data[$bits(f2rec_t)-1:0]);
    f2_q <= f2_ram[f2_ra];
  end

  // ---- control --------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_F1, S_RD, S_F2} state_t;
  state_t          state_q;
  trk_t            trk_q [NTRK];
  logic [3:0]      f1hit_q;          // FRAM1 ways still to follow
  logic [F2AW-1:0] f1ptr_q [4];
  logic [F2AW-1:0] rptr_q;           // FRAM2 address being read
  arr_t            base_q;           // arrival being served
  int unsigned     slot_q;           // tracker being loaded
  pid_t            first_q;

  // tracker matching the arrival at the head of the queue
  logic        tmatch;
  int unsigned tidx;
  always_comb begin
    tmatch = 1'b0;
    tidx = 0;
    for (int unsigned t = 0; t < NTRK; t++)
      if (!tmatch && trk_q[t].valid && trk_q[t].exp_id == cur.id && trk_q[t].exp_pos == cur.pos) begin
        tmatch = 1'b1;
        tidx = t;
      end
  end

  // FRAM1 ways whose key is the first fragment
  logic [3:0] f1hit;
  always_comb
    for (int w = 0; w < 4; w++) f1hit[w] = f1_q[w].valid && f1_q[w].first == base_q.id;

  // lowest FRAM1 way still to follow, and a free tracker slot (slot 0 is
  // reused when all are busy)
  int unsigned fway, free_slot;
  always_comb begin
    fway = 0;
    for (int w = 3; w >= 0; w--) if (f1hit_q[w]) fway = w;
    free_slot = 0;
    for (int t = int'(NTRK) - 1; t >= 0; t--) if (!trk_q[t].valid) free_slot = t;
  end

  always_comb begin
    f2_ra = f1ptr_q[fway];
    if (state_q == S_IDLE) f2_ra = F2AW'(trk_q[tidx].ptr + 1'b1);
  end

  assign q_pop = (state_q == S_IDLE) && !q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      qw_q <= '0; qr_q <= '0;
      for (int t = 0; t < int'(NTRK); t++) trk_q[t] <= '0;
      for (int w = 0; w < 4; w++) f1ptr_q[w] <= '0;
      f1hit_q <= '0; rptr_q <= '0; base_q <= '0; slot_q <= 0; first_q <= '0;
      out_valid <= 1'b0; out_id <= '0; out_pos <= '0; out_sw_join <= 1'b0;
      joins <= '0; q_overflows <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if ((qw_q - qr_q) != (QAW+1)'(QDEPTH)) qw_q <= qw_q + 1'b1;
        else q_overflows <= q_overflows + 1'b1;
      end
      if (q_pop) qr_q <= qr_q + 1'b1;

      unique case (state_q)
        S_IDLE: if (!q_empty) begin
          // drop trackers that waited in vain
          for (int t = 0; t < int'(NTRK); t++)
            if (trk_q[t].valid && $signed(cur.pos - trk_q[t].exp_pos) > 0)
              trk_q[t].valid <= 1'b0;
          base_q <= cur;
          if (cur.no_frag) begin
            out_valid   <= 1'b1;
            out_id      <= cur.id;
            out_pos     <= cur.pos;
            out_sw_join <= cur.start_frag;
          end else if (cur.start_frag) begin
            state_q <= S_F1;              // FRAM1 is being read
          end else if (tmatch) begin
            trk_q[tidx].valid <= 1'b0;
            if (trk_q[tidx].last) begin
              out_valid   <= 1'b1;
              out_id      <= trk_q[tidx].first;
              out_pos     <= cur.pos;
              out_sw_join <= 1'b0;
              joins       <= joins + 1'b1;
            end else begin
              // the next FRAM2 entry is being read; re-arm the tracker
              rptr_q  <= f2_ra;
              slot_q  <= tidx;
              first_q <= trk_q[tidx].first;
              f1hit_q <= '0;
              state_q <= S_F2;
            end
          end
        end
        S_F1: begin
          for (int w = 0; w < 4; w++) f1ptr_q[w] <= f1_q[w].ptr;
          f1hit_q <= f1hit;
          first_q <= base_q.id;
          state_q <= (f1hit == 4'b0) ? S_IDLE : S_RD;
        end
        S_RD: begin
          // FRAM2 read of the lowest pending FRAM1 way
          rptr_q  <= f2_ra;
          f1hit_q <= f1hit_q & ~(4'b1 << fway);
          slot_q  <= free_slot;
          state_q <= S_F2;
        end
        S_F2: begin
          if (f2_q.valid) begin
            trk_q[slot_q].valid   <= 1'b1;
            trk_q[slot_q].first   <= first_q;
            trk_q[slot_q].exp_id  <= f2_q.id;
            trk_q[slot_q].exp_pos <= base_q.pos + POSW'(f2_q.len);
            trk_q[slot_q].last    <= f2_q.last;
            trk_q[slot_q].ptr     <= rptr_q;
          end
          state_q <= (f1hit_q != 4'b0) ? S_RD : S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
