// Variable-length sub-pattern signature detector.
//
// Finds known byte signatures in a stream arriving at one character per
// clock, without a state machine per signature.  Every signature (split, if
// longer than MAXF characters, into fragments) is described three ways:
//  * BDN3 and BDN4 cut it into sub-patterns of up to 3 and up to 4
//    characters.  Each sub-pattern's record holds a bit vector BV (the
//    sub-pattern positions it takes in any signature) and an end vector EV
//    (positions where it ends a signature).  AND-SHIFT-OR operations on
//    these vectors give, per character, the lengths of signatures that may
//    end here (PVN3, PVN4);
//  * the summation block keeps a weighted sum of character weights over the
//    last 1..MAXF characters.
// A length found by both BDNs selects one sum, which is confirmed against
// the TBRAM holding the sums of real signatures; the O_Pattern match unit
// then joins fragments.  All tables are RAMs written over a 64-bit host bus
// (one word per cycle) while the stream is being scanned.
//
// Stream: in_valid/in_char, one character per cycle at most; no back
// pressure.  A match is reported with the pattern address of the signature
// (or of its first fragment) and the position (count from 0 of valid input
// characters) of its last character.  Latency from the last character to
// match_valid is 9 to 13 cycles for a whole signature plus 1-2 cycles in the
// O_Pattern unit.
//
// Table sizes are those of the implemented configuration with
// Max_Fragment_Length = 24.  Host targets are listed in pm_pkg.
module vl_pattern_detector
  import pm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  char_t       in_char,
  input  host_wr_t    host_wr,
  output logic        match_valid,
  output pid_t        match_id,
  output pos_t        match_pos,
  output logic        match_sw_join,
  // pattern (fragment) confirmations from the TBRAM block
  output logic        frag_valid,
  output pid_t        frag_id,
  output pos_t        frag_pos,
  output logic [LENW-1:0] frag_len,
  // event counters
  output logic [15:0] cnt_candidates,
  output logic [15:0] cnt_dropped,
  output logic [15:0] cnt_fifo_overflows,
  output logic [15:0] cnt_lookups,
  output logic [15:0] cnt_col_reads,
  output logic [15:0] cnt_joins,
  output logic [15:0] cnt_queue_overflows
);
  // ---- host bus decode ------------------------------------------------------
  logic tgt_char, tgt_b3, tgt_b4, tgt_tb, tgt_op;
  assign tgt_char = host_wr.we && host_wr.target == TGT_CHAR;
  assign tgt_b3   = host_wr.we && host_wr.target[7:4] == TGT_BDN3[7:4] && !host_wr.target[3];
  assign tgt_b4   = host_wr.we && host_wr.target[7:4] == TGT_BDN4[7:4] && !host_wr.target[3];
  assign tgt_tb   = host_wr.we && host_wr.target[7:4] == TGT_TBRAM[7:4] && host_wr.target[3:0] <= 4'd4;
  assign tgt_op   = host_wr.we && host_wr.target[7:4] == TGT_FRAM1[7:4] && host_wr.target[3:0] <= 4'd4;

  // ---- summation path (delayed to line up with the BDN outputs) -------------
  logic  d1_v, d2_v;
  char_t d1_c, d2_c;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d1_v <= 1'b0; d2_v <= 1'b0; d1_c <= '0; d2_c <= '0;
    end else begin
      d1_v <= in_valid; d1_c <= in_char;
      d2_v <= d1_v;     d2_c <= d1_c;
    end

  logic    w_valid;
  wtuple_t w;
  char_table u_char (
    .clk, .rst_n, .rd_valid(d2_v), .rd_char(d2_c), .w_valid, .w,
    .wr_en(tgt_char), .wr_addr(host_wr.addr[7:0]), .wr_data(host_wr.data[M*BW-1:0])
  );

  logic acc_valid;
  sum_t acc [MAXF];
  summation_block u_sum (.clk, .rst_n, .w_valid, .w, .acc_valid, .acc);

  // ---- bit detection units --------------------------------------------------
  logic b3_valid, b4_valid, b3_edv, b4_edv;
  pv_t  pvn3, pvn4;

  bit_detection_unit #(
    .N(3), .WAYS(4), .WAY_DEPTH('{0, 256, 3072, 0}), .PTRW('{0, 8, 10, 0})
  ) u_bdn3 (
    .clk, .rst_n, .in_valid, .in_char,
    .out_valid(b3_valid), .edv_nz(b3_edv), .pvn(pvn3),
    .wr_en(tgt_b3), .wr_sel(host_wr.target[2:0]), .wr_addr(host_wr.addr), .wr_data(host_wr.data)
  );

  bit_detection_unit #(
    .N(4), .WAYS(4), .WAY_DEPTH('{0, 384, 384, 3584}), .PTRW('{0, 6, 6, 8})
  ) u_bdn4 (
    .clk, .rst_n, .in_valid, .in_char,
    .out_valid(b4_valid), .edv_nz(b4_edv), .pvn(pvn4),
    .wr_en(tgt_b4), .wr_sel(host_wr.target[2:0]), .wr_addr(host_wr.addr), .wr_data(host_wr.data)
  );

  // position of the character whose results are on pvn3/pvn4/acc
  pos_t pos_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos_q <= '0;
    else if (b3_valid) pos_q <= pos_q + 1'b1;

  // ---- pattern match unit, TBRAMs, O_Pattern unit ----------------------------
  logic            pm_valid, pm_ready;
  logic [LENW-1:0] pm_len;
  sum_t            pm_sum;
  pos_t            pm_pos;

  pattern_match_unit u_pmu (
    .clk, .rst_n,
    .in_valid(b3_valid && b4_valid && acc_valid), .pvn3, .pvn4, .acc, .pos(pos_q),
    .out_valid(pm_valid), .out_ready(pm_ready), .out_len(pm_len), .out_sum(pm_sum), .out_pos(pm_pos),
    .candidates(cnt_candidates), .dropped(cnt_dropped), .overflows(cnt_fifo_overflows)
  );

  logic            tb_valid, tb_start, tb_nofrag;
  pid_t            tb_id;
  pos_t            tb_pos;
  logic [LENW-1:0] tb_len;

  tbram_block u_tb (
    .clk, .rst_n,
    .in_valid(pm_valid), .in_ready(pm_ready), .in_len(pm_len), .in_sum(pm_sum), .in_pos(pm_pos),
    .match_valid(tb_valid), .match_id(tb_id), .match_start_frag(tb_start), .match_no_frag(tb_nofrag),
    .match_pos(tb_pos), .match_len(tb_len),
    .lookups(cnt_lookups), .col_reads(cnt_col_reads),
    .wr_en(tgt_tb), .wr_sel(host_wr.target[2:0]), .wr_addr(host_wr.addr), .wr_data(host_wr.data)
  );

  assign frag_valid = tb_valid;
  assign frag_id    = tb_id;
  assign frag_pos   = tb_pos;
  assign frag_len   = tb_len;

  o_pattern_match_unit u_opu (
    .clk, .rst_n,
    .in_valid(tb_valid), .in_id(tb_id), .in_start_frag(tb_start), .in_no_frag(tb_nofrag), .in_pos(tb_pos),
    .out_valid(match_valid), .out_id(match_id), .out_pos(match_pos), .out_sw_join(match_sw_join),
    .joins(cnt_joins), .q_overflows(cnt_queue_overflows),
    .wr_en(tgt_op), .wr_sel(host_wr.target[2:0]), .wr_addr(host_wr.addr), .wr_data(host_wr.data)
  );
endmodule
