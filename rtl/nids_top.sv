// Top level: network intrusion detection core built around the
// variable-length sub-pattern signature detector.
//
// The packet payload is streamed in one byte per clock (in_valid/in_char)
// with in_sop marking the first byte of a packet.  All detector tables are
// written over the 64-bit host bus (pm_pkg::host_wr_t), which may be used
// while traffic is scanned.
//
// On top of the detector this module keeps, as this design's own choice,
// the alert interface a host needs:
//  * every O_Pattern match is turned into an alert record {packet number,
//    byte offset inside the packet, pattern address}, output with
//    alert_valid one cycle after the detector reports it;
//  * match_count counts all alerts, frag_count all patterns (fragments)
//    confirmed by the TBRAMs, pkt_alerts counts packets that raised at
//    least one alert.
// Byte offsets are taken from the detector's position tag: the position of
// each packet's first byte is recorded at in_sop and subtracted.  Matches
// that run across a packet boundary are reported with the packet in which
// they end (the detector scans the byte stream without breaks, as in the
// described method).
module nids_top
  import pm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sop,
  input  char_t       in_char,
  input  host_wr_t    host_wr,
  output logic        alert_valid,
  output logic [15:0] alert_pkt,
  output pos_t        alert_offset,
  output pid_t        alert_id,
  output logic        alert_sw_join,
  output logic [15:0] match_count,
  output logic [15:0] pkt_alerts,
  output logic [15:0] frag_count,    // patterns confirmed by the TBRAMs
  // detector event counters
  output logic [15:0] cnt_candidates,
  output logic [15:0] cnt_dropped,
  output logic [15:0] cnt_fifo_overflows,
  output logic [15:0] cnt_lookups,
  output logic [15:0] cnt_col_reads,
  output logic [15:0] cnt_joins,
  output logic [15:0] cnt_queue_overflows
);
  logic            m_valid, m_join, f_valid;
  pid_t            m_id, f_id;
  pos_t            m_pos, f_pos;
  logic [LENW-1:0] f_len;

  vl_pattern_detector u_vl (
    .clk, .rst_n, .in_valid, .in_char, .host_wr,
    .match_valid(m_valid), .match_id(m_id), .match_pos(m_pos), .match_sw_join(m_join),
    .frag_valid(f_valid), .frag_id(f_id), .frag_pos(f_pos), .frag_len(f_len),
    .cnt_candidates, .cnt_dropped, .cnt_fifo_overflows, .cnt_lookups,
    .cnt_col_reads, .cnt_joins, .cnt_queue_overflows
  );

  // packet start table: position of the first byte of the last 4 packets,
  // enough for any match latency (< 20 cycles) when packets are >= 8 bytes
  localparam int unsigned NPK = 4;
  pos_t        pkt_start [NPK];
  logic [15:0] pkt_num   [NPK];
  logic [1:0]  pk_wp;
  pos_t        in_pos_q;       // position the next input byte will get
  logic [15:0] pkt_cnt_q;
  logic [15:0] last_alert_pkt_q;
  logic        any_alert_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pos_q <= '0; pkt_cnt_q <= '0; pk_wp <= '0;
      for (int i = 0; i < NPK; i++) begin
        pkt_start[i] <= '0; pkt_num[i] <= '0;
      end
    end else if (in_valid) begin
      in_pos_q <= in_pos_q + 1'b1;
      if (in_sop) begin
        pkt_start[pk_wp] <= in_pos_q;
        pkt_num[pk_wp]   <= pkt_cnt_q;
        pk_wp            <= pk_wp + 1'b1;
        pkt_cnt_q        <= pkt_cnt_q + 1'b1;
      end
    end
  end

  // newest packet that started at or before the match end position
  int unsigned sel;
  logic        found;
  always_comb begin
    sel = 0; found = 1'b0;
    for (int k = 1; k <= NPK; k++) begin
      int unsigned i;
      i = (int'(pk_wp) - k) & (NPK - 1);
      if (!found && k <= int'(pkt_cnt_q) && pkt_start[i] <= m_pos) begin
        sel = i; found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alert_valid <= 1'b0; alert_pkt <= '0; alert_offset <= '0; alert_id <= '0;
      alert_sw_join <= 1'b0; match_count <= '0; pkt_alerts <= '0;
      last_alert_pkt_q <= '0; any_alert_q <= 1'b0; frag_count <= '0;
    end else begin
      if (f_valid) frag_count <= frag_count + 1'b1;
      alert_valid <= m_valid;
      if (m_valid) begin
        alert_pkt     <= found ? pkt_num[sel] : 16'd0;
        alert_offset  <= found ? m_pos - pkt_start[sel] : m_pos;
        alert_id      <= m_id;
        alert_sw_join <= m_join;
        match_count   <= match_count + 1'b1;
        if (!any_alert_q || last_alert_pkt_q != (found ? pkt_num[sel] : 16'd0)) begin
          pkt_alerts <= pkt_alerts + 1'b1;
          last_alert_pkt_q <= found ? pkt_num[sel] : 16'd0;
          any_alert_q <= 1'b1;
        end
      end
    end
  end
endmodule
