// Fixed-length sub-pattern signature detector (N = 3).
//
// Input characters enter a window of N characters.  Each cycle the
// sub-windows T_1..T_N (the last 1..N characters) are looked up in
// GRP(1)..GRP(N); the sub-window switch hands the records to the N
// detection units in rotation; the units' tail events go through the
// address generation unit to the controller, which confirms a signature by
// comparing summation m-tuples with the pattern RAM or collision RAM.
//
// Interface: one character per cycle when in_valid (no back pressure);
// match_valid/match_id/match_pos report a confirmed signature, match_pos
// being the position (count of characters since reset) of its last
// character.  Tables are written over the 64-bit host bus (pm_pkg host_wr_t)
// at targets 0x50..0x5d (fl_pkg).  Event counters are free-running.
//
// Timing: a signature ending at the character accepted in cycle t is
// reported about 7 cycles later when its tail event meets an empty FIFO.
// Paper: the N = 3 architecture (window, GRP tables, sub-window switch,
// detection units, address generation, controller).  Own: the pipeline
// registers, the window fill rule (a sub-window is looked up only when it
// holds n input characters), the counters and the host decode.
module fl_pattern_detector
  import pm_pkg::host_wr_t;
  import fl_pkg::*;
#(
  parameter int unsigned GRP2_DEPTH = 512,
  parameter int unsigned GRP3_DEPTH = 8192,
  parameter int unsigned NTRK       = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [7:0]     in_char,
  input  host_wr_t       host_wr,
  output logic           match_valid,
  output logic [FZW:0]   match_id,
  output logic [15:0]    match_pos,
  output logic [15:0]    cnt_tail_events,
  output logic [15:0]    cnt_trk_overflows,
  output logic [15:0]    cnt_fifo_overflows
);
  localparam int unsigned NE = NTRK + 1;

  // ---- window, phase, position ---------------------------------------------
  logic [7:0]  c1, c2;        // previous two characters
  logic [1:0]  fill;          // characters seen, saturating at FN-1
  logic [1:0]  phase;
  logic [15:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; fill <= '0; phase <= '0; pos <= '0;
    end else if (in_valid) begin
      c1 <= in_char; c2 <= c1;
      if (fill != 2'(FN - 1)) fill <= fill + 1'b1;
      phase <= (phase == 2'(FN - 1)) ? '0 : phase + 1'b1;
      pos <= pos + 1'b1;
    end
  end

  // lookup side information, delayed to meet the GRP records (2 cycles)
  logic [1:0]  ph_d [2];
  logic [1:0]  fill_d [2];
  logic [15:0] pos_d [3];
  always_ff @(posedge clk) begin
    ph_d[0] <= phase; ph_d[1] <= ph_d[0];
    fill_d[0] <= fill; fill_d[1] <= fill_d[0];
    pos_d[0] <= pos; pos_d[1] <= pos_d[0]; pos_d[2] <= pos_d[1];
  end

  // ---- host decode ------------------------------------------------------------
  logic       grp_we [FN];
  logic       pat_we;
  always_comb begin
    for (int i = 0; i < FN; i++)
      grp_we[i] = host_wr.we && host_wr.target[7:4] == FTGT_GRP[7:4] &&
                  int'(host_wr.target[3:2]) == i;
    pat_we = host_wr.we && (host_wr.target == FTGT_PAT || host_wr.target == FTGT_COL);
  end

  // ---- GRP tables ---------------------------------------------------------------
  frec_t       grp_rec [FN];
  frec_t       grp_msk [FN];
  logic [FN-1:0] grp_ov;

  fl_grp_table #(.NCH(1), .NWAY(1), .DEPTH(256), .DIRECT(1'b1), .HAS_BV(1'b0)) u_grp1 (
    .clk, .rst_n, .rd_valid(in_valid), .rd_key(in_char),
    .out_valid(grp_ov[0]), .rec(grp_rec[0]),
    .host_we(grp_we[0]), .host_sel(host_wr.target[1:0]), .host_addr(host_wr.addr), .host_data(host_wr.data));
  fl_grp_table #(.NCH(2), .NWAY(3), .DEPTH(GRP2_DEPTH), .DIRECT(1'b0), .HAS_BV(1'b0)) u_grp2 (
    .clk, .rst_n, .rd_valid(in_valid), .rd_key({c1, in_char}),
    .out_valid(grp_ov[1]), .rec(grp_rec[1]),
    .host_we(grp_we[1]), .host_sel(host_wr.target[1:0]), .host_addr(host_wr.addr), .host_data(host_wr.data));
  fl_grp_table #(.NCH(3), .NWAY(3), .DEPTH(GRP3_DEPTH), .DIRECT(1'b0), .HAS_BV(1'b1)) u_grp3 (
    .clk, .rst_n, .rd_valid(in_valid), .rd_key({c2, c1, in_char}),
    .out_valid(grp_ov[2]), .rec(grp_rec[2]),
    .host_we(grp_we[2]), .host_sel(host_wr.target[1:0]), .host_addr(host_wr.addr), .host_data(host_wr.data));

  // a sub-window of n characters exists only after n input characters
  always_comb
    for (int n = 0; n < FN; n++)
      grp_msk[n] = (int'(fill_d[1]) >= n) ? grp_rec[n] : '0;

  // ---- sub-window switch and detection units ------------------------------------
  logic          sw_valid;
  frec_t         unit_rec [FN];
  logic [FN-1:0] unit_full;

  fl_sub_window_switch u_switch (
    .clk, .rst_n, .in_valid(grp_ov[0]), .phase(ph_d[1]), .grp(grp_msk),
    .out_valid(sw_valid), .unit_rec, .unit_full);

  fevt_t         evt [FN*NE];
  fevt_t         uevt [FN][NE];
  fvec_t         dv [FN];
  logic [FN-1:0] trk_ovf;

  for (genvar k = 0; k < FN; k++) begin : g_du
    fl_detection_unit #(.NTRK(NTRK)) u_du (
      .clk, .rst_n, .in_valid(sw_valid), .rec(unit_rec[k]), .full(unit_full[k]),
      .pos(pos_d[2]), .evt(uevt[k]), .dv(dv[k]), .trk_overflow(trk_ovf[k]));
    for (genvar i = 0; i < NE; i++) begin : g_l
      assign evt[k*NE + i] = uevt[k][i];
    end
  end

  // ---- address generation and controller -----------------------------------------
  logic           req_valid, req_col, ag_ovf;
  logic [FZW-1:0] req_addr;
  fsum_t          req_temp;
  logic [15:0]    req_pos;

  fl_address_generation #(.NIN(FN*NE), .DEPTH(FIFO_DEPTH)) u_ag (
    .clk, .rst_n, .evt, .req_valid, .req_col, .req_addr, .req_temp, .req_pos, .overflow(ag_ovf));

  fl_controller u_ctrl (
    .clk, .rst_n, .req_valid, .req_col, .req_addr, .req_temp, .req_pos,
    .match_valid, .match_id, .match_pos,
    .host_we(pat_we), .host_col(host_wr.target == FTGT_COL), .host_addr(host_wr.addr), .host_data(host_wr.data));

  // ---- counters ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_tail_events <= '0; cnt_trk_overflows <= '0; cnt_fifo_overflows <= '0;
    end else begin
      int ne;
      ne = 0;
      for (int i = 0; i < FN*NE; i++) ne += int'(evt[i].valid);
      cnt_tail_events    <= cnt_tail_events + 16'(ne);
      cnt_trk_overflows  <= cnt_trk_overflows + 16'($countones(trk_ovf));
      cnt_fifo_overflows <= cnt_fifo_overflows + 16'(ag_ovf);
    end
  end
endmodule
