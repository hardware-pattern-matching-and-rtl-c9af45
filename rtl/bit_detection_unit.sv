// Bit detection unit BDN<N> (BDN3 for N = 3, BDN4 for N = 4).
//
// The input stream enters an N-character shift register (the window).  For
// every character the last j characters, j = 1..N, are looked up in the
// table GRP(j): GRP(1) directly by the character, GRP(2..N) through their
// hash blocks.  Each table returns the BV and EV of the sub-pattern, or
// zeros on a miss, and the AND-SHIFT-OR unit turns them into PVN, the set of
// lengths of complete patterns ending at this character.
//
// Table depths and BV-EV pointer widths are per table length; index j-1
// belongs to GRP(j) (entry 0 is unused, GRP(1) has 256 words).  Defaults
// are those of BDN3; BDN4 is obtained with N = 4 and its own sizes.
//
// Timing: in_valid/in_char in cycle t; out_valid/pvn in cycle t+4
// (window register, two table cycles, AND-SHIFT-OR register).
//
// Host writes: tgt_sel = 2*(j-1) + {0: record / GRP(1) word, 1: BV-EV word}.
module bit_detection_unit
  import pm_pkg::*;
#(
  parameter int unsigned N         = 3,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned WAY_DEPTH [4] = '{0, 256, 3072, 0},
  parameter int unsigned PTRW      [4] = '{0, 8, 10, 0}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  char_t       in_char,
  output logic        out_valid,
  output logic        edv_nz,
  output pv_t         pvn,
  input  logic        wr_en,
  input  logic [2:0]  wr_sel,
  input  logic [15:0] wr_addr,
  input  logic [63:0] wr_data
);
  logic [8*N-1:0] win_q;      // newest character in the low byte
  logic           v0_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      win_q <= '0;
      v0_q  <= 1'b0;
    end else begin
      v0_q <= in_valid;
      if (in_valid) win_q <= {win_q[8*N-9:0], in_char};
    end

  bv_t  bv [N];
  ev_t  ev [N];
  logic tv [N];

  grp1_table u_grp1 (
    .clk, .rst_n,
    .rd_valid (v0_q), .rd_char (win_q[7:0]),
    .out_valid(tv[0]), .bv(bv[0]), .ev(ev[0]),
    .wr_en    (wr_en && wr_sel == 3'd0),
    .wr_addr  (wr_addr[7:0]), .wr_data (wr_data)
  );

  for (genvar j = 2; j <= N; j++) begin : g_tab
    logic unused_hit;
    grp_hashed_table #(
      .NCH(j), .WAYS(WAYS), .WAY_DEPTH(WAY_DEPTH[j-1]), .PTRW(PTRW[j-1])
    ) u_tab (
      .clk, .rst_n,
      .rd_valid (v0_q), .rd_key (win_q[8*j-1:0]),
      .out_valid(tv[j-1]), .hit(unused_hit), .bv(bv[j-1]), .ev(ev[j-1]),
      .rec_we   (wr_en && wr_sel == 3'(2*(j-1))),
      .rec_addr (wr_addr), .rec_data (wr_data),
      .bvev_we  (wr_en && wr_sel == 3'(2*(j-1)+1)),
      .bvev_addr(wr_addr[PTRW[j-1]-1:0]), .bvev_data(wr_data)
    );
  end

  and_shift_or_unit #(.N(N)) u_aso (
    .clk, .rst_n,
    .in_valid (tv[0]), .bv, .ev,
    .out_valid, .edv_nz, .pvn
  );
endmodule
