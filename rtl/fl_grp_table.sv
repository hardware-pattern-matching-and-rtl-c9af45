// GRP(i) table of the fixed-length detector: the i-character sub-patterns
// with their records {BV, EV, weight m-tuple, baseaddress, hash field}.
//
// The sub-window is hashed by NWAY different functions; each result
// addresses one RAM way (NWAY = 1 with DIRECT = 1 addresses the 256-entry
// GRP(1) RAM by the character itself).  Each way holds two RAMs: a key RAM
// {valid, key, BV pointer, EV pointer} and a data RAM {weights, baseaddress,
// hash field}.  The distinct BVs and EVs are kept once in separate BV and EV
// RAMs, reached through the pointers.  Software places every sub-pattern in
// a way whose slot is free, so at most one way hits.  A miss forwards zero.
//
// Timing: rd_valid/rd_key in cycle t, out_valid/rec in t+2 (ways read in t,
// key compare and BV/EV RAM read in t+1).  Throughput one lookup per cycle.
//
// Host words (LSB first): key RAM {evptr[8], bvptr[10], key[8*NCH], valid}
// at address {way, index}; data RAM {hsel[2], base[13], w[18]}; EV RAM and
// BV RAM one 41-bit vector each.
// Paper: three hashed RAMs per GRP table, direct addressing of GRP(1), BV
// and EV pointer RAMs of GRP(N).  Own: the hash functions, the key compare,
// the word layouts and the way depths.
module fl_grp_table
  import fl_pkg::*;
#(
  parameter int unsigned NCH    = 3,     // characters per sub-pattern
  parameter int unsigned NWAY   = 3,     // hashed ways
  parameter int unsigned DEPTH  = 4096,  // records per way
  parameter bit          DIRECT = 1'b0,  // address by the character (GRP(1))
  parameter bit          HAS_BV = 1'b1   // GRP(N) records carry a BV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_valid,
  input  logic [8*NCH-1:0] rd_key,
  output logic             out_valid,
  output frec_t            rec,
  input  logic             host_we,
  input  logic [1:0]       host_sel,   // 0 key, 1 data, 2 EV, 3 BV
  input  logic [15:0]      host_addr,
  input  logic [63:0]      host_data
);
  localparam int unsigned IDXW = $clog2(DEPTH);
  localparam int unsigned KW   = 8 * NCH;
  localparam int unsigned KRW  = FEVPW + FBVPW + KW + 1;
  localparam int unsigned DRW  = 2 + FZW + FM * FBW;

  fvec_t            ev_ram   [1 << FEVPW];
  fvec_t            bv_ram   [1 << FBVPW];

  logic [KRW-1:0]   kq [NWAY];
  logic [DRW-1:0]   dq [NWAY];
  logic [KW-1:0]    key_q;
  logic             v1;

  // one key RAM and one data RAM per way
  for (genvar w = 0; w < NWAY; w++) begin : g_way
    logic [KRW-1:0]  key_ram  [DEPTH];
    logic [DRW-1:0]  data_ram [DEPTH];
    logic [IDXW-1:0] idx;
    logic            sel;
    initial for (int i = 0; i < DEPTH; i++) begin key_ram[i] = '0; data_ram[i] = '0; end
    assign idx = DIRECT ? IDXW'(rd_key) : IDXW'(fl_grp_hash(24'(rd_key), NCH, 2'(w)) % 16'(DEPTH));
    assign sel = host_we && int'(host_addr[IDXW +: 2]) % NWAY == w;
    always_ff @(posedge clk) begin
      if (sel && host_sel == 2'd0) key_ram[host_addr[IDXW-1:0]]  <= host_data[KRW-1:0];
      if (sel && host_sel == 2'd1) data_ram[host_addr[IDXW-1:0]] <= host_data[DRW-1:0];
      kq[w] <= key_ram[idx];
      dq[w] <= data_ram[idx];
    end
  end

  // tables start empty (written by the host afterwards)
  initial begin
    for (int i = 0; i < (1 << FEVPW); i++) ev_ram[i] = '0;
    for (int i = 0; i < (1 << FBVPW); i++) bv_ram[i] = '0;
  end

  // host writes
  always_ff @(posedge clk) begin
    if (host_we) begin
      unique case (host_sel)
        2'd0, 2'd1: ;   // way RAMs, above
        2'd2: ev_ram[host_addr[FEVPW-1:0]] <= host_data[FL-1:0];
        default: if (HAS_BV) bv_ram[host_addr[FBVPW-1:0]] <= host_data[FL-1:0];
      endcase
    end
  end

  // stage 1: all ways are read (above)
  always_ff @(posedge clk) key_q <= rd_key;

  // stage 2: key compare, pointer RAM read
  logic             hit_c;
  logic [FEVPW-1:0] evp_c;
  logic [FBVPW-1:0] bvp_c;
  logic [DRW-1:0]   d_c;
  always_comb begin
    hit_c = 1'b0; evp_c = '0; bvp_c = '0; d_c = '0;
    for (int w = 0; w < NWAY; w++)
      if (kq[w][0] && kq[w][KW:1] == key_q && !hit_c) begin
        hit_c = 1'b1;
        bvp_c = kq[w][KW+1 +: FBVPW];
        evp_c = kq[w][KW+1+FBVPW +: FEVPW];
        d_c   = dq[w];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= rd_valid; out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    rec.hit  <= hit_c;
    rec.ev   <= hit_c ? ev_ram[evp_c] : '0;
    rec.bv   <= (hit_c && HAS_BV) ? bv_ram[bvp_c] : '0;
    rec.w    <= hit_c ? fw_t'(d_c[FM*FBW-1:0]) : '0;
    rec.base <= hit_c ? d_c[FM*FBW +: FZW] : '0;
    rec.hsel <= hit_c ? d_c[FM*FBW+FZW +: 2] : '0;
  end
endmodule
