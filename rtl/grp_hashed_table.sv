// GRP(i) sub-pattern table of a bit detection unit, for i = 2..N characters.
//
// The i-character sub-window is hashed by WAYS different hash functions
// (the hash block HB(i)); each result addresses one RAM way of WAY_DEPTH
// records.  A record holds the sub-pattern itself and a pointer into a small
// BV-EV RAM that keeps the few distinct (BV, EV) combinations, so that the
// wide vectors are stored once.  Software places each sub-pattern in a way
// whose hashed slot is free, so at most one way can hit and a lookup always
// takes the same time.  A miss returns all-zero vectors.
//
// Timing: rd_valid/rd_key in cycle t; bv/ev/hit with out_valid in cycle t+2
// (way RAMs read in t, key compare and BV-EV RAM read in t+1).
//
// Host writes: record RAM word = {valid, key[8*NCH-1:0], ptr[PTRW-1:0]}
// (LSB first), address = {way, index}; BV-EV RAM word = {bv, ev}.
module grp_hashed_table
  import pm_pkg::*;
#(
  parameter int unsigned NCH       = 3,     // characters per sub-pattern
  parameter int unsigned WAYS      = 4,     // hash functions / RAM ways
  parameter int unsigned WAY_DEPTH = 3072,  // records per way
  parameter int unsigned PTRW      = 10     // BV-EV pointer width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_valid,
  input  logic [8*NCH-1:0]     rd_key,
  output logic                 out_valid,
  output logic                 hit,
  output bv_t                  bv,
  output ev_t                  ev,
  input  logic                 rec_we,
  input  logic [15:0]          rec_addr,
  input  logic [63:0]          rec_data,
  input  logic                 bvev_we,
  input  logic [PTRW-1:0]      bvev_addr,
  input  logic [63:0]          bvev_data
);
  localparam int unsigned IDXW = $clog2(WAY_DEPTH);
  localparam int unsigned KW   = 8 * NCH;
  localparam int unsigned RECW = 1 + KW + PTRW;
  localparam int unsigned VW   = 2 * L + 1;

  typedef struct packed {
    logic            valid;
    logic [KW-1:0]   key;
    logic [PTRW-1:0] ptr;
  } rec_t;

  rec_t                rec_q [WAYS];
  logic [KW-1:0]       key_q;
  logic                v1_q;
  logic [VW-1:0]       bvev_q;
  logic                hit2_q;

  // ---- record RAM ways ------------------------------------------------------
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    rec_t           ram [WAY_DEPTH];
    logic [IDXW-1:0] ra;

    initial for (int i = 0; i < int'(WAY_DEPTH); i++) ram[i] = '0;

    always_comb ra = IDXW'(grp_hash(32'(rd_key), NCH, 2'(w)) % 16'(WAY_DEPTH));

    always_ff @(posedge clk) begin
      if (rec_we && rec_addr[IDXW +: 2] == 2'(w) && 32'(rec_addr[IDXW-1:0]) < 32'(WAY_DEPTH))
        ram[rec_addr[IDXW-1:0]] <= rec_t'(rec_data[RECW-1:0]);
      rec_q[w] <= ram[ra];
    end
  end

  always_ff @(posedge clk) key_q <= rd_key;

  // ---- key compare ----------------------------------------------------------
  logic            hit1;
  logic [PTRW-1:0] ptr1;
  always_comb begin
    hit1 = 1'b0;
    ptr1 = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (rec_q[w].valid && rec_q[w].key == key_q) begin
        hit1 = 1'b1;
        ptr1 = rec_q[w].ptr;
      end
  end

  // ---- BV-EV RAM ------------------------------------------------------------
  logic [VW-1:0] bvev_ram [2**PTRW];
  initial for (int i = 0; i < 2**PTRW; i++) bvev_ram[i] = '0;

  always_ff @(posedge clk) begin
    if (bvev_we) bvev_ram[bvev_addr] <= bvev_data[VW-1:0];
    bvev_q <= bvev_ram[ptr1];
    hit2_q <= hit1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= rd_valid;
      out_valid <= v1_q;
    end

  assign hit = hit2_q;
  assign bv  = hit2_q ? bvev_q[VW-1 -: L] : '0;
  assign ev  = hit2_q ? bvev_q[L:0]       : '0;
endmodule
