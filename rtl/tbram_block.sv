// TBRAM block of the variable-length signature detector.
//
// Confirms a candidate pattern by its summation m-tuple.  Patterns are kept
// in four TBRAMs by length (4-9, 10-14, 15-18 and 19-24 characters); the
// record of a pattern sits at address hash(SUM) of its TBRAM.  When more
// patterns hash to one place, the TBRAM record points to a short linear
// list in the shared collision TBRAM (at most MAXCOL0 records in all for
// TBRAM 0 and MAXCOL for the others, the TBRAM record included).
//
// TBRAM record (LSB first): Sum (27 bits), no_fragbit, start_fragbit,
// collision pointer (9), collision count (3), pattern length (5), valid.
// The collision TBRAM holds records of the same layout (pointer and count
// unused).  Comparing the length as well as the Sum is this design's own
// addition: without it a pattern and its own prefix can give equal sums in
// the same TBRAM group.
//
// A lookup reads the TBRAM (1 cycle), compares, and then reads the
// collision list one record per cycle: at most 5 cycles.  The pattern
// address reported on a match is {0, group, address} for a TBRAM record and
// {1, 00, address} for a collision record.  in_ready is high while idle.
module tbram_block
  import pm_pkg::*;
#(
  parameter int unsigned TB_DEPTH  = 2048,
  parameter int unsigned COL_DEPTH = 512,
  parameter int unsigned MAXCOL0   = 3,
  parameter int unsigned MAXCOL    = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [LENW-1:0] in_len,
  input  sum_t            in_sum,
  input  pos_t            in_pos,
  output logic            match_valid,
  output pid_t            match_id,
  output logic            match_start_frag,
  output logic            match_no_frag,
  output pos_t            match_pos,
  output logic [LENW-1:0] match_len,
  output logic [15:0]     lookups,
  output logic [15:0]     col_reads,     // collision-list records read
  input  logic            wr_en,
  input  logic [2:0]      wr_sel,        // 0..3 TBRAM, 4 collision TBRAM
  input  logic [15:0]     wr_addr,
  input  logic [63:0]     wr_data
);
  localparam int unsigned AW  = $clog2(TB_DEPTH);
  localparam int unsigned CAW = $clog2(COL_DEPTH);

  typedef struct packed {
    logic       valid;
    logic [4:0] len;
    logic [2:0] col_cnt;
    logic [8:0] col_ptr;
    logic       start_frag;
    logic       no_frag;
    sum_t       sum;
  } tbrec_t;

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_COL} state_t;
  state_t state_q;

  tbrec_t           tb_q [NTB];
  tbrec_t           col_q;
  logic [AW-1:0]    rd_addr;
  logic [CAW-1:0]   col_rd_addr;
  logic             col_rd;
  logic [AW-1:0]    addr_q;
  logic [CAW-1:0]   cptr_q;
  logic [2:0]       cleft_q;
  logic [1:0]       grp_q;
  sum_t             sum_q;
  pos_t             pos_q;
  logic [LENW-1:0]  len_q;

  assign rd_addr = AW'(sum_hash(in_sum) % 16'(TB_DEPTH));

  for (genvar g = 0; g < NTB; g++) begin : g_tb
    tbrec_t ram [TB_DEPTH];
    initial for (int i = 0; i < int'(TB_DEPTH); i++) ram[i] = '0;
    always_ff @(posedge clk) begin
      if (wr_en && wr_sel == 3'(g)) ram[wr_addr[AW-1:0]] <= tbrec_t'(wr_data[$bits(tbrec_t)-1:0]);
      tb_q[g] <= ram[rd_addr];
    end
  end

  tbrec_t col_ram [COL_DEPTH];
  initial for (int i = 0; i < int'(COL_DEPTH); i++) col_ram[i] = '0;
  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == 3'd4) col_ram[wr_addr[CAW-1:0]] <= tbrec_t'(wr_data[$bits(tbrec_t)-1:0]);
    col_q <= col_ram[col_rd_addr];
  end

  tbrec_t rec;
  assign rec = tb_q[grp_q];
  logic   tb_hit, col_hit;
  assign tb_hit  = rec.valid && rec.sum == sum_q && rec.len == len_q;
  assign col_hit = col_q.valid && col_q.sum == sum_q && col_q.len == len_q;

  // limit of collision records that may follow the TBRAM record
  logic [2:0] col_limit;
  assign col_limit = (grp_q == 2'd0) ? 3'(MAXCOL0 - 1) : 3'(MAXCOL - 1);

  always_comb begin
    col_rd = 1'b0;
    col_rd_addr = cptr_q;
    if (state_q == S_CHECK && !tb_hit && rec.valid && rec.col_cnt != 0) begin
      col_rd = 1'b1;
      col_rd_addr = rec.col_ptr[CAW-1:0];
    end else if (state_q == S_COL && !col_hit && cleft_q > 1) begin
      col_rd = 1'b1;
      col_rd_addr = CAW'(cptr_q + 1'b1);
    end
  end

  assign in_ready = (state_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      match_valid <= 1'b0;
      match_id <= '0; match_start_frag <= 1'b0; match_no_frag <= 1'b0;
      match_pos <= '0; match_len <= '0;
      addr_q <= '0; cptr_q <= '0; cleft_q <= '0; grp_q <= '0;
      sum_q <= '0; pos_q <= '0; len_q <= '0;
      lookups <= '0; col_reads <= '0;
    end else begin
      match_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (in_valid) begin
          grp_q   <= tbram_group(in_len);
          addr_q  <= rd_addr;
          sum_q   <= in_sum;
          pos_q   <= in_pos;
          len_q   <= in_len;
          lookups <= lookups + 1'b1;
          state_q <= S_CHECK;
        end
        S_CHECK: begin
          if (tb_hit) begin
            match_valid      <= 1'b1;
            match_id         <= {1'b0, grp_q, (PIDW-3)'(addr_q)};
            match_start_frag <= rec.start_frag;
            match_no_frag    <= rec.no_frag;
            match_pos        <= pos_q;
            match_len        <= len_q;
            state_q          <= S_IDLE;
          end else if (col_rd) begin
            cptr_q    <= rec.col_ptr[CAW-1:0];
            cleft_q   <= (rec.col_cnt > col_limit) ? col_limit : rec.col_cnt;
            col_reads <= col_reads + 1'b1;
            state_q   <= S_COL;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_COL: begin
          if (col_hit) begin
            match_valid      <= 1'b1;
            match_id         <= {1'b1, 2'b00, (PIDW-3)'(cptr_q)};
            match_start_frag <= col_q.start_frag;
            match_no_frag    <= col_q.no_frag;
            match_pos        <= pos_q;
            match_len        <= len_q;
            state_q          <= S_IDLE;
          end else if (col_rd) begin
            cptr_q    <= CAW'(cptr_q + 1'b1);
            cleft_q   <= cleft_q - 1'b1;
            col_reads <= col_reads + 1'b1;
          end else begin
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
