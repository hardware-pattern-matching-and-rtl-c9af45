// GRP(1) table of a bit detection unit: single-character sub-patterns.
//
// With only 256 possible keys no hashing is needed: the character addresses
// a 256-word RAM directly and the word holds the BV and EV themselves
// (all-zero for a character that is no sub-pattern).  The read is
// registered twice so that the table has the same two-cycle latency as the
// hashed GRP(i) tables beside it.  Host word = {bv, ev}.
module grp1_table
  import pm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_valid,
  input  char_t       rd_char,
  output logic        out_valid,
  output bv_t         bv,
  output ev_t         ev,
  input  logic        wr_en,
  input  char_t       wr_addr,
  input  logic [63:0] wr_data
);
  localparam int unsigned VW = 2 * L + 1;
  logic [VW-1:0] ram [256];
  logic [VW-1:0] d1_q, d2_q;
  logic          v1_q;

  initial for (int i = 0; i < 256; i++) ram[i] = '0;

  always_ff @(posedge clk) begin
    if (wr_en) ram[wr_addr] <= wr_data[VW-1:0];
    d1_q <= ram[rd_char];
    d2_q <= d1_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= rd_valid;
      out_valid <= v1_q;
    end

  assign bv = d2_q[VW-1 -: L];
  assign ev = d2_q[L:0];
endmodule
