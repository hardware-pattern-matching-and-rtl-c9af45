// Character table of the variable-length signature detector.
//
// Every byte value 0..255 owns a unique m-tuple of bw-bit weights.  The table
// is a 256-word RAM addressed by the incoming character; it is read with one
// cycle of latency (rd_valid/rd_char in cycle t, weights in cycle t+1 with
// w_valid).  A separate write port lets host software load the weights; the
// table is never changed once signatures have been placed, since every
// stored summation depends on it.  The RAM starts all zero, as a block RAM
// with an initial image does.
module char_table
  import pm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rd_valid,
  input  char_t   rd_char,
  output logic    w_valid,
  output wtuple_t w,
  input  logic    wr_en,
  input  char_t   wr_addr,
  input  wtuple_t wr_data
);
  wtuple_t ram [256];

  initial for (int i = 0; i < 256; i++) ram[i] = '0;

  always_ff @(posedge clk) begin
    if (wr_en) ram[wr_addr] <= wr_data;
    w <= ram[rd_char];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) w_valid <= 1'b0;
    else        w_valid <= rd_valid;
endmodule
