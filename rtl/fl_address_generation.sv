// Address generation unit of the fixed-length detector.
//
// Collects the tail events of all detection units (several may arrive in one
// cycle) in a FIFO of DEPTH entries, and issues one per cycle to the
// controller with its pattern address:
//   hash field 0:   pattern RAM address = (baseaddress + offset) mod Z;
//   hash field 1-3: collision RAM address = hash of the summation tuple
//                   Temp, the hash field selecting the element order.
// Events that find the FIFO full are dropped and counted in 'overflow'.
//
// Timing: events in cycle t are written at the end of t; the oldest entry is
// issued (registered) one per cycle from t+1.
// Paper: hash function, adders and FIFOs of this unit; the pattern address
// as baseaddress plus offset modulo Z.  Own: a single shared FIFO, its depth,
// the hash function.
module fl_address_generation
  import fl_pkg::*;
#(
  parameter int unsigned NIN   = 15,
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fevt_t       evt [NIN],
  output logic        req_valid,
  output logic        req_col,        // 1 = collision RAM
  output logic [FZW-1:0] req_addr,
  output fsum_t       req_temp,
  output logic [15:0] req_pos,
  output logic        overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  fevt_t           fifo [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; count <= '0;
      req_valid <= 1'b0; overflow <= 1'b0;
      req_col <= 1'b0; req_addr <= '0; req_temp <= '0; req_pos <= '0;
    end else begin
      logic [AW-1:0] wp;
      logic [AW:0]   cnt;
      logic          ovf;
      fevt_t         e;
      cnt = count;
      ovf = 1'b0;
      // issue the oldest entry
      req_valid <= 1'b0;
      if (cnt != 0) begin
        e = fifo[rd_ptr];
        req_valid <= 1'b1;
        req_col   <= (e.hsel != 2'd0);
        req_addr  <= (e.hsel == 2'd0) ? e.base + FZW'(e.off) : FZW'(fl_col_hash(e.temp, e.hsel));
        req_temp  <= e.temp;
        req_pos   <= e.pos;
        rd_ptr    <= rd_ptr + 1'b1;
        cnt       = cnt - 1'b1;
      end
      // write every valid event
      wp = wr_ptr;
      for (int i = 0; i < NIN; i++)
        if (evt[i].valid) begin
          if (cnt < (AW+1)'(DEPTH)) begin
            fifo[wp] <= evt[i];
            wp  = wp + 1'b1;
            cnt = cnt + 1'b1;
          end else ovf = 1'b1;
        end
      wr_ptr   <= wp;
      count    <= cnt;
      overflow <= ovf;
    end
  end
endmodule
