// Controller (pattern verification) of the fixed-length detector.
//
// Holds the pattern RAM (Z summation m-tuples) and the smaller collision
// RAM.  For each request from the address generation unit it reads the
// addressed record and compares the stored summation tuple with Temp.  Equal
// tuples confirm a signature: 'match_valid' with the pattern address
// {collision, address} as its identifier and the input position of the
// signature's last character.
//
// Timing: request in cycle t, RAM read at the end of t, compare in t+1,
// match_valid in t+2; one request per cycle.
// Host words: {valid, Sum3, Sum2, Sum1} (Sum1 in the low 12 bits), written
// at the pattern or collision RAM address.
// Paper: pattern RAM, collision RAM and the m-tuple compare.  Own: the
// depths and the identifier format.
module fl_controller
  import fl_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid,
  input  logic           req_col,
  input  logic [FZW-1:0] req_addr,
  input  fsum_t          req_temp,
  input  logic [15:0]    req_pos,
  output logic           match_valid,
  output logic [FZW:0]   match_id,
  output logic [15:0]    match_pos,
  input  logic           host_we,
  input  logic           host_col,
  input  logic [15:0]    host_addr,
  input  logic [63:0]    host_data
);
  localparam int unsigned RW = 1 + FM * FSW;

  logic [RW-1:0] pat_ram [1 << FZW];
  logic [RW-1:0] col_ram [1 << FCW];

  initial begin
    for (int i = 0; i < (1 << FZW); i++) pat_ram[i] = '0;
    for (int i = 0; i < (1 << FCW); i++) col_ram[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (host_we && !host_col) pat_ram[host_addr[FZW-1:0]] <= host_data[RW-1:0];
    if (host_we &&  host_col) col_ram[host_addr[FCW-1:0]] <= host_data[RW-1:0];
  end

  logic [RW-1:0]  rd_q;
  logic           v_q, col_q;
  logic [FZW-1:0] addr_q;
  fsum_t          temp_q;
  logic [15:0]    pos_q;

  always_ff @(posedge clk) begin
    rd_q   <= req_col ? col_ram[req_addr[FCW-1:0]] : pat_ram[req_addr];
    col_q  <= req_col;
    addr_q <= req_col ? FZW'(req_addr[FCW-1:0]) : req_addr;
    temp_q <= req_temp;
    pos_q  <= req_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; match_valid <= 1'b0; match_id <= '0; match_pos <= '0;
    end else begin
      v_q <= req_valid;
      match_valid <= 1'b0;
      if (v_q && rd_q[RW-1] && rd_q[RW-2:0] == temp_q) begin
        match_valid <= 1'b1;
        match_id    <= {col_q, addr_q};
        match_pos   <= pos_q;
      end
    end
  end
endmodule
