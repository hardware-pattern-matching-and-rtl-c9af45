// Shared constants, types and hash functions of the variable-length
// sub-pattern signature detector.
//
// Sizes follow the main configuration: Max_Fragment_Length = 24 characters,
// bit vectors of 8 bits (BV) and 9 bits (EV), weight m-tuples with m = 3
// elements of bw = 3 bits and 9-bit summation elements.  The hash functions
// are this design's own choice: they are built only from XOR, rotate and ADD
// operations, as the signature tables require, and the same functions are
// used by the software that fills the tables.
package pm_pkg;

  // ---- sizes ----------------------------------------------------------
  localparam int unsigned M    = 3;   // elements per weight / summation tuple
  localparam int unsigned BW   = 3;   // bits per character weight element
  localparam int unsigned SW   = 9;   // bits per summation element
  localparam int unsigned MAXF = 24;  // Max_Fragment_Length (characters)
  localparam int unsigned L    = 8;   // BV length; EV and DV are L+1 bits
  localparam int unsigned POSW = 16;  // width of the character position tag
  localparam int unsigned LENW = 5;   // width of a pattern length (1..MAXF)
  localparam int unsigned NTB  = 4;   // number of length-grouped TBRAMs
  localparam int unsigned TBAW = 11;  // address bits of one TBRAM
  localparam int unsigned PIDW = 14;  // pattern address: {collision, group, addr}

  typedef logic [7:0]              char_t;
  typedef logic [M-1:0][BW-1:0]    wtuple_t;   // [0] = weight_1
  typedef logic [M-1:0][SW-1:0]    sum_t;      // [0] = Sum_1
  typedef logic [L-1:0]            bv_t;       // bit L-1 = sub-pattern offset 1
  typedef logic [L:0]              ev_t;       // bit L   = sub-pattern offset 1
  typedef logic [MAXF:1]           pv_t;       // bit n = a match n characters long
  typedef logic [POSW-1:0]         pos_t;
  typedef logic [PIDW-1:0]         pid_t;

  // ---- 64-bit host update bus -------------------------------------------
  // One 64-bit word is written per clock cycle into the table selected by
  // 'target'.  The record layouts of each table are given at the table.
  typedef struct packed {
    logic        we;
    logic [7:0]  target;
    logic [15:0] addr;
    logic [63:0] data;
  } host_wr_t;

  localparam logic [7:0] TGT_CHAR  = 8'h01;  // character weight table
  localparam logic [7:0] TGT_BDN3  = 8'h10;  // + 2*(i-1) + {0: record, 1: BV-EV}
  localparam logic [7:0] TGT_BDN4  = 8'h20;  // + 2*(i-1) + {0: record, 1: BV-EV}
  localparam logic [7:0] TGT_TBRAM = 8'h30;  // + TBRAM number 0..3
  localparam logic [7:0] TGT_COLTB = 8'h34;  // collision TBRAM
  localparam logic [7:0] TGT_FRAM1 = 8'h40;  // + way 0..3
  localparam logic [7:0] TGT_FRAM2 = 8'h44;

  // ---- hash functions ---------------------------------------------------
  localparam logic [15:0] GRP_SEED [4] = '{16'h1d2b, 16'h6a4f, 16'hb3c7, 16'he851};

  // Hash of an NCH-character sub-pattern (first character in the highest
  // byte) for RAM way 'way'.  The caller reduces it modulo the way depth.
  function automatic logic [15:0] grp_hash(input logic [31:0] key,
                                           input int unsigned nch,
                                           input logic [1:0] way);
    logic [15:0] h;
    logic [7:0]  c;
    h = GRP_SEED[way];
    for (int unsigned j = 0; j < 4; j++) begin
      if (j < nch) begin
        c = key[8*j +: 8];
        h = h ^ {c, c ^ GRP_SEED[way][15:8]};
        // rotate by 5, 7, 9 or 11 places depending on the way
        case (way)
          2'd0:    h = {h[10:0], h[15:11]};
          2'd1:    h = {h[8:0],  h[15:9]};
          2'd2:    h = {h[6:0],  h[15:7]};
          default: h = {h[4:0],  h[15:5]};
        endcase
        h = h + {GRP_SEED[way][7:0] ^ c, c};
      end
    end
    h = h ^ (h >> 7);
    h = h + (h << 3);
    h = h ^ (h >> 11);
    return h;
  endfunction

  // Hash of a summation m-tuple, used to address the TBRAMs.
  function automatic logic [15:0] sum_hash(input sum_t s);
    logic [26:0] x;
    logic [15:0] h;
    x = s;
    h = x[15:0] ^ {5'd0, x[26:16]};
    h = h + {x[10:0], x[26:22]};
    h = h ^ {h[7:0], h[15:8]};
    return h;
  endfunction

  // Hash of a TBRAM pattern address, used to address FRAM1.
  function automatic logic [8:0] fram_hash(input pid_t id);
    logic [15:0] x;
    x = 16'(id);
    x = x ^ {x[10:0], x[15:11]};
    x = x + {x[7:0], x[15:8]};
    return x[8:0];
  endfunction

  // TBRAM that holds the summation tuples of patterns of length 'len'.
  function automatic logic [1:0] tbram_group(input logic [LENW-1:0] len);
    if (len <= 5'd9)       return 2'd0;
    else if (len <= 5'd14) return 2'd1;
    else if (len <= 5'd18) return 2'd2;
    else                   return 2'd3;
  endfunction

endpackage
