// Shared constants, types and hash functions of the fixed-length sub-pattern
// signature detector.
//
// Sizes follow the published N = 3 implementation: bit vectors of L = 41
// bits (3 x 41 = 123 characters, enough for the longest signature), weight
// m-tuples of m = 3 elements of bw = 6 bits and 12-bit summation elements
// (2^6 x 41 < 2^12), a 1024-entry BV RAM for GRP(3) (10-bit pointer) and
// 256-entry EV RAMs (8-bit pointer).  The pattern RAM depth Z, the collision
// RAM depth, the GRP way depths, the number of offset trackers per detection
// unit (four, as published) and the host word layouts are this design's own
// choices where the published text gives no number.  The hash functions are
// own choices built from XOR, rotate and ADD only.
package fl_pkg;
  import pm_pkg::grp_hash;

  localparam int unsigned FN    = 3;    // sub-pattern length N
  localparam int unsigned FL    = 41;   // bit vector length L
  localparam int unsigned FM    = 3;    // weight tuple elements m
  localparam int unsigned FBW   = 6;    // bits per weight element
  localparam int unsigned FSW   = 12;   // bits per summation element
  localparam int unsigned FOFFW = 6;    // offset counter width (1..L+1)
  localparam int unsigned FZW   = 13;   // pattern RAM address bits (Z = 8192)
  localparam int unsigned FCW   = 9;    // collision RAM address bits (512)
  localparam int unsigned FEVPW = 8;    // EV pointer width
  localparam int unsigned FBVPW = 10;   // BV pointer width (GRP(N) only)

  typedef logic [FL-1:0]              fvec_t;   // bit FL-1 = sub-pattern offset 1
  typedef logic [FM-1:0][FBW-1:0]     fw_t;     // [0] = weight_1
  typedef logic [FM-1:0][FSW-1:0]     fsum_t;   // [0] = Sum_1
  typedef logic [FZW-1:0]             fbase_t;

  // GRP record as forwarded to the detection units
  typedef struct packed {
    logic       hit;
    fvec_t      bv;
    fvec_t      ev;
    fw_t        w;
    fbase_t     base;
    logic [1:0] hsel;      // hash field: 0 = pattern RAM, 1..3 = collision RAM, tuple order
  } frec_t;

  // tail event of a detection unit
  typedef struct packed {
    logic             valid;
    fsum_t            temp;
    fbase_t           base;
    logic [FOFFW-1:0] off;
    logic [1:0]       hsel;
    logic [15:0]      pos;
  } fevt_t;

  // host targets: GRP(i) at FTGT_GRP + 4*(i-1) + {0 key RAM, 1 data RAM, 2 EV RAM, 3 BV RAM}
  localparam logic [7:0] FTGT_GRP = 8'h50;
  localparam logic [7:0] FTGT_PAT = 8'h5c;  // pattern RAM
  localparam logic [7:0] FTGT_COL = 8'h5d;  // collision RAM

  // hash of an i-character sub-pattern for way w (shared with the other detector)
  function automatic logic [15:0] fl_grp_hash(input logic [23:0] key, input int unsigned nch,
                                              input logic [1:0] way);
    return grp_hash({8'd0, key}, nch, way);
  endfunction

  // collision RAM hash: the hash field selects the order of the summation
  // elements fed to the hash
  function automatic logic [FCW-1:0] fl_col_hash(input fsum_t s, input logic [1:0] hsel);
    logic [FSW-1:0] a, b, c;
    logic [15:0]    h;
    case (hsel)
      2'd2:    begin a = s[1]; b = s[2]; c = s[0]; end
      2'd3:    begin a = s[2]; b = s[0]; c = s[1]; end
      default: begin a = s[0]; b = s[1]; c = s[2]; end
    endcase
    h = {4'd0, a} ^ {b, 4'd0};
    h = {h[10:0], h[15:11]} + {4'd0, c};
    h = h ^ {h[7:0], h[15:8]};
    h = h + {c[3:0], a};
    return h[FCW-1:0];
  endfunction
endpackage
