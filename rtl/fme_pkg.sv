// fme_pkg - shared constants, types and arithmetic for the HEVC fractional
// motion estimation interpolator.
//
// Holds the 8-tap luma interpolation coefficients for the 1/4, 2/4 and 3/4
// phases (the HEVC DCT-IF taps; the filter phases and names follow the
// three-level data path, the tap values are the video standard's), the sample
// widths, the naming of the 16 sample positions around an integer pixel A
// (a, b, c in its row; d..r below it), the per-round control struct and the
// two rounding rules that turn filter sums into 8-bit prediction samples.
package fme_pkg;

  localparam int PIX_W  = 8;   // reference / prediction sample width
  localparam int INT_W  = 16;  // signed intermediate after one filter pass
  localparam int SUM_W  = 24;  // signed sum of a vertical filter over INT_W inputs
  localparam int NTAPS  = 8;
  localparam int NPOS   = 16;  // A plus 15 fractional positions

  // Position index of every sample around integer pixel A(0,0):
  //   row 0 : A a b c      row 1/4 : d e f g
  //   row 1/2: h i j k     row 3/4 : n p q r
  typedef enum logic [3:0] {
    P_A = 4'd0,  P_a = 4'd1,  P_b = 4'd2,  P_c = 4'd3,
    P_d = 4'd4,  P_e = 4'd5,  P_f = 4'd6,  P_g = 4'd7,
    P_h = 4'd8,  P_i = 4'd9,  P_j = 4'd10, P_k = 4'd11,
    P_n = 4'd12, P_p = 4'd13, P_q = 4'd14, P_r = 4'd15
  } pos_e;

  typedef enum logic { ROUND_HALF = 1'b0, ROUND_QUARTER = 1'b1 } round_e;

  // One interpolation job.
  typedef struct packed {
    round_e     rnd;      // first (half) or second (quarter) round
    logic       mvx_nz;   // horizontal component of the best half MV is nonzero
    logic       mvy_nz;   // vertical component of the best half MV is nonzero
    logic [6:0] rows;     // anchor rows to produce, 1..MAX_ROWS
  } job_cfg_t;

  // Filter enables and MUX selects for one round.
  typedef struct packed {
    logic        en_hq;      // H_F1/4 and H_F3/4 open
    logic        en_l2;      // level-2 vertical filters open
    logic        en_l3l;     // level-3 V_F2/4 pair open
    logic        sel_l3l;    // 0: inputs A,b (h,j)  1: inputs a,c (i,k)
    logic        en_l3r;     // level-3 V_F1/4, V_F3/4 pair open
    logic        sel_l3r;    // 0: input A (d,n)      1: input b (f,q)
    logic [NPOS-1:0] mask;   // positions valid in this round
  } ctl_t;

  // Tap k (0..7) of the filter of phase 1, 2 or 3 (quarter units).
  function automatic int signed coef(input int phase, input logic [2:0] k);
    int signed c1 [NTAPS] = '{-1, 4, -10, 58, 17, -5, 1, 0};
    int signed c2 [NTAPS] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int signed c3 [NTAPS] = '{0, 1, -5, 17, 58, -10, 4, -1};
    case (phase)
      1:       return c1[k];
      2:       return c2[k];
      default: return c3[k];
    endcase
  endfunction

  // Rounds a filter sum of gain 64 to an 8-bit sample: clip((s + 32) >> 6).
  function automatic logic [PIX_W-1:0] rnd1(input logic signed [SUM_W-1:0] s);
    logic signed [SUM_W-1:0] t;
    t = (s + SUM_W'(32)) >>> 6;
    if (t < 0)        return '0;
    else if (t > 255) return 8'd255;
    else              return t[PIX_W-1:0];
  endfunction

  // Second pass over intermediates: the vertical sum (gain 4096) is first
  // brought back to the intermediate scale with >> 6, then rounded as rnd1.
  function automatic logic [PIX_W-1:0] rnd2(input logic signed [SUM_W-1:0] s);
    logic signed [SUM_W-1:0] t;
    t = s >>> 6;
    return rnd1(t);
  endfunction

endpackage
