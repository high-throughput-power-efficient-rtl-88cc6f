// level2_vfilters - level 2 of the reused interpolation data path.
//
// Four vertical filters with fixed inputs, working only in the quarter-pixel
// round: V_F1/4 and V_F3/4 on the horizontal quarter samples a give e and p,
// V_F1/4 and V_F3/4 on the three-quarter samples c give g and r. Inputs are
// the eight-row windows of a and c (row index 3 = anchor row). The vertical
// sums of these 16-bit intermediates are scaled back (>> 6) and rounded to
// 8-bit samples, clip((x + 32) >> 6), which is the HEVC rule and this
// design's choice of output format. Outputs are registered and held while
// `en` is low (half-pixel round), one clock after the windows.
module level2_vfilters #(
  parameter int LANES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic [fme_pkg::INT_W-1:0] win_a [fme_pkg::NTAPS][LANES],
  input  logic [fme_pkg::INT_W-1:0] win_c [fme_pkg::NTAPS][LANES],
  output logic [fme_pkg::PIX_W-1:0] e_o [LANES],
  output logic [fme_pkg::PIX_W-1:0] p_o [LANES],
  output logic [fme_pkg::PIX_W-1:0] g_o [LANES],
  output logic [fme_pkg::PIX_W-1:0] r_o [LANES]
);
  import fme_pkg::*;

  logic signed [SUM_W-1:0] se [LANES], sp [LANES], sg [LANES], sr [LANES];

  for (genvar x = 0; x < LANES; x++) begin : g_lane
    logic signed [INT_W-1:0] ta [NTAPS], tc [NTAPS];
    always_comb
      for (int k = 0; k < NTAPS; k++) begin
        ta[k] = win_a[k][x];
        tc[k] = win_c[k][x];
      end
    luma_fir8 #(.PHASE(1), .IW(INT_W), .OW(SUM_W)) u_vf1_a (.taps(ta), .sum(se[x]));
    luma_fir8 #(.PHASE(3), .IW(INT_W), .OW(SUM_W)) u_vf3_a (.taps(ta), .sum(sp[x]));
    luma_fir8 #(.PHASE(1), .IW(INT_W), .OW(SUM_W)) u_vf1_c (.taps(tc), .sum(sg[x]));
    luma_fir8 #(.PHASE(3), .IW(INT_W), .OW(SUM_W)) u_vf3_c (.taps(tc), .sum(sr[x]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < LANES; x++) begin
        e_o[x] <= '0; p_o[x] <= '0; g_o[x] <= '0; r_o[x] <= '0;
      end
    end else if (en) begin
      for (int x = 0; x < LANES; x++) begin
        e_o[x] <= rnd2(se[x]);
        p_o[x] <= rnd2(sp[x]);
        g_o[x] <= rnd2(sg[x]);
        r_o[x] <= rnd2(sr[x]);
      end
    end
  end
endmodule
