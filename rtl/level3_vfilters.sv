// level3_vfilters - level 3 of the reused interpolation data path.
//
// Four vertical filters whose inputs are not fixed but chosen by two MUXes:
//  - left MUX + two V_F2/4: inputs (A, b) give the half samples h and j in
//    the half-pixel round (sel_l = 0); inputs (a, c) give the quarter samples
//    i and k in the quarter round (sel_l = 1).
//  - right MUX + V_F1/4 and V_F3/4: input A gives d and n (horizontal
//    component of the best half MV zero, sel_r = 0); input b gives f and q
//    (sel_r = 1).
// Inputs are eight-row windows (row 3 = anchor row). A vertical sum over
// integer pixels is rounded with clip((x+32)>>6); one over 16-bit
// intermediates is first scaled >> 6 (HEVC rules, this design's choice).
// Outputs are registered, one clock after the windows, and a pair whose
// enable is low holds its outputs so its filters stay quiet.
module level3_vfilters #(
  parameter int LANES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_l,
  input  logic sel_l,
  input  logic en_r,
  input  logic sel_r,
  input  logic [fme_pkg::PIX_W-1:0] win_A [fme_pkg::NTAPS][LANES],
  input  logic [fme_pkg::INT_W-1:0] win_a [fme_pkg::NTAPS][LANES],
  input  logic [fme_pkg::INT_W-1:0] win_b [fme_pkg::NTAPS][LANES],
  input  logic [fme_pkg::INT_W-1:0] win_c [fme_pkg::NTAPS][LANES],
  output logic [fme_pkg::PIX_W-1:0] hi_o [LANES],  // h (round 1) or i (round 2)
  output logic [fme_pkg::PIX_W-1:0] jk_o [LANES],  // j (round 1) or k (round 2)
  output logic [fme_pkg::PIX_W-1:0] df_o [LANES],  // d (sel_r 0) or f (sel_r 1)
  output logic [fme_pkg::PIX_W-1:0] nq_o [LANES]   // n (sel_r 0) or q (sel_r 1)
);
  import fme_pkg::*;

  logic signed [SUM_W-1:0] s_l0 [LANES], s_l1 [LANES], s_r1 [LANES], s_r3 [LANES];

  for (genvar x = 0; x < LANES; x++) begin : g_lane
    logic signed [INT_W-1:0] ml0 [NTAPS], ml1 [NTAPS], mr [NTAPS];
    always_comb
      for (int k = 0; k < NTAPS; k++) begin
        ml0[k] = sel_l ? win_a[k][x] : INT_W'({1'b0, win_A[k][x]});
        ml1[k] = sel_l ? win_c[k][x] : win_b[k][x];
        mr[k]  = sel_r ? win_b[k][x] : INT_W'({1'b0, win_A[k][x]});
      end
    luma_fir8 #(.PHASE(2), .IW(INT_W), .OW(SUM_W)) u_vf2_0 (.taps(ml0), .sum(s_l0[x]));
    luma_fir8 #(.PHASE(2), .IW(INT_W), .OW(SUM_W)) u_vf2_1 (.taps(ml1), .sum(s_l1[x]));
    luma_fir8 #(.PHASE(1), .IW(INT_W), .OW(SUM_W)) u_vf1   (.taps(mr),  .sum(s_r1[x]));
    luma_fir8 #(.PHASE(3), .IW(INT_W), .OW(SUM_W)) u_vf3   (.taps(mr),  .sum(s_r3[x]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < LANES; x++) begin
        hi_o[x] <= '0; jk_o[x] <= '0; df_o[x] <= '0; nq_o[x] <= '0;
      end
    end else begin
      if (en_l)
        for (int x = 0; x < LANES; x++) begin
          hi_o[x] <= sel_l ? rnd2(s_l0[x]) : rnd1(s_l0[x]);
          jk_o[x] <= rnd2(s_l1[x]);
        end
      if (en_r)
        for (int x = 0; x < LANES; x++) begin
          df_o[x] <= sel_r ? rnd2(s_r1[x]) : rnd1(s_r1[x]);
          nq_o[x] <= sel_r ? rnd2(s_r3[x]) : rnd1(s_r3[x]);
        end
    end
  end
endmodule
