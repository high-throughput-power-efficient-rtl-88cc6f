// fme_interp_top - HEVC fractional motion estimation interpolator.
//
// The reused three-level data path: level 1 (three horizontal filters) feeds
// the eight-row vertical windows of A, a, b and c; level 2 (four vertical
// filters on a and c) and level 3 (four vertical filters behind two MUXes)
// read those windows. The same filters serve the half-pixel round and the
// quarter-pixel round, so no block-sized buffer of half-pixel intermediates
// is kept between the rounds; the second round simply re-filters the
// reference rows. interp_ctrl sets which filters are open in each round.
//
// Interface: start a job with `start`/`cfg`, then stream rows+7 reference
// rows of LANES+7 pixels (columns -3 .. LANES+3, rows -3 .. rows+3 around the
// strip) on row_in with in_valid/in_ready. Every anchor row y comes out as
// out_smp[pos][lane] for the 16 positions (A, a..r, fme_pkg::pos_e order)
// with out_mask marking those computed in this round (others read 0),
// 3 clocks after reference row y+4 was accepted. One row per clock.
//
// Beside it, with its own ports, sits the SATD mode-cost unit (satd_cost).
//
// The level structure, the filters per level and their use in each round
// follow the published three-level reused architecture; the row windows, the
// streaming interface, the widths and the 3-clock pipeline are this design's.
module fme_interp_top #(
  parameter int LANES    = 8,
  parameter int MAX_ROWS = 64,
  parameter int LW       = 8
) (
  input  logic clk,
  input  logic rst_n,
  // interpolation job and reference rows
  input  logic start,
  input  fme_pkg::job_cfg_t cfg,
  input  logic in_valid,
  output logic in_ready,
  input  logic [7:0] row_in [LANES+7],
  output logic busy,
  output logic done,
  // interpolated anchor rows
  output logic out_valid,
  output logic [6:0] out_row,
  output logic [fme_pkg::NPOS-1:0] out_mask,
  output logic [7:0] out_smp [fme_pkg::NPOS][LANES],
  // mode cost unit
  input  logic cost_in_valid,
  input  logic [7:0] cost_cur [16],
  input  logic [7:0] cost_pre [16],
  input  logic [LW-1:0] cost_lambda,
  input  logic cost_is_mpm,
  output logic cost_out_valid,
  output logic [LW+15:0] cost
);
  import fme_pkg::*;

  ctl_t ctl;
  logic l1_fire, win_shift, lvl_en;

  interp_ctrl #(.MAX_ROWS(MAX_ROWS)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .in_valid, .in_ready, .busy, .done, .ctl,
    .l1_fire, .win_shift, .lvl_en, .out_valid, .out_row);

  // ---- level 1 ----
  logic [PIX_W-1:0] l1_A [LANES];
  logic signed [INT_W-1:0] l1_a [LANES], l1_b [LANES], l1_c [LANES];

  level1_hfilters #(.LANES(LANES)) u_l1 (
    .clk, .rst_n, .valid(l1_fire), .en_q(ctl.en_hq), .row_in,
    .A_o(l1_A), .a_o(l1_a), .b_o(l1_b), .c_o(l1_c));

  // ---- vertical windows ----
  logic [PIX_W-1:0] w_A [NTAPS][LANES];
  logic [INT_W-1:0] w_a [NTAPS][LANES], w_b [NTAPS][LANES], w_c [NTAPS][LANES];
  logic [INT_W-1:0] d_a [LANES], d_b [LANES], d_c [LANES];

  always_comb
    for (int x = 0; x < LANES; x++) begin
      d_a[x] = l1_a[x]; d_b[x] = l1_b[x]; d_c[x] = l1_c[x];
    end

  vtap_window #(.LANES(LANES), .W(PIX_W)) u_wA (.clk, .rst_n, .shift(win_shift), .din(l1_A), .win(w_A));
  vtap_window #(.LANES(LANES), .W(INT_W)) u_wb (.clk, .rst_n, .shift(win_shift), .din(d_b), .win(w_b));
  vtap_window #(.LANES(LANES), .W(INT_W)) u_wa (.clk, .rst_n, .shift(win_shift && ctl.en_hq), .din(d_a), .win(w_a));
  vtap_window #(.LANES(LANES), .W(INT_W)) u_wc (.clk, .rst_n, .shift(win_shift && ctl.en_hq), .din(d_c), .win(w_c));

  // ---- level 2 ----
  logic [PIX_W-1:0] e_s [LANES], p_s [LANES], g_s [LANES], r_s [LANES];
  level2_vfilters #(.LANES(LANES)) u_l2 (
    .clk, .rst_n, .en(lvl_en && ctl.en_l2), .win_a(w_a), .win_c(w_c),
    .e_o(e_s), .p_o(p_s), .g_o(g_s), .r_o(r_s));

  // ---- level 3 ----
  logic [PIX_W-1:0] hi_s [LANES], jk_s [LANES], df_s [LANES], nq_s [LANES];
  level3_vfilters #(.LANES(LANES)) u_l3 (
    .clk, .rst_n,
    .en_l(lvl_en && ctl.en_l3l), .sel_l(ctl.sel_l3l),
    .en_r(lvl_en && ctl.en_l3r), .sel_r(ctl.sel_l3r),
    .win_A(w_A), .win_a(w_a), .win_b(w_b), .win_c(w_c),
    .hi_o(hi_s), .jk_o(jk_s), .df_o(df_s), .nq_o(nq_s));

  // ---- row-0 samples of the anchor row (A, a, b, c), same timing ----
  localparam int CTR = 3;   // window index of the anchor row
  logic [PIX_W-1:0] A_s [LANES], a_s [LANES], b_s [LANES], c_s [LANES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < LANES; x++) begin
        A_s[x] <= '0; a_s[x] <= '0; b_s[x] <= '0; c_s[x] <= '0;
      end
    end else if (lvl_en) begin
      for (int x = 0; x < LANES; x++) begin
        A_s[x] <= w_A[CTR][x];
        b_s[x] <= rnd1(SUM_W'($signed(w_b[CTR][x])));
        if (ctl.en_hq) begin
          a_s[x] <= rnd1(SUM_W'($signed(w_a[CTR][x])));
          c_s[x] <= rnd1(SUM_W'($signed(w_c[CTR][x])));
        end
      end
    end
  end

  // ---- output assembly ----
  assign out_mask = ctl.mask;
  always_comb begin
    for (int x = 0; x < LANES; x++) begin
      out_smp[P_A][x] = A_s[x];
      out_smp[P_a][x] = a_s[x];
      out_smp[P_b][x] = b_s[x];
      out_smp[P_c][x] = c_s[x];
      out_smp[P_e][x] = e_s[x];
      out_smp[P_p][x] = p_s[x];
      out_smp[P_g][x] = g_s[x];
      out_smp[P_r][x] = r_s[x];
      out_smp[P_h][x] = hi_s[x];
      out_smp[P_i][x] = hi_s[x];
      out_smp[P_j][x] = jk_s[x];
      out_smp[P_k][x] = jk_s[x];
      out_smp[P_d][x] = df_s[x];
      out_smp[P_f][x] = df_s[x];
      out_smp[P_n][x] = nq_s[x];
      out_smp[P_q][x] = nq_s[x];
      for (int p = 0; p < NPOS; p++)
        if (!ctl.mask[p]) out_smp[p][x] = '0;
    end
  end

  // ---- mode cost unit ----
  satd_cost #(.LW(LW)) u_cost (
    .clk, .rst_n, .in_valid(cost_in_valid), .cur(cost_cur), .pre(cost_pre),
    .lambda(cost_lambda), .is_mpm(cost_is_mpm), .out_valid(cost_out_valid), .cost(cost));
endmodule
