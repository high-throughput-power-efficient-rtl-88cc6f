// level1_hfilters - level 1 of the reused interpolation data path.
//
// Three horizontal filters, H_F1/4, H_F2/4 and H_F3/4, each LANES columns
// wide, filter one row of integer reference pixels into the horizontal
// quarter, half and three-quarter samples a, b and c of that row. The row
// enters as LANES+7 pixels, columns -3 .. LANES+3 relative to the first anchor
// column, so lane x sees pixels x-3 .. x+4.
//
// In the half-pixel round only H_F2/4 is open: the a and c registers keep
// their value (en_q low), so those filters do not toggle. In the quarter round
// all three are open. Outputs are registered: a row presented with `valid`
// appears on a_o/b_o/c_o and A_o (the integer pixel of each lane, delayed to
// line up) one clock later. The sums are kept unscaled as 16-bit signed
// intermediates (the rule for 8-bit video).
module level1_hfilters #(
  parameter int LANES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic en_q,
  input  logic [fme_pkg::PIX_W-1:0] row_in [LANES+7],
  output logic [fme_pkg::PIX_W-1:0] A_o [LANES],
  output logic signed [fme_pkg::INT_W-1:0] a_o [LANES],
  output logic signed [fme_pkg::INT_W-1:0] b_o [LANES],
  output logic signed [fme_pkg::INT_W-1:0] c_o [LANES]
);
  import fme_pkg::*;

  logic signed [INT_W-1:0] s1 [LANES];
  logic signed [INT_W-1:0] s2 [LANES];
  logic signed [INT_W-1:0] s3 [LANES];

  for (genvar x = 0; x < LANES; x++) begin : g_lane
    logic signed [INT_W-1:0] t [NTAPS];
    always_comb
      for (int k = 0; k < NTAPS; k++) t[k] = INT_W'({1'b0, row_in[x+k]});
    luma_fir8 #(.PHASE(1), .IW(INT_W), .OW(INT_W)) u_hf1 (.taps(t), .sum(s1[x]));
    luma_fir8 #(.PHASE(2), .IW(INT_W), .OW(INT_W)) u_hf2 (.taps(t), .sum(s2[x]));
    luma_fir8 #(.PHASE(3), .IW(INT_W), .OW(INT_W)) u_hf3 (.taps(t), .sum(s3[x]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < LANES; x++) begin
        A_o[x] <= '0; a_o[x] <= '0; b_o[x] <= '0; c_o[x] <= '0;
      end
    end else if (valid) begin
      for (int x = 0; x < LANES; x++) begin
        A_o[x] <= row_in[x+3];
        b_o[x] <= s2[x];
        if (en_q) begin
          a_o[x] <= s1[x];
          c_o[x] <= s3[x];
        end
      end
    end
  end
endmodule
