// satd_cost - mode cost for prediction mode decision.
//
// Cost = SATD + lambda(QP) * R, with SATD = sum |HT(Cur - Pre)| over a 4x4
// block, HT the 4x4 Hadamard transform, and R = 0 for the most probable mode,
// 4 otherwise. lambda(QP) is given on a port. The SATD is not halved.
// Two pipeline stages: stage 1 forms the 16 differences and the horizontal
// (row) Hadamard butterflies; stage 2 the vertical butterflies, absolute
// values, sum and rate term. A block presented with `in_valid` gives `cost`
// with `out_valid` two clocks later; a new block may enter every clock.
// Pixels are row-major, index 4*row + column.
module satd_cost #(
  parameter int LW = 8    // width of lambda
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic [7:0] cur [16],
  input  logic [7:0] pre [16],
  input  logic [LW-1:0] lambda,
  input  logic is_mpm,
  output logic out_valid,
  output logic [LW+15:0] cost
);
  // 1-D 4-point Hadamard (unnormalised, natural order).
  function automatic void had4(input  logic signed [13:0] x0, x1, x2, x3,
                               output logic signed [13:0] y0, y1, y2, y3);
    logic signed [13:0] s0, s1, d0, d1;
    s0 = x0 + x1; d0 = x0 - x1;
    s1 = x2 + x3; d1 = x2 - x3;
    y0 = s0 + s1; y1 = d0 + d1;
    y2 = s0 - s1; y3 = d0 - d1;
  endfunction

  logic signed [13:0] hrow_d [16];    // row transform of the differences
  logic signed [13:0] hrow [16];      // stage 1 register
  logic [LW-1:0] lam1;
  logic          mpm1, v1;

  always_comb
    for (int r = 0; r < 4; r++) begin
      logic signed [13:0] d [4];
      for (int c = 0; c < 4; c++)
        d[c] = 14'($signed({1'b0, cur[4*r+c]})) - 14'($signed({1'b0, pre[4*r+c]}));
      had4(d[0], d[1], d[2], d[3], hrow_d[4*r+0], hrow_d[4*r+1], hrow_d[4*r+2], hrow_d[4*r+3]);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; lam1 <= '0; mpm1 <= 1'b0;
      for (int i = 0; i < 16; i++) hrow[i] <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        lam1 <= lambda;
        mpm1 <= is_mpm;
        hrow <= hrow_d;
      end
    end
  end

  logic [15:0] satd;
  always_comb begin
    satd = '0;
    for (int c = 0; c < 4; c++) begin
      logic signed [13:0] y [4];
      had4(hrow[c], hrow[4+c], hrow[8+c], hrow[12+c], y[0], y[1], y[2], y[3]);
      for (int r = 0; r < 4; r++) begin
        logic signed [15:0] w;
        w = 16'(y[r]);
        satd += (w < 0) ? 16'(-w) : 16'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cost      <= '0;
    end else begin
      out_valid <= v1;
      if (v1) cost <= (LW+16)'(satd) + (mpm1 ? '0 : ((LW+16)'(lam1) << 2));
    end
  end
endmodule
