// luma_fir8 - one 8-tap HEVC luma interpolation filter.
//
// Computes sum_k coef(PHASE,k) * taps[k] for eight consecutive samples
// (horizontal neighbours for H_F filters, vertical neighbours for V_F
// filters). PHASE selects the 1/4, 2/4 or 3/4 filter, the three filter kinds
// of the data path. The output is the raw sum, gain 64, with no rounding; the
// caller decides how to scale it. Purely combinational; inputs are signed, so
// 8-bit pixels are passed zero-extended. The tap values are the HEVC standard's.
module luma_fir8 #(
  parameter int PHASE = 2,   // 1: 1/4, 2: 2/4, 3: 3/4
  parameter int IW    = 16,  // input width, signed
  parameter int OW    = 24   // output width, signed
) (
  input  logic signed [IW-1:0] taps [fme_pkg::NTAPS],
  output logic signed [OW-1:0] sum
);
  import fme_pkg::*;

  always_comb begin
    logic signed [OW-1:0] acc;
    acc = '0;
    for (int k = 0; k < NTAPS; k++)
      acc += OW'(taps[k]) * OW'(coef(PHASE, 3'(k)));
    sum = acc;
  end

  initial assert (PHASE >= 1 && PHASE <= 3) else $error("PHASE must be 1, 2 or 3");
endmodule
