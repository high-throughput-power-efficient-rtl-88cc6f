// tb_luma_fir8 - checks the three filter phases against the reference taps,
// on random signed inputs over the whole intermediate range and on all-255
// and alternating extreme rows.
module tb_luma_fir8;
  import fme_ref_pkg::*;
  localparam int IW = 16, OW = 24;
  logic signed [IW-1:0] taps [8];
  logic signed [OW-1:0] s1, s2, s3;
  int checks = 0, failures = 0;

  luma_fir8 #(.PHASE(1), .IW(IW), .OW(OW)) u1 (.taps, .sum(s1));
  luma_fir8 #(.PHASE(2), .IW(IW), .OW(OW)) u2 (.taps, .sum(s2));
  luma_fir8 #(.PHASE(3), .IW(IW), .OW(OW)) u3 (.taps, .sum(s3));

  task automatic check();
    int px [8];
    int got [3];
    for (int k = 0; k < 8; k++) px[k] = int'(taps[k]);
    got = '{int'(s1), int'(s2), int'(s3)};
    for (int ph = 1; ph <= 3; ph++) begin
      checks++;
      if (got[ph-1] != hsum(ph, px)) begin
        failures++;
        $display("FAIL phase %0d got %0d exp %0d", ph, got[ph-1], hsum(ph, px));
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 8; k++)
        taps[k] = (n < 1000) ? IW'($urandom_range(0, 255)) : IW'(int'($urandom_range(0, 28560)) - 6120);
      #1 check();
    end
    for (int k = 0; k < 8; k++) taps[k] = 255;
    #1 check();
    for (int k = 0; k < 8; k++) taps[k] = (k % 2) ? 255 : 0;
    #1 check();
    for (int k = 0; k < 8; k++) taps[k] = (k == 3 || k == 4) ? 16'sd22440 : -16'sd6120;
    #1 check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
