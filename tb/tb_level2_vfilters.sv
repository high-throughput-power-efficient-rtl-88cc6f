// tb_level2_vfilters - builds the a and c windows from random (and extreme)
// 8-row pixel blocks, and checks e, p, g, r against the reference 2-D
// samples one clock later; checks that outputs hold while `en` is low.
module tb_level2_vfilters;
  import fme_ref_pkg::*;
  localparam int LANES = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] win_a [8][LANES], win_c [8][LANES];
  logic [7:0] e_o [LANES], p_o [LANES], g_o [LANES], r_o [LANES];
  int checks = 0, failures = 0;
  int exp_s [4][LANES];   // e, p, g, r

  level2_vfilters #(.LANES(LANES)) dut (.clk, .rst_n, .en, .win_a, .win_c, .e_o, .p_o, .g_o, .r_o);
  always #5 clk = ~clk;

  task automatic cmp(string nm, int got, int exp, int x);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s lane %0d got %0d exp %0d", nm, x, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pix [8][LANES+7];
    for (int s = 0; s < 4; s++) for (int x = 0; x < LANES; x++) exp_s[s][x] = 0;
    for (int k = 0; k < 8; k++) for (int x = 0; x < LANES; x++) begin win_a[k][x] = '0; win_c[k][x] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < LANES+7; i++)
          pix[k][i] = (n % 20 == 3) ? 255 : (n % 20 == 4) ? (((i + k) % 2) ? 255 : 0) :
                      (n % 20 == 5) ? ((i % 4 == 0 || k % 4 == 0) ? 255 : 0) : int'($urandom_range(0, 255));
      for (int x = 0; x < LANES; x++) begin
        int nb [8][8];
        for (int k = 0; k < 8; k++) begin
          int px [8];
          for (int j = 0; j < 8; j++) begin px[j] = pix[k][x+j]; nb[k][j] = pix[k][x+j]; end
          win_a[k][x] = 16'(hsum(1, px));
          win_c[k][x] = 16'(hsum(3, px));
        end
        if (en) begin
          exp_s[0][x] = frac_sample(1, 1, nb);   // e
          exp_s[1][x] = frac_sample(1, 3, nb);   // p
          exp_s[2][x] = frac_sample(3, 1, nb);   // g
          exp_s[3][x] = frac_sample(3, 3, nb);   // r
        end
      end
      @(posedge clk); #1;
      for (int x = 0; x < LANES; x++) begin
        cmp("e", int'(e_o[x]), exp_s[0][x], x);
        cmp("p", int'(p_o[x]), exp_s[1][x], x);
        cmp("g", int'(g_o[x]), exp_s[2][x], x);
        cmp("r", int'(r_o[x]), exp_s[3][x], x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
