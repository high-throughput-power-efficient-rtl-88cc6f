// tb_level3_vfilters - builds the A, a, b, c windows from random and
// extreme 8-row pixel blocks, drives every MUX setting and enable, and checks
// h/j (left pair on A, b), i/k (on a, c), d/n (right pair on A) and f/q (on b)
// against the reference samples; disabled pairs must hold.
module tb_level3_vfilters;
  import fme_ref_pkg::*;
  localparam int LANES = 4;
  logic clk = 0, rst_n = 0, en_l = 0, sel_l = 0, en_r = 0, sel_r = 0;
  logic [7:0]  win_A [8][LANES];
  logic [15:0] win_a [8][LANES], win_b [8][LANES], win_c [8][LANES];
  logic [7:0] hi_o [LANES], jk_o [LANES], df_o [LANES], nq_o [LANES];
  int checks = 0, failures = 0;
  int exp_s [4][LANES];
  int seen [4] = '{0, 0, 0, 0};

  level3_vfilters #(.LANES(LANES)) dut (.clk, .rst_n, .en_l, .sel_l, .en_r, .sel_r,
    .win_A, .win_a, .win_b, .win_c, .hi_o, .jk_o, .df_o, .nq_o);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en_l = ($urandom_range(0, 3) != 0);  sel_l = $urandom_range(0, 1);
      en_r = ($urandom_range(0, 3) != 0);  sel_r = $urandom_range(0, 1);
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < LANES+7; i++)
          pix[k][i] = (n % 20 == 3) ? 255 : (n % 20 == 4) ? (((i + k) % 2) ? 255 : 0) :
                      (n % 20 == 5) ? ((k % 4 == 0) ? 255 : 0) : int'($urandom_range(0, 255));
      for (int x = 0; x < LANES; x++) begin
        int nb [8][8];
        for (int k = 0; k < 8; k++) begin
          int px [8];
          for (int j = 0; j < 8; j++) begin px[j] = pix[k][x+j]; nb[k][j] = pix[k][x+j]; end
          win_A[k][x] = 8'(pix[k][x+3]);
          win_a[k][x] = 16'(hsum(1, px));
          win_b[k][x] = 16'(hsum(2, px));
          win_c[k][x] = 16'(hsum(3, px));
        end
        if (en_l) begin
          exp_s[0][x] = sel_l ? frac_sample(1, 2, nb) : frac_sample(0, 2, nb);  // i : h
          exp_s[1][x] = sel_l ? frac_sample(3, 2, nb) : frac_sample(2, 2, nb);  // k : j
        end
        if (en_r) begin
          exp_s[2][x] = sel_r ? frac_sample(2, 1, nb) : frac_sample(0, 1, nb);  // f : d
          exp_s[3][x] = sel_r ? frac_sample(2, 3, nb) : frac_sample(0, 3, nb);  // q : n
        end
      end
      if (en_l) seen[sel_l]++;
      if (en_r) seen[2 + sel_r]++;
      @(posedge clk); #1;
      for (int x = 0; x < LANES; x++) begin
        cmp("h/i", int'(hi_o[x]), exp_s[0][x], x);
        cmp("j/k", int'(jk_o[x]), exp_s[1][x], x);
        cmp("d/f", int'(df_o[x]), exp_s[2][x], x);
        cmp("n/q", int'(nq_o[x]), exp_s[3][x], x);
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL MUX setting %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
