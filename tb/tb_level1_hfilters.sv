// tb_level1_hfilters - drives random and extreme reference rows and checks
// the registered a, b, c (raw horizontal sums) and A one clock later; checks
// that a and c hold while H_F1/4, H_F3/4 are closed and that nothing moves
// without `valid`.
module tb_level1_hfilters;
  import fme_ref_pkg::*;
  localparam int LANES = 8;
  logic clk = 0, rst_n = 0, valid = 0, en_q = 0;
  logic [7:0] row_in [LANES+7];
  logic [7:0] A_o [LANES];
  logic signed [15:0] a_o [LANES], b_o [LANES], c_o [LANES];
  int checks = 0, failures = 0;
  int expA [LANES], expa [LANES], expb [LANES], expc [LANES];

  level1_hfilters #(.LANES(LANES)) dut (.clk, .rst_n, .valid, .en_q, .row_in, .A_o, .a_o, .b_o, .c_o);
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
    for (int i = 0; i < LANES+7; i++) row_in[i] = '0;
    for (int x = 0; x < LANES; x++) begin expA[x] = 0; expa[x] = 0; expb[x] = 0; expc[x] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      en_q  = (n >= 100) && ($urandom_range(0, 1) == 1);
      for (int i = 0; i < LANES+7; i++)
        row_in[i] = (n % 50 == 7) ? 8'd255 : (n % 50 == 8) ? ((i % 2) ? 8'd255 : 8'd0) : 8'($urandom);
      if (valid)
        for (int x = 0; x < LANES; x++) begin
          int px [8];
          for (int k = 0; k < 8; k++) px[k] = row_in[x+k];
          expA[x] = row_in[x+3];
          expb[x] = hsum(2, px);
          if (en_q) begin expa[x] = hsum(1, px); expc[x] = hsum(3, px); end
        end
      @(posedge clk); #1;
      for (int x = 0; x < LANES; x++) begin
        cmp("A", int'(A_o[x]), expA[x], x);
        cmp("a", int'(a_o[x]), expa[x], x);
        cmp("b", int'(b_o[x]), expb[x], x);
        cmp("c", int'(c_o[x]), expc[x], x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
