// tb_satd_cost - random, identical and extreme 4x4 blocks, one per clock with
// gaps; checks every cost against SATD (matrix reference) + 4*lambda for
// non-MPM modes, and that each result appears exactly two clocks after entry.
module tb_satd_cost;
  import fme_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, is_mpm = 0;
  logic [7:0] cur [16], pre [16];
  logic [7:0] lambda = 0;
  logic out_valid;
  logic [23:0] cost;
  int checks = 0, failures = 0;
  int expq [$];
  int exp_t [$];
  int cyc = 0;

  satd_cost #(.LW(8)) dut (.clk, .rst_n, .in_valid, .cur, .pre, .lambda, .is_mpm, .out_valid, .cost);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      int e, t;
      e = expq.pop_front();
      t = exp_t.pop_front();
      if (int'(cost) != e || cyc != t + 2) begin
        failures++;
        $display("FAIL cost %0d exp %0d at cycle %0d, entered %0d", cost, e, cyc, t);
      end
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) begin cur[i] = 0; pre[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int c [16], p [16];
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      is_mpm = $urandom_range(0, 1);
      lambda = 8'($urandom);
      for (int i = 0; i < 16; i++) begin
        cur[i] = (n % 10 == 1) ? 8'd255 : 8'($urandom);
        pre[i] = (n % 10 == 1) ? 8'd0 : (n % 10 == 2) ? cur[i] : 8'($urandom);
        if (n % 10 == 3) begin cur[i] = (i % 2) ? 8'd255 : 8'd0; pre[i] = 8'd255 - cur[i]; end
        c[i] = cur[i]; p[i] = pre[i];
      end
      if (in_valid) begin
        expq.push_back(satd4(c, p) + (is_mpm ? 0 : 4 * int'(lambda)));
        exp_t.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
