// tb_interp_ctrl - runs jobs of every round / best-half-MV combination with
// random row counts (including 1 and 64) and random gaps in the row stream.
// Checks the filter enables, MUX selects and valid mask of each round; that
// exactly rows+7 rows are accepted; that anchor rows 0..rows-1 come out in
// order, each 3 clocks after reference row y+4 (stream index y+7) was
// accepted; that `done` comes with the last row; and that start while busy
// is never issued by a well-behaved host.
module tb_interp_ctrl;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  job_cfg_t cfg;
  logic in_ready, busy, done, l1_fire, win_shift, lvl_en, out_valid;
  ctl_t ctl;
  logic [6:0] out_row;
  int checks = 0, failures = 0, cyc = 0;
  int acc_cyc [$];
  int n_out, n_acc;
  logic done_seen;

  interp_ctrl #(.MAX_ROWS(64)) dut (.clk, .rst_n, .start, .cfg, .in_valid, .in_ready, .busy,
    .done, .ctl, .l1_fire, .win_shift, .lvl_en, .out_valid, .out_row);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin acc_cyc.push_back(cyc); n_acc++; end
    if (out_valid) begin
      chk("out_row order", int'(out_row) == n_out);
      chk("output latency", n_out + 7 < acc_cyc.size() && cyc == acc_cyc[n_out + 7] + 3);
      n_out++;
    end
    if (done) begin
      chk("done with last row", out_valid && int'(out_row) == int'(cfg.rows) - 1);
      done_seen = 1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(round_e rnd, logic mx, logic my, int rows);
    logic [15:0] m;
    @(negedge clk);
    cfg = '{rnd: rnd, mvx_nz: mx, mvy_nz: my, rows: 7'(rows)};
    start = 1;
    acc_cyc.delete(); n_out = 0; n_acc = 0; done_seen = 0;
    @(negedge clk);
    start = 0;
    // expected control, written out per round
    m = 16'b0;
    m[0] = 1; m[2] = 1;                                  // A, b
    if (rnd == ROUND_HALF) begin
      m[8] = 1; m[10] = 1;                               // h, j
      chk("half: ctl", ctl.en_hq == 0 && ctl.en_l2 == 0 && ctl.en_l3l == 1 &&
                       ctl.sel_l3l == 0 && ctl.en_l3r == 0);
    end else begin
      m[1] = 1; m[3] = 1; m[5] = 1; m[7] = 1; m[13] = 1; m[15] = 1;  // a c e g p r
      if (my) begin m[9] = 1; m[11] = 1; end             // i k
      if (mx) begin m[6] = 1; m[14] = 1; end else begin m[4] = 1; m[12] = 1; end
      chk("quarter: ctl", ctl.en_hq == 1 && ctl.en_l2 == 1 && ctl.en_l3l == my &&
                          ctl.sel_l3l == 1 && ctl.en_l3r == 1 && ctl.sel_l3r == mx);
    end
    chk("mask", ctl.mask == m);
    chk("busy", busy == 1);
    while (!done_seen) begin
      in_valid = ($urandom_range(0, 4) != 0);
      @(negedge clk);
    end
    in_valid = 0;
    chk("rows accepted", n_acc == rows + 7);
    chk("rows out", n_out == rows);
    @(negedge clk);
    chk("idle after done", busy == 0 && in_ready == 0);
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_job(ROUND_HALF, 0, 0, 64);
    run_job(ROUND_HALF, 1, 1, 1);
    for (int i = 0; i < 4; i++) run_job(ROUND_QUARTER, i[0], i[1], $urandom_range(1, 64));
    for (int i = 0; i < 10; i++)
      run_job(round_e'($urandom_range(0, 1)), 1'($urandom), 1'($urandom), $urandom_range(1, 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
