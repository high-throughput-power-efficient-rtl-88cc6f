// tb_fme_interp_top - end-to-end test of the interpolator at its default
// size (8 lanes, strips of up to 64 rows), plus the mode-cost unit.
//
// Each job gets a fresh reference patch of (rows+7) x 15 pixels: random, with
// flat 0/255 areas and a high-contrast checkerboard so that rounding clips
// at both ends. The patch streams in with random stalls. Every output row is
// compared, position by position and lane by lane, with the reference
// samples; positions outside the round's mask must read 0; each row must
// come out 3 clocks after reference row y+4. Jobs: the half-pixel round and
// the quarter-pixel round for all four best-half-MV cases, at 64 rows, 1 row
// and random sizes. Counted mechanisms, each required at least once: half
// round, quarter round with i/k on and off, d/n path, f/q path, input stall,
// clip to 0, clip to 255, MPM and non-MPM cost.
module tb_fme_interp_top;
  import fme_pkg::*;
  import fme_ref_pkg::*;
  localparam int LANES = 8;
  localparam int COLS  = LANES + 7;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  job_cfg_t cfg;
  logic in_ready, busy, done, out_valid;
  logic [7:0] row_in [COLS];
  logic [6:0] out_row;
  logic [NPOS-1:0] out_mask;
  logic [7:0] out_smp [NPOS][LANES];
  logic cost_in_valid = 0, cost_is_mpm = 0, cost_out_valid;
  logic [7:0] cost_cur [16], cost_pre [16];
  logic [7:0] cost_lambda = 0;
  logic [23:0] cost;

  fme_interp_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int pic [71][COLS];
  int nxt, n_out;
  int acc_cyc [$];
  logic done_seen;
  // mechanism counters
  int m_half, m_qik_on, m_qik_off, m_dn, m_fq, m_stall, m_clip0, m_clip255, m_mpm, m_nompm;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  always @(negedge clk)
    for (int i = 0; i < COLS; i++) row_in[i] = 8'(pic[(nxt < 71) ? nxt : 70][i]);

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin acc_cyc.push_back(cyc); nxt++; end
    if (busy && in_ready && !in_valid) m_stall++;
    if (out_valid) begin
      int y;
      y = int'(out_row);
      chk("row order", y == n_out);
      chk("row latency", y + 7 < acc_cyc.size() && cyc == acc_cyc[y + 7] + 3);
      for (int x = 0; x < LANES; x++) begin
        int nb [8][8];
        for (int k = 0; k < 8; k++)
          for (int j = 0; j < 8; j++) nb[k][j] = pic[y + k][x + j];
        for (int p = 0; p < NPOS; p++) begin
          int e;
          e = out_mask[p] ? frac_sample(pos_fx(p), pos_fy(p), nb) : 0;
          checks++;
          if (int'(out_smp[p][x]) != e) begin
            failures++;
            if (failures < 20) $display("FAIL row %0d lane %0d pos %0d got %0d exp %0d",
                                        y, x, p, out_smp[p][x], e);
          end
          if (out_mask[p] && frac_sample(pos_fx(p), pos_fy(p), nb, 1) < 0) m_clip0++;
          if (out_mask[p] && frac_sample(pos_fx(p), pos_fy(p), nb, 1) > 255) m_clip255++;
        end
      end
      n_out++;
    end
    if (done) done_seen = 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_patch(int rows);
    int kind;
    for (int r = 0; r < rows + 7; r++)
      for (int c = 0; c < COLS; c++) begin
        kind = ((r / 6) + (c / 5)) % 5;
        pic[r][c] = (kind == 0) ? 255 : (kind == 1) ? 0 :
                    (kind == 2) ? (((r + c) % 2) ? 255 : 0) : int'($urandom_range(0, 255));
      end
  endtask

  task automatic run_job(round_e rnd, logic mx, logic my, int rows);
    make_patch(rows);
    @(negedge clk);
    cfg = '{rnd: rnd, mvx_nz: mx, mvy_nz: my, rows: 7'(rows)};
    start = 1;
    nxt = 0; n_out = 0; done_seen = 0; acc_cyc.delete();
    @(negedge clk);
    start = 0;
    while (!done_seen) begin
      in_valid = ($urandom_range(0, 5) != 0);
      @(negedge clk);
    end
    in_valid = 0;
    chk("all rows out", n_out == rows);
    if (rnd == ROUND_HALF) m_half++;
    else begin
      if (my) m_qik_on++; else m_qik_off++;
      if (mx) m_fq++; else m_dn++;
    end
  endtask

  int cost_q [$];
  int cost_seen;
  always @(posedge clk) if (rst_n && cost_out_valid) begin
    checks++;
    if (cost_q.size() == 0 || int'(cost) != cost_q[0]) begin
      failures++;
      $display("FAIL cost %0d (cycle %0d)", cost, cyc);
    end
    if (cost_q.size() != 0) void'(cost_q.pop_front());
    cost_seen++;
  end

  task automatic cost_test();
    int c [16], p [16];
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      cost_in_valid = ($urandom_range(0, 3) != 0);
      cost_is_mpm = 1'($urandom);
      cost_lambda = 8'($urandom);
      for (int i = 0; i < 16; i++) begin
        cost_cur[i] = 8'($urandom); cost_pre[i] = 8'($urandom);
        c[i] = cost_cur[i]; p[i] = cost_pre[i];
      end
      if (cost_in_valid) begin
        cost_q.push_back(satd4(c, p) + (cost_is_mpm ? 0 : 4 * int'(cost_lambda)));
        if (cost_is_mpm) m_mpm++; else m_nompm++;
      end
    end
    @(negedge clk) cost_in_valid = 0;
    repeat (3) @(negedge clk);
    chk("all costs out", cost_q.size() == 0 && cost_seen == m_mpm + m_nompm);
  endtask

  initial begin
    string names [10] = '{"half round", "quarter i/k on", "quarter i/k off", "d/n path", "f/q path",
                          "input stall", "clip to 0", "clip to 255", "MPM cost", "non-MPM cost"};
    int cnt [10];
    cfg = '0;
    for (int i = 0; i < 16; i++) begin cost_cur[i] = 0; cost_pre[i] = 0; end
    for (int r = 0; r < 71; r++) for (int c = 0; c < COLS; c++) pic[r][c] = 0;
    m_half = 0; m_qik_on = 0; m_qik_off = 0; m_dn = 0; m_fq = 0; m_stall = 0;
    m_clip0 = 0; m_clip255 = 0; m_mpm = 0; m_nompm = 0; cost_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one complete FME pass over a 64-row strip: half round, then quarter round
    run_job(ROUND_HALF, 0, 0, 64);
    for (int i = 0; i < 4; i++) run_job(ROUND_QUARTER, i[0], i[1], 64);
    run_job(ROUND_HALF, 0, 0, 1);
    run_job(ROUND_QUARTER, 1, 1, 1);
    for (int i = 0; i < 6; i++)
      run_job(round_e'($urandom_range(0, 1)), 1'($urandom), 1'($urandom), $urandom_range(1, 64));
    cost_test();
    cnt = '{m_half, m_qik_on, m_qik_off, m_dn, m_fq, m_stall, m_clip0, m_clip255, m_mpm, m_nompm};
    for (int i = 0; i < 10; i++) begin
      $display("mechanism %-16s : %0d", names[i], cnt[i]);
      chk({"mechanism ", names[i]}, cnt[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
