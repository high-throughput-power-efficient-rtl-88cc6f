// tb_fme_cu64_search - a complete fractional motion search of one 64x64
// coding unit through the top module at its default size.
//
// The current block is made by interpolating a reference area at a known
// quarter-pel offset (tx, ty), |tx|, |ty| <= 3 quarter pixels, plus mild noise
// on some trials. The search then runs as an encoder would:
//  1. half round: 9 strips of 8 anchor columns (-1 .. 70) and anchor rows
//     -1 .. 63 (jobs of 64 and 1 rows) produce A, b, h, j;
//  2. the 9 half candidates (0, +-1/2 in x and y) are scored with the top's
//     SATD unit over the 256 4x4 blocks of the CU, and the best is kept;
//  3. quarter round over the same strips with mvx_nz / mvy_nz of that best
//     half MV;
//  4. the 8 quarter candidates around it (plus the centre) are scored again.
// Every candidate sample must come from a position the round marked valid.
// The costs of every candidate are compared with a reference-model search,
// and the winner must be the known offset whenever it lies among the quarter
// candidates of the chosen half MV.
module tb_fme_cu64_search;
  import fme_pkg::*;
  import fme_ref_pkg::*;
  localparam int LANES = 8;
  localparam int COLS  = LANES + 7;
  localparam int OFS   = 8;          // array index = coordinate + OFS
  localparam int N     = 64;         // CU size
  localparam int NSTRIP = 9;         // anchor columns -1 .. 70

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  job_cfg_t cfg;
  logic in_ready, busy, done, out_valid;
  logic [7:0] row_in [COLS];
  logic [6:0] out_row;
  logic [NPOS-1:0] out_mask;
  logic [7:0] out_smp [NPOS][LANES];
  logic cost_in_valid = 0, cost_is_mpm = 1, cost_out_valid;
  logic [7:0] cost_cur [16], cost_pre [16];
  logic [7:0] cost_lambda = 0;
  logic [23:0] cost;

  fme_interp_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int refp [N+2*OFS+8][N+2*OFS+8];        // reference area
  int cur  [N][N];
  // interpolated samples per round: [pos][row+OFS][col+OFS]
  int smp  [2][NPOS][N+OFS+2][N+OFS+8];
  logic [NPOS-1:0] rmask [2];
  // job streaming state
  int job_x0, job_y0, nxt, rnd_i;
  logic done_seen;
  int found_true, trials;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(negedge clk)
    for (int i = 0; i < COLS; i++)
      row_in[i] = 8'(refp[job_y0 - 3 + nxt + OFS][job_x0 - 3 + i + OFS]);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nxt++;
    if (out_valid) begin
      rmask[rnd_i] = out_mask;
      for (int p = 0; p < NPOS; p++)
        for (int x = 0; x < LANES; x++)
          smp[rnd_i][p][job_y0 + int'(out_row) + OFS][job_x0 + x + OFS] = int'(out_smp[p][x]);
    end
    if (done) done_seen = 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(round_e rnd, logic mx, logic my, int x0, int y0, int rows);
    @(negedge clk);
    job_x0 = x0; job_y0 = y0; nxt = 0; done_seen = 0;
    cfg = '{rnd: rnd, mvx_nz: mx, mvy_nz: my, rows: 7'(rows)};
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done_seen) begin
      in_valid = ($urandom_range(0, 7) != 0);
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic run_round(round_e rnd, logic mx, logic my);
    rnd_i = (rnd == ROUND_HALF) ? 0 : 1;
    for (int s = 0; s < NSTRIP; s++) begin
      run_job(rnd, mx, my, -1 + 8 * s, -1, 64);
      run_job(rnd, mx, my, -1 + 8 * s, 63, 1);
    end
  endtask

  // Sample of candidate (mx, my) (quarter pel) for current pixel (u, v),
  // taken from the stored round outputs; `ok` clears if it was not produced.
  function automatic int cand_smp(int mx, int my, int u, int v, ref logic ok);
    int x, y, ax, ay, fx, fy, p, r;
    x = 4 * u + mx; y = 4 * v + my;
    ax = (x >= 0) ? x / 4 : -((-x + 3) / 4);
    ay = (y >= 0) ? y / 4 : -((-y + 3) / 4);
    fx = x - 4 * ax; fy = y - 4 * ay;
    p = 4 * fy + fx;
    r = (fx % 2 == 0 && fy % 2 == 0) ? 0 : 1;   // A, b, h, j from the half round
    if (!rmask[r][p]) ok = 0;
    return smp[r][p][ay + OFS][ax + OFS];
  endfunction

  // Reference sample of candidate (mx, my) for current pixel (u, v).
  function automatic int ref_smp(int mx, int my, int u, int v);
    int x, y, ax, ay, nb [8][8];
    x = 4 * u + mx; y = 4 * v + my;
    ax = (x >= 0) ? x / 4 : -((-x + 3) / 4);
    ay = (y >= 0) ? y / 4 : -((-y + 3) / 4);
    for (int k = 0; k < 8; k++)
      for (int j = 0; j < 8; j++) nb[k][j] = refp[ay - 3 + k + OFS][ax - 3 + j + OFS];
    return frac_sample(x - 4 * ax, y - 4 * ay, nb);
  endfunction

  // Cost of one candidate: sum of the DUT's SATD over the 256 4x4 blocks.
  task automatic dut_cost(int mx, int my, output int total, output logic ok);
    int q [$];
    int n_in;
    total = 0; ok = 1; n_in = 0;
    fork
      begin
        for (int b = 0; b < (N / 4) * (N / 4); b++) begin
          @(negedge clk);
          cost_in_valid = 1;
          for (int i = 0; i < 16; i++) begin
            int u, v;
            u = 4 * (b % (N / 4)) + i % 4;
            v = 4 * (b / (N / 4)) + i / 4;
            cost_cur[i] = 8'(cur[v][u]);
            cost_pre[i] = 8'(cand_smp(mx, my, u, v, ok));
          end
        end
        @(negedge clk) cost_in_valid = 0;
      end
      begin
        while (n_in < (N / 4) * (N / 4)) begin
          @(posedge clk);
          if (cost_out_valid) begin total += int'(cost); n_in++; end
        end
      end
    join
  endtask

  function automatic int ref_cost(int mx, int my);
    int t = 0;
    for (int b = 0; b < (N / 4) * (N / 4); b++) begin
      int c [16], p [16];
      for (int i = 0; i < 16; i++) begin
        int u, v;
        u = 4 * (b % (N / 4)) + i % 4;
        v = 4 * (b / (N / 4)) + i / 4;
        c[i] = cur[v][u];
        p[i] = ref_smp(mx, my, u, v);
      end
      t += satd4(c, p);
    end
    return t;
  endfunction

  task automatic search(int tx, int ty, int noise);
    int best_hx, best_hy, best_c, best_qx, best_qy, c, rc, rbest, rbx, rby;
    logic ok;
    // reference area: smooth ramps plus texture
    for (int r = 0; r < N + 2 * OFS + 8; r++)
      for (int cc = 0; cc < N + 2 * OFS + 8; cc++) begin
        int v;
        v = 128 + (r * 3 + cc * 2) % 60 - 30 + int'($urandom_range(0, 40)) - 20
            + (((r / 8) + (cc / 8)) % 2) * 40;
        refp[r][cc] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    for (int v = 0; v < N; v++)
      for (int u = 0; u < N; u++) begin
        int s;
        s = ref_smp(tx, ty, u, v) + ((noise != 0) ? int'($urandom_range(0, 2)) - 1 : 0);
        cur[v][u] = (s < 0) ? 0 : (s > 255) ? 255 : s;
      end
    // half round and half-pel decision
    run_round(ROUND_HALF, 0, 0);
    best_c = -1; rbest = -1; best_hx = 0; best_hy = 0; rbx = 0; rby = 0;
    for (int hy = -2; hy <= 2; hy += 2)
      for (int hx = -2; hx <= 2; hx += 2) begin
        dut_cost(hx, hy, c, ok);
        rc = ref_cost(hx, hy);
        chk("half candidate samples produced", ok);
        chk("half candidate cost", c == rc);
        if (best_c < 0 || c < best_c) begin best_c = c; best_hx = hx; best_hy = hy; end
        if (rbest < 0 || rc < rbest) begin rbest = rc; rbx = hx; rby = hy; end
      end
    chk("half decision matches reference", best_hx == rbx && best_hy == rby);
    // quarter round around the best half MV
    run_round(ROUND_QUARTER, best_hx != 0, best_hy != 0);
    best_qx = best_hx; best_qy = best_hy;
    rbest = best_c; rbx = best_hx; rby = best_hy;
    for (int qy = -1; qy <= 1; qy++)
      for (int qx = -1; qx <= 1; qx++) begin
        if (qx == 0 && qy == 0) continue;
        dut_cost(best_hx + qx, best_hy + qy, c, ok);
        rc = ref_cost(best_hx + qx, best_hy + qy);
        chk("quarter candidate samples produced", ok);
        chk("quarter candidate cost", c == rc);
        if (c < best_c) begin best_c = c; best_qx = best_hx + qx; best_qy = best_hy + qy; end
        if (rc < rbest) begin rbest = rc; rbx = best_hx + qx; rby = best_hy + qy; end
      end
    chk("quarter decision matches reference", best_qx == rbx && best_qy == rby);
    trials++;
    if (noise == 0 && tx >= best_hx - 1 && tx <= best_hx + 1 && ty >= best_hy - 1 && ty <= best_hy + 1) begin
      chk("true offset found", best_qx == tx && best_qy == ty);
      found_true++;
    end
    $display("offset (%0d,%0d)/4: best half (%0d,%0d)/4, best quarter (%0d,%0d)/4, SATD %0d",
             tx, ty, best_hx, best_hy, best_qx, best_qy, best_c);
  endtask

  initial begin
    cfg = '0;
    for (int i = 0; i < 16; i++) begin cost_cur[i] = 0; cost_pre[i] = 0; end
    found_true = 0; trials = 0; rnd_i = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    search(1, -1, 0);     // quarter offset next to the integer position
    search(2, 3, 0);      // around a half position
    search(-3, 2, 0);
    search(0, 0, 1);      // integer offset with noise
    checks++;
    if (found_true == 0) begin failures++; $display("FAIL true offset never reachable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
