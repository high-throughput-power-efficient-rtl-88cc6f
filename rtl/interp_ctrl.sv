// interp_ctrl - sequencer of the reused interpolation data path.
//
// One job interpolates a LANES-wide strip of `rows` anchor rows in one round:
// the half-pixel round (b, h, j) or the quarter-pixel round around the best
// half MV (a, b, c, e, g, p, r, plus i, k when the MV's vertical component is
// nonzero, plus d, n when its horizontal component is zero or f, q when it is
// not). From the round and the MV it sets the filter enables and MUX selects
// of Fig.-3 style levels 1-3 and the mask of valid positions (ctl).
//
// Job interface (this design's choice): `start` with `cfg` while idle; then
// rows+7 reference rows (anchor rows -3 .. rows+3) are taken on a valid/ready
// handshake, one per cycle at most. Pipeline strobes follow the rows:
//   l1_fire   : row accepted, level-1 registers load
//   win_shift : one clock later, windows push that row
//   lvl_en    : window holds all eight taps of an anchor row; levels 2/3 and
//               the output stage load at the next edge
//   out_valid : the output row `out_row` is valid (3 clocks after input row
//               out_row+4 was accepted)
// `done` pulses with the last output row; `busy` is high from start to done.
// The rounds, the filters they open and the MV-dependent choices follow the
// published architecture; the job interface, handshake and FSM are this
// design's own. The assertions below use rst_n in `disable iff`, which lint
// reports as a reset used both synchronously and asynchronously; the flops
// themselves use it only as an asynchronous reset.
module interp_ctrl #(
  parameter int MAX_ROWS = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fme_pkg::job_cfg_t cfg,
  input  logic in_valid,
  output logic in_ready,
  output logic busy,
  output logic done,
  output fme_pkg::ctl_t ctl,
  output logic l1_fire,
  output logic win_shift,
  output logic lvl_en,
  output logic out_valid,
  output logic [6:0] out_row
);
  import fme_pkg::*;

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DRAIN } state_e;
  state_e   state;
  job_cfg_t job;
  logic [7:0] rows_in;     // rows accepted in this job
  logic [7:0] pushes;      // rows pushed into the windows
  logic [6:0] lvl_row;     // anchor row in the window during lvl_en

  // Control of one round, from the latched job.
  always_comb begin
    ctl = '0;
    ctl.mask[P_A] = 1'b1;
    ctl.mask[P_b] = 1'b1;
    if (job.rnd == ROUND_HALF) begin
      ctl.en_l3l  = 1'b1;             // V_F2/4 pair on A, b -> h, j
      ctl.sel_l3l = 1'b0;
      ctl.mask[P_h] = 1'b1;
      ctl.mask[P_j] = 1'b1;
    end else begin
      ctl.en_hq   = 1'b1;             // H_F1/4, H_F3/4 open
      ctl.en_l2   = 1'b1;             // e, p, g, r
      ctl.mask[P_a] = 1'b1; ctl.mask[P_c] = 1'b1;
      ctl.mask[P_e] = 1'b1; ctl.mask[P_p] = 1'b1;
      ctl.mask[P_g] = 1'b1; ctl.mask[P_r] = 1'b1;
      ctl.sel_l3l = 1'b1;             // V_F2/4 pair on a, c -> i, k
      ctl.en_l3l  = job.mvy_nz;
      ctl.mask[P_i] = job.mvy_nz;
      ctl.mask[P_k] = job.mvy_nz;
      ctl.en_l3r  = 1'b1;
      ctl.sel_l3r = job.mvx_nz;       // A -> d, n  or  b -> f, q
      ctl.mask[P_d] = !job.mvx_nz; ctl.mask[P_n] = !job.mvx_nz;
      ctl.mask[P_f] =  job.mvx_nz; ctl.mask[P_q] =  job.mvx_nz;
    end
  end

  assign busy     = (state != S_IDLE);
  assign in_ready = (state == S_RUN) && (rows_in < 8'(job.rows) + 8'd7);
  assign l1_fire  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job       <= '0;
      rows_in   <= '0;
      pushes    <= '0;
      win_shift <= 1'b0;
      lvl_en    <= 1'b0;
      lvl_row   <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      done      <= 1'b0;
    end else begin
      done      <= 1'b0;
      win_shift <= l1_fire;
      lvl_en    <= 1'b0;
      out_valid <= lvl_en;
      out_row   <= lvl_row;
      if (win_shift) begin
        pushes <= pushes + 8'd1;
        if (pushes + 8'd1 >= 8'd8) begin
          lvl_en  <= 1'b1;
          lvl_row <= 7'(pushes + 8'd1 - 8'd8);
        end
      end
      case (state)
        S_IDLE:
          if (start) begin
            state   <= S_RUN;
            job     <= cfg;
            rows_in <= '0;
            pushes  <= '0;
          end
        S_RUN: begin
          if (l1_fire) rows_in <= rows_in + 8'd1;
          if (l1_fire && rows_in + 8'd1 == 8'(job.rows) + 8'd7) state <= S_DRAIN;
        end
        S_DRAIN:
          if (lvl_en && lvl_row == job.rows - 7'd1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A job may only start while idle, and must ask for 1..MAX_ROWS rows.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_rows_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 (start && !busy) |-> (cfg.rows >= 7'd1 && int'(cfg.rows) <= MAX_ROWS));
  a_fire_ready: assert property (@(posedge clk) disable iff (!rst_n) l1_fire |-> in_ready);
endmodule
