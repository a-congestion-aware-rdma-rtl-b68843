// dcqcn_module: the DCQCN reaction point, holding alpha, R_C and R_T.
//
// The raw CNP reception signal from the inbound MAC path goes through the
// rising-edge synchronizer (cnp_sync) and, while the block is enabled, feeds
// three concurrent sub-processes:
//   * dcqcn_alpha_update   - the congestion estimator alpha, eq. (1)-(2);
//   * dcqcn_rate_decrease  - R_C <- R_C (1 - alpha/2) and the optional
//                            R_T clamp on each CNP, with a cooldown;
//   * dcqcn_rate_increase  - Fast Recovery / Additive / Hyper-Additive
//                            Increase on timer and byte-counter events.
// This module owns the R_C and R_T registers. An accepted CNP has priority over
// a recovery event in the same cycle. Both rates start at the line rate after
// reset, so the sender is unconstrained until the first CNP. The partition
// into the three sub-processes and the rising-edge synchronizer follow the
// document; the reset values, the priority rule and the CNP counter are this
// design's.
//
// Interface: cnp_in is the level from the MAC path; tx_bytes is the number of
// payload bytes leaving the rate limiter this cycle (feeds the byte counter);
// cfg holds the run-time parameters; status exports R_C, R_T, alpha, F and the
// number of CNPs seen. The ev_* outputs are one-cycle event strobes for
// monitoring. R_C changes on the clock edge that ends the cycle in which
// ev_dec or ev_inc is high.
module dcqcn_module
  import dcqcn_pkg::*;
#(
  parameter int unsigned TXB_W       = 8,
  parameter rate_t       LINE_RATE   = rate_t'(8) << RATE_FRAC,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cnp_in,
  input  logic [TXB_W-1:0] tx_bytes,
  input  dcqcn_cfg_t       cfg,
  output rate_t            rc,
  output dcqcn_status_t    status,
  output logic             ev_cnp,
  output logic             ev_dec,
  output logic             ev_ignored,
  output logic             ev_inc,
  output logic             ev_timer,
  output logic             ev_byte,
  output phase_e           ev_phase,
  output logic             ev_alpha
);

  logic   cnp_pulse_raw;
  logic   cnp_pulse;
  alpha_t alpha;
  rate_t  rt;
  rate_t  rc_dec, rt_dec, rc_inc, rt_inc;
  stage_t stage;
  logic [31:0] cnp_count_q;

  cnp_sync #(.SYNC_STAGES(SYNC_STAGES)) u_sync (
    .clk, .rst, .cnp_in, .cnp_pulse(cnp_pulse_raw)
  );

  assign cnp_pulse = cnp_pulse_raw & cfg.enable;
  assign ev_cnp    = cnp_pulse;

  dcqcn_alpha_update u_alpha (
    .clk, .rst, .cnp_pulse,
    .cfg_g(cfg.g), .cfg_interval(cfg.alpha_interval),
    .alpha, .update_pulse(ev_alpha)
  );

  dcqcn_rate_decrease u_dec (
    .clk, .rst, .cnp_pulse,
    .cfg_clamp(cfg.clamp_target), .cfg_interval(cfg.dec_interval),
    .rc, .rt, .alpha,
    .dec_fire(ev_dec), .cnp_ignored(ev_ignored),
    .rc_next(rc_dec), .rt_next(rt_dec)
  );

  dcqcn_rate_increase #(.TXB_W(TXB_W), .LINE_RATE(LINE_RATE)) u_inc (
    .clk, .rst, .dec_fire(ev_dec), .tx_bytes,
    .cfg_interval(cfg.inc_interval), .cfg_byte_threshold(cfg.byte_threshold),
    .cfg_f_threshold(cfg.f_threshold), .cfg_r_ai(cfg.r_ai), .cfg_r_hai(cfg.r_hai),
    .rc, .rt,
    .inc_fire(ev_inc), .timer_fire(ev_timer), .byte_fire(ev_byte),
    .phase(ev_phase), .stage,
    .rc_next(rc_inc), .rt_next(rt_inc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rc          <= LINE_RATE;
      rt          <= LINE_RATE;
      cnp_count_q <= '0;
    end else begin
      if (ev_dec) begin
        rc <= rc_dec;
        rt <= rt_dec;
      end else if (ev_inc) begin
        rc <= rc_inc;
        rt <= rt_inc;
      end
      if (cnp_pulse) cnp_count_q <= cnp_count_q + 1'b1;
    end
  end

  assign status = '{rc: rc, rt: rt, alpha: alpha, f: stage, cnp_count: cnp_count_q};

  // R_C never exceeds the target it recovers towards, nor the line rate.
  a_rate_order: assert property (@(posedge clk) disable iff (rst) rc <= rt && rt <= LINE_RATE);

endmodule
