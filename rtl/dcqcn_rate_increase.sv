// dcqcn_rate_increase: DCQCN recovery (rate increase) process.
//
// Two independent triggers produce recovery events:
//   * a timer that fires periodically, every cfg_interval cycles, whatever
//     the CNPs do (held at zero while cfg_interval is 0, which disables it), and
//   * a byte counter that fires once cfg_byte_threshold bytes have left the
//     rate limiter since the last accepted CNP (dec_fire) or its own firing.
// Each recovery event applies one rate update chosen by the stage counter F
// (its value before the event) and then increments F; F returns to 0 on
// every accepted CNP:
//   F <  T            Fast Recovery:    R_C <- (R_C + R_T) / 2
//   T <= F < 2T       Additive Incr.:   R_T <- R_T + R_AI,  then R_C <- (R_C + R_T) / 2
//   F >= 2T           Hyper-Additive:   R_T <- R_T + R_HAI, then R_C <- (R_C + R_T) / 2
// with T = cfg_f_threshold. The two triggers (a periodic timer, a byte count
// since the last CNP), F, its reset on CNP and the three update rules are the
// document's. Leaving the timer running through CNPs is how this design reads
// "periodically"; many DCQCN implementations restart it on every CNP instead.
// The document gives one stage-counter threshold only; taking 2T as the start of Hyper-Additive Increase, merging
// simultaneous timer and byte firings into one event, saturating R_T at the
// line rate and letting a zero interval or threshold disable its trigger are
// this design's choices.
//
// Interface: tx_bytes is the number of payload bytes the rate limiter moved
// in this cycle. inc_fire, rc_next and rt_next are combinational; the owner of
// R_C and R_T loads them when inc_fire is high. inc_fire is suppressed in a
// cycle with dec_fire, which takes precedence.
module dcqcn_rate_increase
  import dcqcn_pkg::*;
#(
  parameter int unsigned TXB_W     = 8,
  parameter rate_t       LINE_RATE = rate_t'(8) << RATE_FRAC
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             dec_fire,
  input  logic [TXB_W-1:0] tx_bytes,
  input  cycles_t          cfg_interval,
  input  bytes_t           cfg_byte_threshold,
  input  stage_t           cfg_f_threshold,
  input  rate_t            cfg_r_ai,
  input  rate_t            cfg_r_hai,
  input  rate_t            rc,
  input  rate_t            rt,
  output logic             inc_fire,
  output logic             timer_fire,
  output logic             byte_fire,
  output phase_e           phase,
  output stage_t           stage,
  output rate_t            rc_next,
  output rate_t            rt_next
);

  cycles_t timer_q;
  bytes_t  bytes_q;
  bytes_t  bytes_sum;

  logic [RATE_W:0] rt_sum;
  logic [RATE_W:0] rc_sum;
  rate_t           incr;
  rate_t           rt_new;

  assign bytes_sum  = bytes_q + bytes_t'(tx_bytes);
  assign timer_fire = (cfg_interval != '0) && (timer_q + 1'b1 >= cfg_interval);
  assign byte_fire  = (cfg_byte_threshold != '0) && (bytes_sum >= cfg_byte_threshold);
  assign inc_fire   = (timer_fire | byte_fire) & ~dec_fire;

  always_comb begin
    if (stage < cfg_f_threshold)
      phase = PHASE_FR;
    else if ({1'b0, stage} < {cfg_f_threshold, 1'b0})
      phase = PHASE_AI;
    else
      phase = PHASE_HAI;

    unique case (phase)
      PHASE_AI:  incr = cfg_r_ai;
      PHASE_HAI: incr = cfg_r_hai;
      default:   incr = '0;
    endcase

    rt_sum = {1'b0, rt} + {1'b0, incr};
    if (rt_sum > {1'b0, LINE_RATE})
      rt_new = LINE_RATE;
    else
      rt_new = rt_sum[RATE_W-1:0];

    rc_sum  = {1'b0, rc} + {1'b0, rt_new};
    rc_next = rc_sum[RATE_W:1];
    rt_next = rt_new;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer_q <= '0;
      bytes_q <= '0;
      stage   <= '0;
    end else begin
      timer_q <= (timer_fire || cfg_interval == '0) ? '0 : timer_q + 1'b1;
      if (dec_fire) begin
        bytes_q <= '0;
        stage   <= '0;
      end else begin
        bytes_q <= byte_fire ? '0 : bytes_sum;
        if (inc_fire && stage != '1)
          stage <= stage + 1'b1;
      end
    end
  end

endmodule
