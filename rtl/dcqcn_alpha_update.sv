// dcqcn_alpha_update: the DCQCN congestion estimator alpha.
//
// alpha lies in [0, 1] and starts at 1 after reset. A free-running interval
// timer of cfg_interval cycles paces the updates. At the end of each interval
// alpha takes one step:
//   a CNP arrived during the interval:  alpha <- (1 - g) * alpha + g     (1)
//   no CNP during the interval:         alpha <- (1 - g) * alpha         (2)
// Equations (1) and (2), the gain g and the configurable update interval are
// the document's. Sampling "a CNP arrived" once per interval (rather than
// stepping on every CNP) and starting from alpha = 1 are this design's
// reading. The product g * alpha is rounded up, so that alpha decays all the
// way to zero instead of stalling at 1/g LSBs.
//
// Interface: cnp_pulse is a one-cycle CNP event from cnp_sync. alpha is the
// registered estimator (ALPHA_FRAC fractional bits), update_pulse is high in
// the cycle in which alpha takes a new value. An interval of 0 or 1 updates
// every cycle.
module dcqcn_alpha_update
  import dcqcn_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    cnp_pulse,
  input  gain_t   cfg_g,
  input  cycles_t cfg_interval,
  output alpha_t  alpha,
  output logic    update_pulse
);

  cycles_t timer_q;
  logic    cnp_seen_q;
  logic    tick;

  // g * alpha, rounded up, in alpha units.
  logic [G_FRAC+ALPHA_W-1:0] prod;
  alpha_t                    g_alpha;
  logic   [ALPHA_W:0]        next_wide;

  assign tick = (timer_q + 1'b1 >= cfg_interval);

  always_comb begin
    prod      = cfg_g * alpha;
    g_alpha   = alpha_t'((prod + ((1 << G_FRAC) - 1)) >> G_FRAC);
    next_wide = {1'b0, alpha} - {1'b0, g_alpha};
    if (cnp_seen_q || cnp_pulse)
      next_wide = next_wide + (ALPHA_W+1)'(cfg_g);  // G_FRAC == ALPHA_FRAC
    if (next_wide > (ALPHA_W+1)'(ALPHA_ONE))
      next_wide = (ALPHA_W+1)'(ALPHA_ONE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer_q      <= '0;
      cnp_seen_q   <= 1'b0;
      alpha        <= ALPHA_ONE;
      update_pulse <= 1'b0;
    end else begin
      update_pulse <= tick;
      if (tick) begin
        timer_q    <= '0;
        cnp_seen_q <= 1'b0;
        alpha      <= alpha_t'(next_wide);
      end else begin
        timer_q    <= timer_q + 1'b1;
        if (cnp_pulse) cnp_seen_q <= 1'b1;
      end
    end
  end

endmodule
