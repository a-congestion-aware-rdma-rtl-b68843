// dcqcn_rate_decrease: multiplicative rate decrease on each accepted CNP.
//
// On a CNP event, and only if at least cfg_interval cycles have passed since
// the previous accepted decrease (the cooldown that keeps one congestion
// epoch from being answered twice), the block fires dec_fire and offers
//   rc_next = R_C * (1 - alpha / 2)                                   (3)
//   rt_next = R_C (pre-CNP)   if cfg_clamp (ClampTargetRate on)       (4)
//           = R_T unchanged   otherwise
// The register holding R_C and R_T (dcqcn_module) loads these values in the
// same cycle. A CNP that arrives during the cooldown is dropped and reported
// on cnp_ignored. Equations (3)-(4), the cooldown and the clamp option are the
// document's; the exact cooldown semantics (time since the last accepted
// decrease, first CNP after reset always accepted) and the truncating
// multiply are this design's.
//
// Timing: dec_fire, rc_next and rt_next are combinational from cnp_pulse and
// the current R_C, R_T and alpha; the cooldown counter is registered.
module dcqcn_rate_decrease
  import dcqcn_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    cnp_pulse,
  input  logic    cfg_clamp,
  input  cycles_t cfg_interval,
  input  rate_t   rc,
  input  rate_t   rt,
  input  alpha_t  alpha,
  output logic    dec_fire,
  output logic    cnp_ignored,
  output rate_t   rc_next,
  output rate_t   rt_next
);

  cycles_t since_q;  // cycles since the last accepted decrease, saturating
  logic    cooled;

  // 1 - alpha/2 with ALPHA_FRAC+1 fractional bits is 2^(ALPHA_FRAC+1) - alpha.
  localparam int unsigned FW = ALPHA_FRAC + 2;
  logic [FW-1:0]        factor;
  logic [RATE_W+FW-1:0] prod;

  assign cooled      = (since_q >= cfg_interval);
  assign dec_fire    = cnp_pulse & cooled;
  assign cnp_ignored = cnp_pulse & ~cooled;

  always_comb begin
    factor  = (FW'(1) << (ALPHA_FRAC + 1)) - FW'(alpha);
    prod    = rc * factor;
    rc_next = rate_t'(prod >> (ALPHA_FRAC + 1));
    rt_next = cfg_clamp ? rc : rt;
  end

  always_ff @(posedge clk) begin
    if (rst)
      since_q <= '1;
    else if (dec_fire)
      since_q <= cycles_t'(1);
    else if (since_q != '1)
      since_q <= since_q + 1'b1;
  end

endmodule
