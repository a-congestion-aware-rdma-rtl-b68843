// dcqcn_pkg: types and constants shared by the DCQCN reaction-point modules.
//
// Number formats (a choice of this design; the document gives the quantities
// but not their encodings):
//   * Rates (R_C, R_T, R_AI, R_HAI) are in bytes per clock cycle, unsigned
//     fixed point with RATE_FRAC fractional bits. With the 64-bit datapath at
//     156.25 MHz the 10 Gb/s line rate is 8 bytes/cycle = 8 << RATE_FRAC.
//     A rate in MB/s converts as value = MBps * 1e6 / f_clk * 2**RATE_FRAC.
//     In this unit the credit accumulator of the rate limiter adds R_C directly,
//     which is the document's R_C / f_clk bytes per cycle.
//   * alpha is unsigned fixed point with ALPHA_FRAC fractional bits and one
//     integer bit, so that alpha = 1.0 (its reset value) is representable.
//   * The gain g is a pure fraction with G_FRAC fractional bits.
//   * Intervals are counted in clock cycles, the byte threshold in bytes.
package dcqcn_pkg;

  parameter int unsigned RATE_W     = 24;
  parameter int unsigned RATE_FRAC  = 20;
  parameter int unsigned ALPHA_FRAC = 16;
  parameter int unsigned ALPHA_W    = ALPHA_FRAC + 1;
  parameter int unsigned G_FRAC     = 16;
  parameter int unsigned TIMER_W    = 32;
  parameter int unsigned BYTES_W    = 32;
  parameter int unsigned F_W        = 8;

  typedef logic [RATE_W-1:0]  rate_t;
  typedef logic [ALPHA_W-1:0] alpha_t;
  typedef logic [G_FRAC-1:0]  gain_t;
  typedef logic [TIMER_W-1:0] cycles_t;
  typedef logic [BYTES_W-1:0] bytes_t;
  typedef logic [F_W-1:0]     stage_t;

  localparam alpha_t ALPHA_ONE = alpha_t'(1) << ALPHA_FRAC;

  // Recovery phase selected by the stage counter F.
  typedef enum logic [1:0] {
    PHASE_FR  = 2'd0,  // Fast Recovery:            R_C <- (R_C + R_T) / 2
    PHASE_AI  = 2'd1,  // Additive Increase:        R_T += R_AI, then halve
    PHASE_HAI = 2'd2   // Hyper-Additive Increase:  R_T += R_HAI, then halve
  } phase_e;

  // Run-time programmable DCQCN parameters (one register each).
  typedef struct packed {
    logic    enable;          // 0: rate limiter passes traffic, CNPs ignored
    logic    clamp_target;    // ClampTargetRate option
    gain_t   g;               // alpha gain
    rate_t   r_ai;            // additive increment
    rate_t   r_hai;           // hyper-additive increment
    cycles_t alpha_interval;  // alpha-update interval
    cycles_t dec_interval;    // rate-decrease interval (CNP cooldown)
    cycles_t inc_interval;    // rate-increase timer period
    bytes_t  byte_threshold;  // byte-counter threshold
    stage_t  f_threshold;     // stage-counter transition threshold
  } dcqcn_cfg_t;

  // Live state exported for monitoring.
  typedef struct packed {
    rate_t   rc;
    rate_t   rt;
    alpha_t  alpha;
    stage_t  f;
    logic [31:0] cnp_count;
  } dcqcn_status_t;

  // Convert a quantity given per microsecond into clock cycles, rounded.
  function automatic cycles_t us_to_cycles(real us, real clk_hz);
    return cycles_t'($rtoi(us * clk_hz / 1.0e6 + 0.5));
  endfunction

  // Convert a rate in MB/s (1e6 bytes/s) into the fixed-point rate unit.
  function automatic rate_t mbps_to_rate(real mbytes_per_s, real clk_hz);
    return rate_t'($rtoi(mbytes_per_s * 1.0e6 / clk_hz * (2.0 ** RATE_FRAC) + 0.5));
  endfunction

endpackage
