// tb_dcqcn_rate_decrease: self-checking test of the CNP rate-decrease process.
//
// Drives random R_C, R_T, alpha and CNP events. For every CNP it predicts
// whether the cooldown has elapsed (cycles since the last accepted CNP at
// least cfg_interval, the first CNP always accepted) and checks dec_fire and
// cnp_ignored. For accepted CNPs it checks R_C (1 - alpha/2) against a
// real-valued computation (within one LSB) and the R_T clamp for both
// settings of ClampTargetRate.
module tb_dcqcn_rate_decrease;
  import dcqcn_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  logic    cnp_pulse;
  logic    cfg_clamp;
  cycles_t cfg_interval;
  rate_t   rc, rt;
  alpha_t  alpha;
  logic    dec_fire, cnp_ignored;
  rate_t   rc_next, rt_next;
  int      checks = 0, failures = 0;

  dcqcn_rate_decrease dut (.clk, .rst, .cnp_pulse, .cfg_clamp, .cfg_interval,
                           .rc, .rt, .alpha, .dec_fire, .cnp_ignored, .rc_next, .rt_next);

  always #5 clk = ~clk;

  int  since = -1;  // -1: no CNP accepted yet
  int  n_fire = 0, n_ign = 0, n_clamp = 0, n_noclamp = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; cnp_pulse = 1'b0; cfg_clamp = 1'b1; cfg_interval = cycles_t'(50);
    rc = '0; rt = '0; alpha = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      bit  exp_fire;
      real want;
      @(negedge clk);
      rt        = rate_t'($urandom_range(0, 8 << RATE_FRAC));
      rc        = rate_t'($urandom_range(0, int'(rt)));
      alpha     = alpha_t'($urandom_range(0, 1 << ALPHA_FRAC));
      cnp_pulse = ($urandom_range(0, 15) == 0);
      if (i == 10000) cfg_clamp = 1'b0;
      if (i == 15000) cfg_interval = cycles_t'(3);
      #1;
      exp_fire = cnp_pulse && (since < 0 || since >= int'(cfg_interval));
      checks++;
      if (dec_fire !== exp_fire || cnp_ignored !== (cnp_pulse && !exp_fire)) begin
        failures++;
        $display("FAIL i=%0d fire=%0b ign=%0b expected fire=%0b since=%0d", i, dec_fire, cnp_ignored, exp_fire, since);
      end
      if (exp_fire) begin
        n_fire++;
        want = real'(rc) * (1.0 - real'(alpha) / 131072.0);
        checks++;
        if (real'(rc_next) > want + 0.001 || real'(rc_next) < want - 1.001) begin
          failures++; $display("FAIL rc=%0d alpha=%0d rc_next=%0d want %f", rc, alpha, rc_next, want);
        end
        checks++;
        if (rt_next !== (cfg_clamp ? rc : rt)) begin
          failures++; $display("FAIL rt_next=%0d clamp=%0b", rt_next, cfg_clamp);
        end
        if (cfg_clamp) n_clamp++; else n_noclamp++;
      end
      if (cnp_pulse && !exp_fire) n_ign++;
      @(posedge clk);
      since = exp_fire ? 1 : (since < 0 ? -1 : since + 1);
    end
    // alpha = 1 halves the rate exactly; alpha = 0 keeps it.
    @(negedge clk);
    cnp_pulse = 1'b0; rc = rate_t'(8 << RATE_FRAC); alpha = ALPHA_ONE; #1;
    checks++;
    if (rc_next != rate_t'(4 << RATE_FRAC)) begin failures++; $display("FAIL halving %0d", rc_next); end
    alpha = '0; #1;
    checks++;
    if (rc_next != rc) begin failures++; $display("FAIL alpha=0 changed rate"); end
    checks++;
    if (n_fire < 100 || n_ign < 100 || n_clamp < 20 || n_noclamp < 20) begin
      failures++; $display("FAIL coverage fire=%0d ign=%0d", n_fire, n_ign);
    end
    $display("accepted=%0d ignored=%0d", n_fire, n_ign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
