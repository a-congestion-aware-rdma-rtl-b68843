// tb_dcqcn_alpha_update: self-checking test of the alpha estimator.
//
// Checks: alpha resets to 1.0; updates come exactly every cfg_interval
// cycles; an interval with a CNP applies alpha <- (1-g) alpha + g and one
// without applies alpha <- (1-g) alpha. The expected value is tracked twice:
// by a real-valued model of equations (1)-(2), which must agree within a
// small tolerance, and by an integer model with the rounding described in
// the module header, which must agree exactly.
module tb_dcqcn_alpha_update;
  import dcqcn_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  logic    cnp_pulse;
  gain_t   cfg_g;
  cycles_t cfg_interval;
  alpha_t  alpha;
  logic    update_pulse;
  int      checks = 0, failures = 0;

  dcqcn_alpha_update dut (.clk, .rst, .cnp_pulse, .cfg_g, .cfg_interval, .alpha, .update_pulse);

  always #5 clk = ~clk;

  real    a_real = 1.0;
  longint a_int = 65536;
  bit     seen = 1'b0;
  bit     expect_update = 1'b0;
  int     cnt = 0, n_up = 0, n_up_cnp = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step(bit cnp);
    real    g;
    longint ga;
    g      = real'(cfg_g) / 65536.0;
    a_real = (1.0 - g) * a_real + (cnp ? g : 0.0);
    ga     = (longint'(cfg_g) * a_int + 65535) / 65536;
    a_int  = a_int - ga + (cnp ? longint'(cfg_g) : 0);
    if (a_int > 65536) a_int = 65536;
  endtask

  // Reference: count edges, remember CNPs, step the models every interval.
  always @(posedge clk) begin
    if (rst) begin
      cnt = 0; seen = 1'b0; expect_update = 1'b0;
    end else begin
      seen = seen | cnp_pulse;
      cnt++;
      expect_update = (cnt == int'(cfg_interval));
      if (expect_update) begin
        model_step(seen);
        if (seen) n_up_cnp++;
        seen = 1'b0;
        cnt  = 0;
      end
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (update_pulse !== expect_update) begin
      failures++; $display("FAIL t=%0t update_pulse=%0b expected %0b", $time, update_pulse, expect_update);
    end
    checks++;
    if (longint'(alpha) != a_int) begin
      failures++; $display("FAIL t=%0t alpha=%0d model=%0d", $time, alpha, a_int);
    end
    if (update_pulse) begin
      n_up++;
      checks++;
      if ((real'(alpha) / 65536.0 - a_real) > 0.01 || (a_real - real'(alpha) / 65536.0) > 0.01) begin
        failures++; $display("FAIL alpha=%f real model=%f", real'(alpha) / 65536.0, a_real);
      end
    end
  end

  initial begin
    rst = 1'b1; cnp_pulse = 1'b0; cfg_g = gain_t'(4096); cfg_interval = cycles_t'(20);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (alpha != ALPHA_ONE) begin failures++; $display("FAIL reset alpha %0d", alpha); end
    for (int i = 0; i < 12000; i++) begin
      @(negedge clk);
      // Bursts of CNPs, a long quiet decay, then sparse CNPs at g = 1/256.
      if (i < 3000)       cnp_pulse = ($urandom_range(0, 40) == 0);
      else if (i < 8000)  cnp_pulse = 1'b0;
      else                cnp_pulse = ($urandom_range(0, 60) == 0);
      if (i == 8000) cfg_g = gain_t'(256);
    end
    @(negedge clk) cnp_pulse = 1'b0;
    checks++;
    if (n_up < 500 || n_up_cnp < 50) begin
      failures++; $display("FAIL too few updates %0d / with CNP %0d", n_up, n_up_cnp);
    end
    checks++;
    if (a_real > 0.5) begin failures++; $display("FAIL alpha never decayed"); end
    $display("updates=%0d with_cnp=%0d final alpha=%0d", n_up, n_up_cnp, alpha);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
