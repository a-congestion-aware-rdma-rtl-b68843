// tb_dcqcn_module: self-checking test of the DCQCN reaction point.
//
// Drives the raw CNP level and the transmitted byte count and follows R_C,
// R_T, alpha and F through a scripted sequence: the first CNP at alpha = 1
// halves R_C and clamps R_T; a CNP inside the cooldown is ignored; recovery
// events walk R_C towards R_T in Fast Recovery, then raise R_T by R_AI and
// R_HAI; ClampTargetRate off keeps R_T; a disabled block ignores CNPs. The
// expected rates are computed here in real arithmetic from equations (3),
// (4) and the recovery rules, and must match within a few LSBs.
module tb_dcqcn_module;
  import dcqcn_pkg::*;

  localparam rate_t LINE = rate_t'(8) << RATE_FRAC;

  logic          clk = 1'b0;
  logic          rst;
  logic          cnp_in;
  logic [3:0]    tx_bytes;
  dcqcn_cfg_t    cfg;
  rate_t         rc;
  dcqcn_status_t status;
  logic          ev_cnp, ev_dec, ev_ignored, ev_inc, ev_timer, ev_byte, ev_alpha;
  phase_e        ev_phase;
  int            checks = 0, failures = 0;

  dcqcn_module #(.TXB_W(4), .LINE_RATE(LINE)) dut (
    .clk, .rst, .cnp_in, .tx_bytes, .cfg, .rc, .status,
    .ev_cnp, .ev_dec, .ev_ignored, .ev_inc, .ev_timer, .ev_byte, .ev_phase, .ev_alpha);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(string what, real got, real want, real tol = 4.0);
    checks++;
    if (got > want + tol || got < want - tol) begin
      failures++; $display("FAIL %s: got %0.1f expected %0.1f", what, got, want);
    end
  endtask

  // Raise cnp_in for a few cycles; return the edge count until R_C moved.
  task automatic send_cnp(output int latency);
    rate_t rc0;
    rc0 = rc;
    @(negedge clk) cnp_in = 1'b1;
    latency = 0;
    repeat (8) begin
      @(posedge clk); #1; latency++;
      if (rc != rc0) break;
    end
    @(negedge clk) cnp_in = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  int lat;
  int n_inc = 0, n_ai = 0, n_hai = 0, n_ign = 0, n_timer = 0, n_byte = 0;
  always @(posedge clk) if (!rst) begin
    if (ev_inc) begin
      n_inc++;
      if (ev_phase == PHASE_AI)  n_ai++;
      if (ev_phase == PHASE_HAI) n_hai++;
      if (ev_timer) n_timer++;
      if (ev_byte)  n_byte++;
    end
    if (ev_ignored) n_ign++;
  end

  initial begin
    real a, rc_r, rt_r;
    rst = 1'b1; cnp_in = 1'b0; tx_bytes = '0;
    cfg = '{enable: 1'b1, clamp_target: 1'b1, g: gain_t'(4096), r_ai: rate_t'(1 << (RATE_FRAC - 2)),
            r_hai: rate_t'(1 << (RATE_FRAC - 1)), alpha_interval: cycles_t'(50),
            dec_interval: cycles_t'(40), inc_interval: '0, byte_threshold: '0,
            f_threshold: stage_t'(3)};
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    near("reset rc", real'(rc), real'(LINE), 0);
    near("reset rt", real'(status.rt), real'(LINE), 0);
    near("reset alpha", real'(status.alpha), 65536.0, 0);

    // First CNP at alpha = 1: exact halving, R_T clamped to the old R_C.
    send_cnp(lat);
    checks++;
    // Sampling edge, two synchronizer edges, then the rate register: 4 edges.
    if (lat != 4) begin failures++; $display("FAIL CNP-to-R_C latency %0d edges", lat); end
    near("rc after first CNP", real'(rc), real'(LINE) / 2.0, 0);
    near("rt after first CNP", real'(status.rt), real'(LINE), 0);
    near("cnp_count", real'(status.cnp_count), 1.0, 0);

    // Second CNP inside the 40-cycle cooldown: ignored.
    send_cnp(lat);
    near("rc after ignored CNP", real'(rc), real'(LINE) / 2.0, 0);
    near("cnp_count 2", real'(status.cnp_count), 2.0, 0);

    // Let alpha update a few times, then a CNP after the cooldown.
    repeat (200) @(negedge clk);
    a = real'(status.alpha) / 65536.0;
    rc_r = real'(rc);
    send_cnp(lat);
    near("rc after third CNP", real'(rc), rc_r * (1.0 - a / 2.0));
    near("rt clamped", real'(status.rt), rc_r);
    checks++;
    if (a >= 1.0 || a < 0.5) begin failures++; $display("FAIL alpha %f did not decay as expected", a); end

    // Recovery by timer: Fast Recovery for F < 3, then AI, then HAI.
    @(negedge clk) cfg.inc_interval = cycles_t'(30);
    for (int k = 0; k < 12; k++) begin
      rc_r = real'(rc); rt_r = real'(status.rt);
      while (!ev_inc) @(negedge clk);
      if (k >= 6)      rt_r = rt_r + real'(cfg.r_hai);
      else if (k >= 3) rt_r = rt_r + real'(cfg.r_ai);
      if (rt_r > real'(LINE)) rt_r = real'(LINE);
      @(negedge clk);
      near($sformatf("recovery %0d rt", k), real'(status.rt), rt_r);
      near($sformatf("recovery %0d rc", k), real'(rc), (rc_r + rt_r) / 2.0);
      near($sformatf("recovery %0d F", k), real'(status.f), real'(k + 1), 0);
    end

    // Byte-counter trigger only.
    @(negedge clk) begin cfg.inc_interval = '0; cfg.byte_threshold = bytes_t'(100); tx_bytes = 4'd8; end
    repeat (200) @(negedge clk);
    tx_bytes = '0;

    // ClampTargetRate off: R_T survives the CNP.
    cfg.clamp_target = 1'b0;
    rt_r = real'(status.rt);
    send_cnp(lat);
    near("rt kept with clamp off", real'(status.rt), rt_r, 0);
    near("F reset by CNP", real'(status.f), 0.0, 0);

    // Disabled: CNPs have no effect.
    repeat (60) @(negedge clk);
    cfg.enable = 1'b0;
    rc_r = real'(rc);
    send_cnp(lat);
    near("rc with DCQCN disabled", real'(rc), rc_r, 0);

    checks++;
    if (n_ign < 1 || n_ai < 3 || n_hai < 3 || n_timer < 12 || n_byte < 5) begin
      failures++; $display("FAIL coverage ign=%0d ai=%0d hai=%0d timer=%0d byte=%0d", n_ign, n_ai, n_hai, n_timer, n_byte);
    end
    $display("recoveries=%0d ai=%0d hai=%0d timer=%0d byte=%0d ignored=%0d", n_inc, n_ai, n_hai, n_timer, n_byte, n_ign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
