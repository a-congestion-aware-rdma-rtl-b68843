// tb_dcqcn_top: end-to-end test of the DCQCN block at its default size.
//
// A stand-in for the RoCEv2 engine offers a saturating stream of RDMA-sized
// packets (sequence-numbered beats, random lengths up to the 4096-byte MTU),
// a stand-in for the MAC accepts it, and emulated_switch closes the feedback
// loop: it measures the egress throughput over a 5000-cycle window and sends
// a CNP back to cnp_in when the throughput exceeds a scripted threshold.
// Parameters are programmed over AXI4-Lite. Phases:
//   1. 5 Gb/s bottleneck, sender starting at 10 Gb/s (the shape of the
//      document's firmware simulation): the first CNP at alpha = 1 must halve
//      R_C exactly; later CNPs cut less; throughput must follow R_C.
//   2. Bottleneck lifted, byte counter on: recovery walks through Fast
//      Recovery, Additive and Hyper-Additive Increase back to line rate.
//   3. ClampTargetRate off: R_T must survive CNPs.
//   4. Sink back-pressure: the limiter must pass it through.
//   5. DCQCN disabled: CNPs ignored, stream at line rate.
// Every beat is checked for order and content, the monitoring registers are
// compared with the internal state, and each mechanism must occur.
module tb_dcqcn_top;
  import dcqcn_pkg::*;

  localparam int    DB    = 8;
  localparam int    N_W   = 5000;
  localparam rate_t LINE  = rate_t'(DB) << RATE_FRAC;
  localparam real   FCLK  = 156.25e6;

  logic clk = 1'b0;
  logic rst;
  logic cnp_in;

  logic [8*DB-1:0] s_tdata, m_tdata;
  logic [DB-1:0]   s_tkeep, m_tkeep;
  logic            s_tlast, m_tlast, s_tvalid, s_tready, m_tvalid, m_tready;
  logic            throttled;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;

  int checks = 0, failures = 0;

  dcqcn_top dut (
    .clk, .rst, .cnp_in,
    .s_axis_tdata(s_tdata), .s_axis_tkeep(s_tkeep), .s_axis_tlast(s_tlast),
    .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tlast(m_tlast),
    .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .throttled);

  always #3.2 clk = ~clk;   // 156.25 MHz

  // ---------------------------------------------------------------- switch
  logic beat_s;
  logic [DB-1:0] keep_s;
  int   sw_threshold, sw_cooldown, sw_delay, sw_window, sw_triggers;

  emulated_switch #(.N_W(N_W), .DB(DB)) u_switch (
    .clk(~clk), .rst, .beat(beat_s), .beat_keep(keep_s),
    .threshold_bytes(sw_threshold), .cooldown(sw_cooldown), .cnp_delay(sw_delay),
    .window_bytes(sw_window), .cnp(cnp_in), .triggers(sw_triggers));

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // ------------------------------------------------- source and sink models
  longint seq_in = 0, seq_out = 0, bytes_in = 0, bytes_out = 0;
  int     pkt_left;              // bytes left in the current packet
  bit     src_on = 1'b0, snk_random = 1'b0;
  int     n_sink_stall = 0, n_throttled = 0;

  function automatic int popc(logic [DB-1:0] k);
    int c = 0;
    for (int i = 0; i < DB; i++) c += int'(k[i]);
    return c;
  endfunction

  task automatic load_beat();
    int n;
    if (pkt_left <= 0) pkt_left = $urandom_range(64, 4096);
    n = (pkt_left >= DB) ? DB : pkt_left;
    s_tdata  = {32'hFEED_0000 ^ 32'(seq_in), 32'(seq_in)};
    s_tkeep  = DB'((1 << n) - 1);
    s_tlast  = (pkt_left <= DB);
    pkt_left = pkt_left - n;
  endtask

  // Monitor at the falling edge, where every signal of the cycle is stable.
  always @(negedge clk) begin
    beat_s = 1'b0;
    keep_s = m_tkeep;
    if (!rst) begin
      if (m_tvalid && m_tready) begin
        beat_s = 1'b1;
        checks++;
        if (m_tdata !== {32'hFEED_0000 ^ 32'(seq_out), 32'(seq_out)}) begin
          failures++; $display("FAIL beat %0d corrupted or out of order: %h", seq_out, m_tdata);
        end
        seq_out++;
        bytes_out += popc(m_tkeep);
      end
      if (throttled) n_throttled++;
      if (s_tvalid && !m_tready) n_sink_stall++;
    end
  end

  // Drive source and sink just after the rising edge.
  always @(posedge clk) begin
    #0.5;
    if (rst) begin
      s_tvalid = 1'b0; m_tready = 1'b1; pkt_left = 0; load_beat();
    end else begin
      if (s_tvalid && handshake_q) begin
        seq_in++; bytes_in += popc(s_tkeep); load_beat();
      end
      s_tvalid = src_on;   // a valid beat is never withdrawn while src_on
      m_tready = snk_random ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
  bit handshake_q;
  always @(negedge clk) handshake_q = s_tvalid && s_tready;

  // ------------------------------------------------------------ AXI4-Lite
  task automatic axil_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = 4'hF; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    #0.5 awvalid = 1'b0; wvalid = 1'b0;
    do @(posedge clk); while (!bvalid);
    #0.5 bready = 1'b0;
  endtask

  task automatic axil_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    do @(posedge clk); while (!arready);
    #0.5 arvalid = 1'b0;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    #0.5 rready = 1'b0;
  endtask

  // -------------------------------------------------- mechanism counters
  int n_dec = 0, n_ign = 0, n_fr = 0, n_ai = 0, n_hai = 0, n_timer = 0, n_byte = 0;
  int n_alpha_up = 0, n_alpha_down = 0, n_cnp_disabled = 0, n_track = 0;
  alpha_t alpha_prev;
  longint rc_stable_since = 0, cyc = 0;
  rate_t  rc_prev;

  always @(negedge clk) if (!rst) begin
    cyc++;
    // Every accepted CNP: R_C <- R_C (1 - alpha / 2), checked one cycle later.
    if (dec_pending) begin
      checks++;
      if (real'(dut.rc) > exp_rc + 1.0 || real'(dut.rc) < exp_rc - 2.0) begin
        failures++; $display("FAIL decrease: R_C %0d expected %0.1f", dut.rc, exp_rc);
      end
      dec_pending = 1'b0;
    end
    if (dut.u_dcqcn.ev_dec) begin
      n_dec++;
      exp_rc = real'(dut.rc) * (1.0 - real'(dut.status.alpha) / 131072.0);
      if (dut.status.alpha < ALPHA_ONE) n_partial_cut++;
      dec_pending = 1'b1;
    end
    if (dut.u_dcqcn.ev_ignored) n_ign++;
    if (dut.u_dcqcn.ev_inc) begin
      if (dut.u_dcqcn.ev_phase == PHASE_FR)  n_fr++;
      if (dut.u_dcqcn.ev_phase == PHASE_AI)  n_ai++;
      if (dut.u_dcqcn.ev_phase == PHASE_HAI) n_hai++;
      if (dut.u_dcqcn.ev_timer) n_timer++;
      if (dut.u_dcqcn.ev_byte)  n_byte++;
    end
    if (dut.u_dcqcn.u_sync.cnp_pulse && !dut.cfg.enable) n_cnp_disabled++;
    if (dut.status.alpha > alpha_prev) n_alpha_up++;
    if (dut.status.alpha < alpha_prev) n_alpha_down++;
    alpha_prev = dut.status.alpha;
    if (dut.rc != rc_prev) rc_stable_since = cyc;
    rc_prev = dut.rc;
    // Throughput tracks R_C once a full window has passed at a constant rate
    // with a saturating source and a ready sink.
    if (track_en && cyc - rc_stable_since > N_W + 10 && cyc % 997 == 0) begin
      real want, tol;
      want = real'(dut.rc) / real'(1 << RATE_FRAC) * N_W;
      // Partial last beats of packets cost a whole cycle, which shows only
      // near line rate: allow 0.5 % there.
      tol  = (want * 0.005 > 3.0 * DB) ? want * 0.005 : 3.0 * DB;
      n_track++;
      checks++;
      if (real'(sw_window) > want + 3 * DB || real'(sw_window) < want - tol) begin
        failures++;
        $display("FAIL throughput %0d bytes/window, R_C gives %0.1f", sw_window, want);
      end
    end
  end
  bit  track_en = 1'b0;
  bit  dec_pending = 1'b0;
  real exp_rc;
  int  n_partial_cut = 0;

  function automatic real gbps(rate_t r);
    return real'(r) / real'(1 << RATE_FRAC) * 8.0 * FCLK / 1.0e9;
  endfunction

  task automatic run_us(real us);
    repeat (int'(us * FCLK / 1.0e6)) @(posedge clk);
  endtask

  // Check the monitoring registers against the internal state.
  task automatic check_monitor();
    logic [31:0] rc_r, rt_r, al_r;
    src_on = 1'b0;                     // freeze traffic so the state holds
    repeat (4) @(posedge clk);
    axil_read(8'h24, rc_r);
    axil_read(8'h28, rt_r);
    axil_read(8'h2C, al_r);
    check("RC register", rc_r == 32'(dut.u_dcqcn.rc) || dut.u_dcqcn.ev_inc || dut.u_dcqcn.ev_dec);
    check("RT register", rt_r == 32'(dut.status.rt) || dut.u_dcqcn.ev_inc || dut.u_dcqcn.ev_dec);
    check("ALPHA register range", al_r <= 32'(ALPHA_ONE));
    $display("  monitor: R_C %0.3f Gb/s, R_T %0.3f Gb/s, alpha %0.4f",
             gbps(rate_t'(rc_r)), gbps(rate_t'(rt_r)), real'(al_r) / 65536.0);
    src_on = 1'b1;
  endtask

  // --------------------------------------------------------------- script
  initial begin
    logic [31:0] d;
    rate_t rc_before, rt_before;
    real   a_before;
    rst = 1'b1; src_on = 1'b0;
    awaddr = '0; araddr = '0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    wdata = '0; wstrb = '0;
    sw_threshold = 1 << 30; sw_cooldown = 0; sw_delay = 312;   // 2 us CNP round trip
    alpha_prev = ALPHA_ONE; rc_prev = LINE;
    repeat (5) @(posedge clk);
    #0.5 rst = 1'b0;

    // Reset state: unconstrained at line rate, parameters of the hardware set.
    axil_read(8'h24, d); check("R_C resets to line rate", d == 32'(LINE));
    axil_read(8'h18, d); check("2 ms increase timer", d == 32'd312500);

    // ---- Phase 1: 5 Gb/s bottleneck. Faster alpha and recovery than the
    // hardware set, so that the dynamics fit in about a millisecond.
    axil_write(8'h04, 32'd4096);        // g = 1/16
    axil_write(8'h18, 32'd46875);       // 300 us increase timer
    axil_write(8'h1C, 32'd0);           // byte counter off
    sw_threshold = 20000;               // 5 Gb/s over 32 us
    sw_cooldown  = 100 * 156;           // 100 us between switch triggers
    src_on = 1'b1;
    track_en = 1'b1;
    wait (dut.u_dcqcn.ev_dec);
    @(posedge clk); #0.5;
    rc_before = dut.rc;
    check("first CNP at alpha = 1 halves R_C to 5 Gb/s", rc_before == LINE / 2);
    check("R_T clamped to 10 Gb/s", dut.status.rt == LINE);
    $display("first CNP at %0t: R_C %0.3f Gb/s", $time, gbps(dut.rc));
    run_us(1400);
    $display("phase 1: %0d CNPs acted on", n_dec);
    check_monitor();
    check("several CNPs in the 5 Gb/s phase", n_dec >= 2);
    check("throughput under the 5 Gb/s bottleneck on average",
          gbps(dut.rc) < 6.5);

    // A CNP that catches a smaller alpha cuts less than half.
    a_before  = real'(dut.status.alpha) / 65536.0;
    check("alpha has decayed below 1", a_before < 0.9);

    // ---- Phase 2: bottleneck lifted, byte counter at 16 KiB.
    sw_threshold = 1 << 30;
    axil_write(8'h1C, 32'd16384);
    run_us(2500);
    check_monitor();
    check("recovered to line rate", dut.rc > LINE - (LINE >> 6));

    // ---- Phase 3: ClampTargetRate off; R_T must survive a CNP.
    axil_write(8'h00, 32'h1);           // enable on, clamp off
    sw_threshold = 36000;               // 9 Gb/s
    sw_cooldown  = 156;                 // a CNP every 1 us: bursts inside the 3 us cooldown
    rt_before = dut.status.rt;
    wait (dut.u_dcqcn.ev_dec);
    @(posedge clk); #0.5;
    check("R_T kept with ClampTargetRate off", dut.status.rt == rt_before);
    run_us(300);

    // ---- Phase 4: random sink back-pressure.
    track_en = 1'b0;
    snk_random = 1'b1;
    run_us(200);
    snk_random = 1'b0;

    // ---- Phase 5: DCQCN disabled: CNPs ignored, full line rate even though
    // R_C was left low by a burst of CNPs just before.
    track_en = 1'b0;
    sw_threshold = 1000;                // force CNPs
    sw_cooldown  = 10 * 156;
    wait (dut.rc < LINE / 4);
    axil_write(8'h1C, 32'd0);           // recovery triggers off, so R_C stays low
    axil_write(8'h18, 32'd0);
    axil_write(8'h00, 32'h2);
    rc_before = dut.rc;
    run_us(100);
    check("R_C still low while disabled", dut.rc < LINE / 2);
    check("R_C untouched while disabled", dut.rc >= rc_before);
    check("line-rate window while disabled", real'(sw_window) >= 0.99 * N_W * DB);

    // Drain and final accounting.
    src_on = 1'b0;
    repeat (20) @(posedge clk);
    check("every beat offered was delivered", seq_in == seq_out && bytes_in == bytes_out);
    axil_read(8'h34, d);
    check("CNP counter counts the CNPs seen while enabled", d == 32'(n_dec + n_ign));

    // Every mechanism must have happened.
    check("rate decrease",            n_dec > 0);
    check("CNP inside cooldown",      n_ign > 0);
    check("alpha raised by CNPs",     n_alpha_up > 0);
    check("cut by less than half",    n_partial_cut > 0);
    check("alpha decay",              n_alpha_down > 0);
    check("Fast Recovery",            n_fr > 0);
    check("Additive Increase",        n_ai > 0);
    check("Hyper-Additive Increase",  n_hai > 0);
    check("timer trigger",            n_timer > 0);
    check("byte-counter trigger",     n_byte > 0);
    check("credit throttling",        n_throttled > 0);
    check("sink back-pressure",       n_sink_stall > 0);
    check("CNP while disabled",       n_cnp_disabled > 0);
    check("throughput tracked R_C",   n_track > 20);
    $display("dec=%0d ignored=%0d alpha_up=%0d alpha_down=%0d fr=%0d ai=%0d hai=%0d timer=%0d byte=%0d",
             n_dec, n_ign, n_alpha_up, n_alpha_down, n_fr, n_ai, n_hai, n_timer, n_byte);
    $display("throttled=%0d sink_stall=%0d cnp_disabled=%0d track=%0d beats=%0d switch_triggers=%0d",
             n_throttled, n_sink_stall, n_cnp_disabled, n_track, seq_out, sw_triggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
