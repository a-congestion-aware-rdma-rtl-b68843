// tb_dcqcn_incast_asym: three-sender incast with one slowed-down sender.
//
// Same fabric model as tb_dcqcn_incast (shared 10 Gb/s egress queue with RED
// ECN marking on dequeue, receiver returning at most one CNP per flow every
// 50 us). Senders 1 and 2 keep the reset parameter set; sender 0 is
// reprogrammed over AXI4-Lite with a 200 ms rate-increase timer,
// ClampTargetRate off and its byte counter switched off (a 10 MiB byte count
// would otherwise end each slow cycle after a few tens of milliseconds). Its R_T then keeps the memory of an old high rate, so
// each rare recovery event makes R_C jump halfway back up, the jump re-creates
// congestion, and a run of CNPs walks R_C down again. The test records sender
// 0's R_C and R_T and checks that:
//   * R_T of sender 0 never changes on a CNP (clamp off),
//   * R_C of sender 0 shows at least two upward jumps of more than 1 Gb/s,
//   * each such jump is followed by several CNP cuts,
//   * senders 1 and 2 get more bandwidth than sender 0 on average,
//   * the link stays at least 75 % used. Each jump briefly overfills the
//     queue and all three senders back off for some tens of milliseconds, so
//     this run does not keep the link as full as the symmetric one.
module tb_dcqcn_incast_asym;
  import dcqcn_pkg::*;

  localparam int  NS      = 3;
  localparam int  DB      = 8;
  localparam int  MTU     = 4096;
  localparam real FCLK    = 156.25e6;
  localparam int  KMIN    = 5000;
  localparam int  KMAX    = 200000;
  localparam real PMAX    = 0.01;
  localparam int  NP_GAP  = 7813;    // 50 us
  localparam int  NP_DLY  = 313;     // 2 us
  localparam longint SETTLE = 64'd23_437_500;  // 150 ms
  localparam longint MEAS   = 64'd46_875_000;  // 300 ms

  logic clk = 1'b0;
  logic rst;
  always #3.2 clk = ~clk;

  logic [8*DB-1:0] s_tdata [NS];
  logic [DB-1:0]   s_tkeep [NS], m_tkeep [NS];
  logic [8*DB-1:0] m_tdata [NS];
  logic            s_tlast [NS], m_tlast [NS];
  logic            s_tvalid [NS], s_tready [NS], m_tvalid [NS], m_tready [NS];
  logic            cnp [NS];
  logic            throttled [NS];

  int checks = 0, failures = 0;

  logic [7:0]  awaddr [NS];
  logic        awvalid [NS];
  logic [31:0] wdata [NS];

  for (genvar i = 0; i < NS; i++) begin : g_snd
    logic        awready, wready, bvalid, arready, rvalid;
    logic [1:0]  bresp, rresp;
    logic [31:0] rdata;
    dcqcn_top u_dut (
      .clk, .rst, .cnp_in(cnp[i]),
      .s_axis_tdata(s_tdata[i]), .s_axis_tkeep(s_tkeep[i]), .s_axis_tlast(s_tlast[i]),
      .s_axis_tvalid(s_tvalid[i]), .s_axis_tready(s_tready[i]),
      .m_axis_tdata(m_tdata[i]), .m_axis_tkeep(m_tkeep[i]), .m_axis_tlast(m_tlast[i]),
      .m_axis_tvalid(m_tvalid[i]), .m_axis_tready(m_tready[i]),
      .s_axil_awaddr(awaddr[i]), .s_axil_awvalid(awvalid[i]), .s_axil_awready(awready),
      .s_axil_wdata(wdata[i]), .s_axil_wstrb(4'hF), .s_axil_wvalid(awvalid[i]), .s_axil_wready(wready),
      .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(1'b1),
      .s_axil_araddr('0), .s_axil_arvalid(1'b0), .s_axil_arready(arready),
      .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
      .throttled(throttled[i]));
  end

  initial begin
    #700ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sources: back-to-back 4096-byte packets, beat count in the data.
  int beat_in_pkt [NS];
  bit active [NS] = '{1'b1, 1'b1, 1'b1};
  always_comb for (int i = 0; i < NS; i++) begin
    s_tvalid[i] = !rst && active[i];
    s_tkeep[i]  = '1;
    s_tdata[i]  = 64'(beat_in_pkt[i]);
    s_tlast[i]  = (beat_in_pkt[i] == MTU / DB - 1);
    m_tready[i] = 1'b1;                        // no PFC pause needed here
  end

  typedef struct { int src; int bytes; bit marked; } pkt_t;
  pkt_t   q [$];
  longint q_bytes = 0, q_max = 0, now = 0;
  int     acc [NS];                 // bytes of the packet being received
  int     head_left = 0;
  longint delivered [NS], meas_start [NS], last_cnp [NS];
  longint cnp_at [NS][$];
  longint cnp_until [NS];
  int     n_cnp [NS], n_mark = 0;
  longint idle_cycles = 0;

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NS; i++) begin
        beat_in_pkt[i] <= 0; acc[i] = 0; delivered[i] = 0; last_cnp[i] = -NP_GAP;
        cnp_until[i] = 0; n_cnp[i] = 0; cnp[i] <= 1'b0;
      end
    end else begin
      now++;
      // Ingress: sample this cycle's handshakes (signals settled before the edge).
      for (int i = 0; i < NS; i++) begin
        if (m_tvalid[i] && m_tready[i]) begin
          beat_in_pkt[i] <= m_tlast[i] ? 0 : beat_in_pkt[i] + 1;
          acc[i] += DB;
          if (m_tlast[i]) begin
            pkt_t p;
            p.src = i; p.bytes = acc[i]; p.marked = 1'b0;
            q.push_back(p);
            q_bytes += acc[i];
            acc[i] = 0;
          end
        end
      end
      if (q_bytes > q_max) q_max = q_bytes;
      // Egress: 8 bytes per cycle.
      if (q.size() > 0) begin
        if (head_left == 0) head_left = q[0].bytes;
        head_left -= DB;
        q_bytes   -= DB;
        if (head_left == 0) begin
          pkt_t p;
          real  prob;
          p = q.pop_front();
          // RED marking on dequeue, from the queue left behind the packet.
          prob = (q_bytes <= KMIN) ? 0.0 :
                 (q_bytes >= KMAX) ? 1.0 : PMAX * real'(q_bytes - KMIN) / real'(KMAX - KMIN);
          p.marked = (real'($urandom_range(0, 999999)) < prob * 1.0e6);
          if (p.marked) n_mark++;
          delivered[p.src] += p.bytes;
          // Receiver: a marked packet triggers a CNP, rate-limited per flow.
          if (p.marked && now - last_cnp[p.src] >= NP_GAP) begin
            last_cnp[p.src] = now;
            cnp_at[p.src].push_back(now + NP_DLY);
          end
        end
      end else idle_cycles++;
      for (int i = 0; i < NS; i++) begin
        if (cnp_at[i].size() > 0 && cnp_at[i][0] <= now) begin
          void'(cnp_at[i].pop_front());
          cnp_until[i] = now + 4;
          n_cnp[i]++;
        end
        cnp[i] <= (now < cnp_until[i]);
      end
    end
  end

  function automatic real gbps(longint bytes, longint cycles);
    return real'(bytes) * 8.0 / (real'(cycles) / FCLK) / 1.0e9;
  endfunction

  // Sender 0 R_C / R_T observation.
  localparam real TO_GBPS = 8.0 * FCLK / 1.0e9 / real'(1 << RATE_FRAC);
  rate_t  rc0_prev = rate_t'(8) << RATE_FRAC;
  int     n_jump = 0, cuts_since_jump = 0, n_jump_followed = 0, n_rt_moved = 0, n_dec0 = 0;
  always @(negedge clk) if (!rst) begin
    rate_t rc0, rt0;
    rc0 = g_snd[0].u_dut.u_dcqcn.rc;
    rt0 = g_snd[0].u_dut.status.rt;
    if (g_snd[0].u_dut.u_dcqcn.ev_dec) begin
      n_dec0++;
      cuts_since_jump++;
      // Clamp off: R_T must not move on a CNP (checked on the next edge).
      rt_at_cnp = rt0;
      check_rt  = 1'b1;
    end else if (check_rt) begin
      check_rt = 1'b0;
      checks++;
      if (rt0 != rt_at_cnp) begin n_rt_moved++; failures++; $display("FAIL R_T moved on a CNP"); end
    end
    if (rc0 > rc0_prev && real'(rc0 - rc0_prev) * TO_GBPS > 1.0) begin
      if (n_jump > 0 && cuts_since_jump >= 3) n_jump_followed++;
      n_jump++;
      cuts_since_jump = 0;
      $display("t=%0.1f ms: sender 0 R_C jumps %0.2f -> %0.2f Gb/s (R_T %0.2f)", $realtime / 1.0e6,
               real'(rc0_prev) * TO_GBPS, real'(rc0) * TO_GBPS, real'(rt0) * TO_GBPS);
    end
    rc0_prev = rc0;
  end
  rate_t rt_at_cnp;
  bit    check_rt = 1'b0;

  initial begin
    longint d0 [NS];
    real    r [NS], sum;
    rst = 1'b1;
    for (int i = 0; i < NS; i++) begin awaddr[i] = '0; awvalid[i] = 1'b0; wdata[i] = '0; end
    repeat (5) @(posedge clk);
    #0.5 rst = 1'b0;
    // Sender 0: 200 ms recovery timer, ClampTargetRate off (enable stays on),
    // byte counter off so that the timer alone paces its recovery.
    @(negedge clk);
    awaddr[0] = 8'h18; wdata[0] = 32'd31_250_000; awvalid[0] = 1'b1;
    @(negedge clk) awvalid[0] = 1'b0;
    repeat (3) @(negedge clk);
    awaddr[0] = 8'h00; wdata[0] = 32'h1; awvalid[0] = 1'b1;
    @(negedge clk) awvalid[0] = 1'b0;
    repeat (3) @(negedge clk);
    awaddr[0] = 8'h1C; wdata[0] = 32'd0; awvalid[0] = 1'b1;
    @(negedge clk) awvalid[0] = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (g_snd[0].u_dut.cfg.inc_interval != 31_250_000 || g_snd[0].u_dut.cfg.clamp_target ||
        g_snd[0].u_dut.cfg.byte_threshold != 0) begin
      failures++; $display("FAIL sender 0 not reprogrammed");
    end
    // Let the fair share form, then measure long enough for two slow cycles.
    repeat (int'(SETTLE)) @(posedge clk);
    for (int i = 0; i < NS; i++) d0[i] = delivered[i];
    for (int k = 0; k < 30; k++) begin
      longint dk [NS];
      for (int i = 0; i < NS; i++) dk[i] = delivered[i];
      repeat (int'(MEAS / 30)) @(posedge clk);
      $display("%0d ms: %0.2f %0.2f %0.2f Gb/s", 150 + (k + 1) * 10,
               gbps(delivered[0] - dk[0], MEAS / 30), gbps(delivered[1] - dk[1], MEAS / 30),
               gbps(delivered[2] - dk[2], MEAS / 30));
    end
    sum = 0.0;
    for (int i = 0; i < NS; i++) begin
      r[i] = gbps(delivered[i] - d0[i], MEAS);
      sum += r[i];
      $display("sender %0d: %0.2f Gb/s average, %0d CNPs", i, r[i], n_cnp[i]);
    end
    $display("aggregate %0.2f Gb/s; sender 0: %0d jumps, %0d followed by CNP cuts, %0d accepted CNPs",
             sum, n_jump, n_jump_followed, n_dec0);
    checks++;
    if (n_jump < 2) begin failures++; $display("FAIL sender 0 shows %0d jumps", n_jump); end
    checks++;
    if (n_jump_followed < 1) begin failures++; $display("FAIL no CNP run between jumps"); end
    checks++;
    if (!(r[1] > r[0] && r[2] > r[0])) begin failures++; $display("FAIL slowed sender not the slowest"); end
    checks++;
    if (sum < 7.5) begin failures++; $display("FAIL aggregate %0.2f Gb/s", sum); end
    checks++;
    if (q_max > 4 * KMAX) begin failures++; $display("FAIL queue ran away: %0d bytes", q_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
