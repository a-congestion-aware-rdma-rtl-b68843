// tb_dcqcn_incast: three DCQCN senders converging on one 10 Gb/s port.
//
// Three complete dcqcn_top blocks, all at their reset parameter set (g = 1/256,
// 6 / 12 MB/s increments, 3 us / 40 us / 2 ms intervals, F = 5, clamp on), each
// fed by a saturating source of 4096-byte packets. Their outputs enter one
// switch egress queue drained at 8 bytes per cycle (10 Gb/s at 156.25 MHz).
// The queue ECN-marks packets on dequeue with a RED profile (Kmin = 5 KB,
// Kmax = 200 KB, pmax = 1 %), and a receiver model answers a marked packet
// with a CNP to its sender, at most one per flow every 50 us, 2 us later.
// These switch and receiver settings are common DCQCN values, not part of the
// block. The test checks that:
//   * every flow is cut by CNPs and none is starved,
//   * after settling, each flow gets about a third of the link,
//   * when flow 0 stops, the two others rise to about half the link each,
//   * the link stays nearly full and the queue stays bounded (no loss is
//     possible in the model; the bound shows the queue does not run away).
module tb_dcqcn_incast;
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
  localparam longint MEAS   = 64'd7_812_500;   // 50 ms

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
      .s_axil_awaddr('0), .s_axil_awvalid(1'b0), .s_axil_awready(awready),
      .s_axil_wdata('0), .s_axil_wstrb('0), .s_axil_wvalid(1'b0), .s_axil_wready(wready),
      .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(1'b1),
      .s_axil_araddr('0), .s_axil_arvalid(1'b0), .s_axil_arready(arready),
      .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
      .throttled(throttled[i]));
  end

  initial begin
    #600ms;
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

  initial begin
    longint d0 [NS];
    longint idle0;
    real    r [NS], sum;
    rst = 1'b1;
    repeat (5) @(posedge clk);
    #0.5 rst = 1'b0;
    for (int k = 0; k < 15; k++) begin
      longint dk [NS];
      for (int i = 0; i < NS; i++) dk[i] = delivered[i];
      repeat (int'(SETTLE / 15)) @(posedge clk);
      $display("%0d ms: %0.2f %0.2f %0.2f Gb/s, queue %0d", (k + 1) * 10,
               gbps(delivered[0] - dk[0], SETTLE / 15), gbps(delivered[1] - dk[1], SETTLE / 15),
               gbps(delivered[2] - dk[2], SETTLE / 15), q_bytes);
    end
    for (int i = 0; i < NS; i++) d0[i] = delivered[i];
    idle0 = idle_cycles;
    repeat (int'(MEAS)) @(posedge clk);
    sum = 0.0;
    for (int i = 0; i < NS; i++) begin
      r[i] = gbps(delivered[i] - d0[i], MEAS);
      sum += r[i];
      $display("flow %0d: %0.2f Gb/s, %0d CNPs, R_C now %0.2f Gb/s", i, r[i], n_cnp[i],
               real'(i == 0 ? g_snd[0].u_dut.u_dcqcn.rc : i == 1 ? g_snd[1].u_dut.u_dcqcn.rc
                                                        : g_snd[2].u_dut.u_dcqcn.rc)
               / real'(1 << RATE_FRAC) * 8.0 * FCLK / 1.0e9);
      checks++;
      if (n_cnp[i] == 0) begin failures++; $display("FAIL flow %0d never received a CNP", i); end
      checks++;
      if (r[i] < 2.3 || r[i] > 4.4) begin
        failures++; $display("FAIL flow %0d share %0.2f Gb/s is not near 10/3", i, r[i]);
      end
    end
    $display("aggregate %0.2f Gb/s, peak queue %0d bytes, %0d marks, link idle %0d cycles",
             sum, q_max, n_mark, idle_cycles - idle0);
    checks++;
    if (sum < 9.0) begin failures++; $display("FAIL aggregate %0.2f Gb/s", sum); end
    // Flow 0 finishes: the other two must take over its share.
    active[0] = 1'b0;
    for (int k = 0; k < 10; k++) begin
      longint dk [NS];
      for (int i = 0; i < NS; i++) dk[i] = delivered[i];
      repeat (int'(SETTLE / 15)) @(posedge clk);
      $display("flow 0 stopped +%0d ms: %0.2f %0.2f %0.2f Gb/s, queue %0d", (k + 1) * 10,
               gbps(delivered[0] - dk[0], SETTLE / 15), gbps(delivered[1] - dk[1], SETTLE / 15),
               gbps(delivered[2] - dk[2], SETTLE / 15), q_bytes);
      if (k == 9) begin
        for (int i = 1; i < NS; i++) begin
          real ri;
          ri = gbps(delivered[i] - dk[i], SETTLE / 15);
          checks++;
          if (ri < 4.0 || ri > 6.0) begin
            failures++; $display("FAIL flow %0d at %0.2f Gb/s after flow 0 stopped, expected about 5", i, ri);
          end
        end
      end
    end
    checks++;
    if (q_max > 4 * KMAX) begin failures++; $display("FAIL queue ran away: %0d bytes", q_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
