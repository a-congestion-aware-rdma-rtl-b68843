// tb_dcqcn_tree: eight DCQCN senders in a two-tier tree with uneven leaves.
//
// Eight complete dcqcn_top blocks, all at their reset parameter set, each fed
// by a saturating source of 4096-byte packets. Senders 0-1 sit behind leaf
// switch A, senders 2-5 behind leaf B, senders 6-7 behind leaf C. Each leaf
// forwards over one 10 Gb/s uplink to a root switch, whose 10 Gb/s port feeds
// the receiver. Every link runs at 8 bytes per cycle (10 Gb/s at 156.25 MHz).
// The three leaf uplink queues and the root queue are store-and-forward
// packet FIFOs. Each one ECN-marks packets on dequeue with the same RED
// profile as tb_dcqcn_incast (Kmin = 5 KB, Kmax = 200 KB, pmax = 1 %). The
// receiver answers a packet marked anywhere on its path with a CNP to its
// sender, at most one per flow every 50 us, 2 us later. The queues drop
// nothing and PFC is not modelled; the queue bound checked at the end shows
// that ECN alone keeps them finite.
//
// Link-level sharing would give each leaf a third of the root port, so that
// the four senders behind leaf B got half the rate of the others. Per-flow
// rate control should instead give all eight about an eighth of the link.
// The test checks that:
//   * every flow receives CNPs and lies between 0.7 and 1.8 Gb/s,
//   * the mean rate behind leaf B is within 25 % of the mean behind A and C,
//   * the eight flows together use at least 85 % of the receiver link,
//   * when senders 0-6 stop, sender 7 climbs from its share to above 7 Gb/s
//     through the recovery phases, and its rate never falls on the way,
//   * the queues stay bounded.
module tb_dcqcn_tree;
  import dcqcn_pkg::*;

  localparam int  NS      = 8;
  localparam int  NQ      = 4;       // queues 0-2: leaf uplinks A-C, 3: root port
  localparam int  ROOT    = 3;
  localparam int  DB      = 8;
  localparam int  MTU     = 4096;
  localparam real FCLK    = 156.25e6;
  localparam int  KMIN    = 5000;
  localparam int  KMAX    = 200000;
  localparam real PMAX    = 0.01;
  localparam int  NP_GAP  = 7813;    // 50 us
  localparam int  NP_DLY  = 313;     // 2 us
  localparam int  WIN     = 1_562_500;  // 10 ms report window
  localparam int  N_SETTLE = 12;        // 120 ms
  localparam int  N_MEAS   = 5;         // 50 ms
  localparam int  N_SOLO   = 20;        // 200 ms
  localparam int  LEAF [NS] = '{0, 0, 1, 1, 1, 1, 2, 2};

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
    #500ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sources: back-to-back 4096-byte packets while active.
  int beat_in_pkt [NS];
  bit active [NS] = '{default: 1'b1};
  always_comb for (int i = 0; i < NS; i++) begin
    s_tvalid[i] = !rst && active[i];
    s_tkeep[i]  = '1;
    s_tdata[i]  = 64'(beat_in_pkt[i]);
    s_tlast[i]  = (beat_in_pkt[i] == MTU / DB - 1);
    m_tready[i] = 1'b1;
  end

  typedef struct { int src; int bytes; bit marked; } pkt_t;
  pkt_t   q [NQ][$];
  longint q_bytes [NQ], q_max [NQ];
  int     head_left [NQ];
  longint now = 0;
  int     acc [NS];
  longint delivered [NS], last_cnp [NS], cnp_until [NS];
  longint cnp_at [NS][$];
  int     n_cnp [NS], n_mark [NQ];
  longint idle_cycles = 0;

  function automatic bit red_mark(longint backlog);
    real prob;
    prob = (backlog <= KMIN) ? 0.0 :
           (backlog >= KMAX) ? 1.0 : PMAX * real'(backlog - KMIN) / real'(KMAX - KMIN);
    return real'($urandom_range(0, 999999)) < prob * 1.0e6;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NS; i++) begin
        beat_in_pkt[i] <= 0; acc[i] = 0; delivered[i] = 0; last_cnp[i] = -NP_GAP;
        cnp_until[i] = 0; n_cnp[i] = 0; cnp[i] <= 1'b0;
      end
      for (int j = 0; j < NQ; j++) begin
        q_bytes[j] = 0; q_max[j] = 0; head_left[j] = 0; n_mark[j] = 0;
      end
    end else begin
      now++;
      // Root port first, so a packet leaving a leaf this cycle waits a cycle.
      if (q[ROOT].size() > 0) begin
        if (head_left[ROOT] == 0) head_left[ROOT] = q[ROOT][0].bytes;
        head_left[ROOT] -= DB;
        q_bytes[ROOT]   -= DB;
        if (head_left[ROOT] == 0) begin
          pkt_t p;
          p = q[ROOT].pop_front();
          if (red_mark(q_bytes[ROOT])) begin p.marked = 1'b1; n_mark[ROOT]++; end
          delivered[p.src] += p.bytes;
          if (p.marked && now - last_cnp[p.src] >= NP_GAP) begin
            last_cnp[p.src] = now;
            cnp_at[p.src].push_back(now + NP_DLY);
          end
        end
      end else idle_cycles++;
      // Leaf uplinks feed the root queue.
      for (int j = 0; j < ROOT; j++) begin
        if (q[j].size() > 0) begin
          if (head_left[j] == 0) head_left[j] = q[j][0].bytes;
          head_left[j] -= DB;
          q_bytes[j]   -= DB;
          if (head_left[j] == 0) begin
            pkt_t p;
            p = q[j].pop_front();
            if (red_mark(q_bytes[j])) begin p.marked = 1'b1; n_mark[j]++; end
            q[ROOT].push_back(p);
            q_bytes[ROOT] += p.bytes;
          end
        end
      end
      // Sender links into their leaf.
      for (int i = 0; i < NS; i++) begin
        if (m_tvalid[i] && m_tready[i]) begin
          beat_in_pkt[i] <= m_tlast[i] ? 0 : beat_in_pkt[i] + 1;
          acc[i] += DB;
          if (m_tlast[i]) begin
            pkt_t p;
            p.src = i; p.bytes = acc[i]; p.marked = 1'b0;
            q[LEAF[i]].push_back(p);
            q_bytes[LEAF[i]] += acc[i];
            acc[i] = 0;
          end
        end
      end
      for (int j = 0; j < NQ; j++) if (q_bytes[j] > q_max[j]) q_max[j] = q_bytes[j];
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
    longint d0 [NS], dk [NS];
    longint idle0;
    real    r [NS], sum, mean_b, mean_ac, prev7, r7;
    int     n_fall;
    rst = 1'b1;
    repeat (5) @(posedge clk);
    #0.5 rst = 1'b0;
    for (int k = 0; k < N_SETTLE + N_MEAS; k++) begin
      string line;
      if (k == N_SETTLE) begin
        for (int i = 0; i < NS; i++) d0[i] = delivered[i];
        idle0 = idle_cycles;
      end
      for (int i = 0; i < NS; i++) dk[i] = delivered[i];
      repeat (WIN) @(posedge clk);
      line = $sformatf("%0d ms:", (k + 1) * 10);
      for (int i = 0; i < NS; i++) line = {line, $sformatf(" %0.2f", gbps(delivered[i] - dk[i], WIN))};
      $display("%s Gb/s, root queue %0d", line, q_bytes[ROOT]);
    end
    sum = 0.0; mean_b = 0.0; mean_ac = 0.0;
    for (int i = 0; i < NS; i++) begin
      r[i] = gbps(delivered[i] - d0[i], longint'(N_MEAS) * WIN);
      sum += r[i];
      if (LEAF[i] == 1) mean_b += r[i] / 4.0; else mean_ac += r[i] / 4.0;
      $display("flow %0d (leaf %0d): %0.2f Gb/s, %0d CNPs", i, LEAF[i], r[i], n_cnp[i]);
      checks++;
      if (n_cnp[i] == 0) begin failures++; $display("FAIL flow %0d never received a CNP", i); end
      checks++;
      if (r[i] < 0.7 || r[i] > 1.8) begin
        failures++; $display("FAIL flow %0d at %0.2f Gb/s is not near 10/8", i, r[i]);
      end
    end
    $display("aggregate %0.2f Gb/s, leaf B mean %0.2f, leaves A+C mean %0.2f, marks %0d/%0d/%0d/%0d, link idle %0d cycles",
             sum, mean_b, mean_ac, n_mark[0], n_mark[1], n_mark[2], n_mark[3], idle_cycles - idle0);
    checks++;
    if (mean_b < 0.75 * mean_ac || mean_b > 1.25 * mean_ac) begin
      failures++; $display("FAIL leaf B flows get %0.2f against %0.2f Gb/s", mean_b, mean_ac);
    end
    checks++;
    if (sum < 8.5) begin failures++; $display("FAIL aggregate %0.2f Gb/s", sum); end
    // The other flows complete: sender 7 recovers towards the line rate.
    for (int i = 0; i < NS - 1; i++) active[i] = 1'b0;
    prev7 = 0.0; n_fall = 0;
    for (int k = 0; k < N_SOLO; k++) begin
      longint d7;
      d7 = delivered[7];
      repeat (WIN) @(posedge clk);
      r7 = gbps(delivered[7] - d7, WIN);
      $display("others stopped +%0d ms: flow 7 %0.2f Gb/s, R_C %0.2f, R_T %0.2f Gb/s, F %0d", (k + 1) * 10, r7,
               real'(g_snd[7].u_dut.status.rc) / real'(1 << RATE_FRAC) * 8.0 * FCLK / 1.0e9,
               real'(g_snd[7].u_dut.status.rt) / real'(1 << RATE_FRAC) * 8.0 * FCLK / 1.0e9,
               g_snd[7].u_dut.status.f);
      // The first window still drains the queues of the stopped flows.
      if (k > 1 && r7 < prev7 - 0.05) n_fall++;
      prev7 = r7;
    end
    checks++;
    if (n_fall != 0) begin failures++; $display("FAIL flow 7 fell back %0d times while alone", n_fall); end
    checks++;
    if (r7 < 7.0) begin failures++; $display("FAIL flow 7 only reached %0.2f Gb/s", r7); end
    for (int j = 0; j < NQ; j++) begin
      checks++;
      if (q_max[j] > 4_000_000) begin failures++; $display("FAIL queue %0d ran away: %0d bytes", j, q_max[j]); end
    end
    $display("peak queues %0d %0d %0d, root %0d bytes", q_max[0], q_max[1], q_max[2], q_max[ROOT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
