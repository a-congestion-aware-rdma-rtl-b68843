// tb_dcqcn_rate_limiter: self-checking test of the credit-based pacer.
//
// A source offers beats with random tkeep and random gaps (obeying AXI4-Stream:
// a valid beat is held until accepted), a sink applies random back-pressure.
// The testbench keeps its own credit model and checks, every cycle, whether
// the beat may pass, that data passes unchanged and in order, and that tx_bytes
// reports the bytes moved. It then measures the sustained rate with an
// always-ready sink for several R_C values, which must match R_C to within
// the credit cap, and checks that with enable low every beat passes at once.
module tb_dcqcn_rate_limiter;
  import dcqcn_pkg::*;

  localparam int DB  = 8;
  localparam int CAP = 2 * DB;

  logic            clk = 1'b0;
  logic            rst;
  logic            enable;
  rate_t           rc;
  logic [8*DB-1:0] s_tdata, m_tdata;
  logic [DB-1:0]   s_tkeep, m_tkeep;
  logic            s_tlast, m_tlast, s_tvalid, s_tready, m_tvalid, m_tready;
  logic [3:0]      tx_bytes;
  logic            throttled;
  int              checks = 0, failures = 0;

  dcqcn_rate_limiter #(.DATA_BYTES(DB), .CREDIT_CAP_BYTES(CAP)) dut (
    .clk, .rst, .enable, .rc,
    .s_axis_tdata(s_tdata), .s_axis_tkeep(s_tkeep), .s_axis_tlast(s_tlast),
    .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tlast(m_tlast),
    .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .tx_bytes, .throttled);

  always #5 clk = ~clk;

  longint credit = 0;                  // model, bytes << RATE_FRAC
  int     seq_in = 0, seq_out = 0;     // beat sequence numbers
  int     n_throttled = 0;
  bit     random_src = 1'b1, random_snk = 1'b1;
  longint bytes_out = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(logic [DB-1:0] k);
    int c = 0;
    for (int i = 0; i < DB; i++) c += k[i];
    return c;
  endfunction

  // Source: beat n carries n in its data; held while not accepted.
  task automatic new_beat();
    s_tdata = {32'(seq_in), 32'hC0DE_0000 | 32'(seq_in)};
    s_tkeep = (random_src && $urandom_range(0, 3) == 0) ? DB'((1 << $urandom_range(1, DB)) - 1) : '1;
    s_tlast = ($urandom_range(0, 7) == 0);
  endtask

  always @(negedge clk) if (!rst) begin
    longint need;
    bit     allow, moved;
    need  = longint'(popc(s_tkeep)) << RATE_FRAC;
    allow = !enable || credit >= need;
    moved = s_tvalid && m_tready && allow;
    checks++;
    if (m_tvalid !== (s_tvalid && allow) || s_tready !== (m_tready && allow)) begin
      failures++; $display("FAIL t=%0t gate m_tvalid=%0b s_tready=%0b credit=%0d need=%0d",
                           $time, m_tvalid, s_tready, credit, need);
    end
    checks++;
    if (tx_bytes !== (moved ? 4'(popc(s_tkeep)) : 4'd0)) begin
      failures++; $display("FAIL tx_bytes=%0d", tx_bytes);
    end
    if (m_tvalid) begin
      checks++;
      if (m_tdata !== {32'(seq_out), 32'hC0DE_0000 | 32'(seq_out)} || m_tkeep !== s_tkeep || m_tlast !== s_tlast) begin
        failures++; $display("FAIL data out of order: got %h expected seq %0d", m_tdata, seq_out);
      end
    end
    if (throttled) n_throttled++;
    if (moved) begin seq_out++; bytes_out += popc(s_tkeep); end
    // Model credit for the next cycle.
    credit = credit + rc;
    if (moved) credit = (credit > need) ? credit - need : 0;
    if (credit > (longint'(CAP) << RATE_FRAC)) credit = longint'(CAP) << RATE_FRAC;
  end

  // Drive source and sink just after each edge.
  always @(posedge clk) begin
    #1;
    if (rst) begin
      s_tvalid = 1'b0; m_tready = 1'b0; new_beat();
    end else begin
      if (s_tvalid && s_tready_q) begin
        seq_in++; new_beat();
        s_tvalid = random_src ? ($urandom_range(0, 3) != 0) : 1'b1;
      end else if (!s_tvalid) begin
        s_tvalid = random_src ? ($urandom_range(0, 3) != 0) : 1'b1;
      end
      m_tready = random_snk ? ($urandom_range(0, 4) != 0) : 1'b1;
    end
  end

  // s_tready as it was just before the edge.
  logic s_tready_q;
  always @(negedge clk) s_tready_q <= s_tready;

  // Wait n edges, then step clear of the edge before changing inputs.
  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
    #2;
  endtask

  task automatic measure(rate_t r, int cycles);
    longint b0, got, want;
    rc = r;
    wait_cycles(40);
    b0 = bytes_out;
    wait_cycles(cycles);
    got  = bytes_out - b0;
    want = enable ? (longint'(r) * cycles) >> RATE_FRAC : longint'(DB) * cycles;
    checks++;
    if (got > want + CAP + DB || got < want - CAP - DB) begin
      failures++; $display("FAIL rate: R_C=%0d moved %0d bytes in %0d cycles, expected %0d", r, got, cycles, want);
    end else
      $display("R_C=%0.3f B/cycle: %0d bytes in %0d cycles (expected %0d)",
               real'(r) / real'(1 << RATE_FRAC), got, cycles, want);
  endtask

  initial begin
    rst = 1'b1; enable = 1'b1; rc = rate_t'(3 << (RATE_FRAC - 1));
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    // Random traffic at several rates.
    wait_cycles(3000);
    rc = rate_t'(1 << (RATE_FRAC - 3));
    wait_cycles(3000);
    rc = rate_t'(8 << RATE_FRAC);
    wait_cycles(3000);
    // Sustained rate, full-load source and always-ready sink.
    random_src = 1'b0; random_snk = 1'b0;
    measure(rate_t'(8 << RATE_FRAC), 4000);         // line rate: 10 Gb/s
    measure(rate_t'(4 << RATE_FRAC), 4000);         // 5 Gb/s
    measure(rate_t'(2650000), 8000);                // ~3.3 Gb/s
    measure(rate_t'(40265), 40000);                 // 6 MB/s-class trickle
    // Disabled: every beat passes regardless of R_C (full 8-byte beats).
    enable = 1'b0;
    measure(rate_t'(0), 1000);
    rc = '0;
    checks++;
    if (n_throttled < 100) begin failures++; $display("FAIL throttling seen only %0d times", n_throttled); end
    $display("beats=%0d throttled cycles=%0d", seq_out, n_throttled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
