// tb_dcqcn_rate_increase: self-checking test of the DCQCN recovery process.
//
// The testbench owns R_C and R_T (loading rc_next / rt_next on inc_fire, and
// a decreased rate on its own random "accepted CNP" events) and keeps an
// independent model of the periodic timer, the byte counter (restarted by
// CNPs) and the stage counter F.
// Every cycle it compares inc_fire, the trigger flags, the phase and the
// offered rates with the model: Fast Recovery while F < T, Additive Increase
// while T <= F < 2T, Hyper-Additive Increase beyond, R_T capped at the line
// rate. Timer and byte-counter periods are shortened to keep the run short.
module tb_dcqcn_rate_increase;
  import dcqcn_pkg::*;

  localparam rate_t LINE = rate_t'(8) << RATE_FRAC;

  logic       clk = 1'b0;
  logic       rst;
  logic       dec_fire;
  logic [7:0] tx_bytes;
  cycles_t    cfg_interval;
  bytes_t     cfg_byte_threshold;
  stage_t     cfg_f_threshold;
  rate_t      cfg_r_ai, cfg_r_hai;
  rate_t      rc, rt;
  logic       inc_fire, timer_fire, byte_fire;
  phase_e     phase;
  stage_t     stage;
  rate_t      rc_next, rt_next;
  int         checks = 0, failures = 0;

  dcqcn_rate_increase #(.TXB_W(8), .LINE_RATE(LINE)) dut (
    .clk, .rst, .dec_fire, .tx_bytes, .cfg_interval, .cfg_byte_threshold,
    .cfg_f_threshold, .cfg_r_ai, .cfg_r_hai, .rc, .rt,
    .inc_fire, .timer_fire, .byte_fire, .phase, .stage, .rc_next, .rt_next);

  always #5 clk = ~clk;

  // Model state
  longint m_timer = 0, m_bytes = 0, m_stage = 0;
  int n_fr = 0, n_ai = 0, n_hai = 0, n_timer = 0, n_byte = 0, n_cap = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; dec_fire = 1'b0; tx_bytes = '0;
    cfg_interval = cycles_t'(40); cfg_byte_threshold = bytes_t'(600);
    cfg_f_threshold = stage_t'(5);
    cfg_r_ai = rate_t'(40265); cfg_r_hai = rate_t'(80531);   // 6 and 12 MB/s
    rc = rate_t'(1 << RATE_FRAC); rt = rate_t'(4 << RATE_FRAC);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 40000; i++) begin
      bit     e_timer, e_byte, e_fire;
      longint e_rt, e_rc, incr;
      phase_e e_phase;
      @(negedge clk);
      dec_fire = ($urandom_range(0, 2999) == 0);
      tx_bytes = ($urandom_range(0, 3) == 0) ? 8'(($urandom_range(1, 8))) : 8'd0;
      if (i == 20000) cfg_byte_threshold = '0;   // byte counter off
      if (i == 30000) begin cfg_interval = '0; cfg_byte_threshold = bytes_t'(300); end
      #1;
      e_timer = (cfg_interval != 0) && (m_timer + 1 >= longint'(cfg_interval));
      e_byte  = (cfg_byte_threshold != 0) && (m_bytes + tx_bytes >= longint'(cfg_byte_threshold));
      e_fire  = (e_timer || e_byte) && !dec_fire;
      e_phase = (m_stage < cfg_f_threshold) ? PHASE_FR :
                (m_stage < 2 * cfg_f_threshold) ? PHASE_AI : PHASE_HAI;
      incr    = (e_phase == PHASE_AI) ? cfg_r_ai : (e_phase == PHASE_HAI) ? cfg_r_hai : 0;
      e_rt    = rt + incr;
      if (e_rt > LINE) e_rt = LINE;
      e_rc    = (rc + e_rt) / 2;
      checks++;
      if (inc_fire !== e_fire || timer_fire !== e_timer || byte_fire !== e_byte ||
          longint'(stage) != m_stage) begin
        failures++;
        $display("FAIL i=%0d fire=%0b/%0b timer=%0b/%0b byte=%0b/%0b stage=%0d/%0d", i,
                 inc_fire, e_fire, timer_fire, e_timer, byte_fire, e_byte, stage, m_stage);
      end
      if (e_fire) begin
        checks++;
        if (phase !== e_phase || longint'(rc_next) != e_rc || longint'(rt_next) != e_rt) begin
          failures++;
          $display("FAIL i=%0d phase=%s/%s rc_next=%0d/%0d rt_next=%0d/%0d", i, phase.name(),
                   e_phase.name(), rc_next, e_rc, rt_next, e_rt);
        end
        case (e_phase)
          PHASE_FR: n_fr++;
          PHASE_AI: n_ai++;
          default:  n_hai++;
        endcase
        if (e_timer) n_timer++;
        if (e_byte)  n_byte++;
        if (rt + incr > LINE) n_cap++;
      end
      @(posedge clk);
      // Model update, and the owner's register update.
      m_timer = (e_timer || cfg_interval == 0) ? 0 : m_timer + 1;  // periodic: CNPs do not restart it
      if (dec_fire) begin
        m_bytes = 0; m_stage = 0;
        rt = rc;
        rc = rate_t'(rc / 2);
      end else begin
        m_bytes = e_byte ? 0 : m_bytes + tx_bytes;
        if (e_fire) begin
          if (m_stage < 255) m_stage++;
          rc = rate_t'(e_rc);
          rt = rate_t'(e_rt);
        end
      end
    end
    checks++;
    if (n_fr < 10 || n_ai < 10 || n_hai < 10 || n_timer < 10 || n_byte < 10 || n_cap < 1) begin
      failures++;
      $display("FAIL coverage fr=%0d ai=%0d hai=%0d timer=%0d byte=%0d cap=%0d",
               n_fr, n_ai, n_hai, n_timer, n_byte, n_cap);
    end
    $display("fr=%0d ai=%0d hai=%0d timer=%0d byte=%0d cap=%0d", n_fr, n_ai, n_hai, n_timer, n_byte, n_cap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
