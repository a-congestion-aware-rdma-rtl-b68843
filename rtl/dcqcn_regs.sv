// dcqcn_regs: AXI4-Lite register file of the DCQCN block.
//
// Every DCQCN parameter is a run-time register, so the reaction can be
// retuned without rebuilding the firmware, and the live R_C, R_T and alpha are
// readable for monitoring. Which quantities are registers comes from the
// document; the addresses, field layout, reset values in clock cycles and the
// two extra read-only counters (stage F, CNPs seen) are this design's.
//
//   addr  name            access  content
//   0x00  CTRL            RW      [0] enable, [1] ClampTargetRate
//   0x04  G               RW      gain g, G_FRAC fractional bits
//   0x08  R_AI            RW      additive increment (rate unit)
//   0x0C  R_HAI           RW      hyper-additive increment (rate unit)
//   0x10  ALPHA_INTERVAL  RW      alpha-update interval, cycles
//   0x14  DEC_INTERVAL    RW      rate-decrease interval (CNP cooldown), cycles
//   0x18  INC_INTERVAL    RW      rate-increase timer period, cycles (0: off)
//   0x1C  BYTE_THRESHOLD  RW      byte-counter threshold, bytes (0: off)
//   0x20  F_THRESHOLD     RW      stage-counter transition threshold
//   0x24  RC              RO      current rate R_C
//   0x28  RT              RO      target rate R_T
//   0x2C  ALPHA           RO      alpha, ALPHA_FRAC fractional bits
//   0x30  STAGE           RO      stage counter F
//   0x34  CNP_COUNT       RO      CNPs received since reset
// Rates are bytes per cycle with RATE_FRAC fractional bits (see dcqcn_pkg).
// Reset values are the document's hardware parameter set converted at
// CLK_FREQ_HZ: g = 1/256, R_AI = 6 MB/s, R_HAI = 12 MB/s, 3 us decrease
// interval, 40 us alpha interval, 2 ms increase timer, F threshold 5,
// ClampTargetRate on. The byte threshold, which the document does not give,
// resets to BYTE_THRESHOLD_DEFAULT.
//
// Bus timing: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY = WREADY = 1 for that cycle), WSTRB is honoured,
// and BVALID follows one cycle later. A read is taken when ARVALID is high and
// no read data is pending; RVALID follows one cycle later. Responses are
// always OKAY; unmapped addresses read as zero and ignore writes.
module dcqcn_regs
  import dcqcn_pkg::*;
#(
  parameter real         CLK_FREQ_HZ            = 156.25e6,
  parameter int unsigned ADDR_W                 = 8,
  parameter bytes_t      BYTE_THRESHOLD_DEFAULT = bytes_t'(10 * 1024 * 1024)
) (
  input  logic              clk,
  input  logic              rst,

  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,

  output dcqcn_cfg_t        cfg,
  input  dcqcn_status_t     status
);

  localparam dcqcn_cfg_t CFG_RESET = '{
    enable:         1'b1,
    clamp_target:   1'b1,
    g:              gain_t'(1 << (G_FRAC - 8)),
    r_ai:           mbps_to_rate(6.0, CLK_FREQ_HZ),
    r_hai:          mbps_to_rate(12.0, CLK_FREQ_HZ),
    alpha_interval: us_to_cycles(40.0, CLK_FREQ_HZ),
    dec_interval:   us_to_cycles(3.0, CLK_FREQ_HZ),
    inc_interval:   us_to_cycles(2000.0, CLK_FREQ_HZ),
    byte_threshold: BYTE_THRESHOLD_DEFAULT,
    f_threshold:    stage_t'(5)
  };

  typedef enum logic [ADDR_W-3:0] {
    R_CTRL   = 'h00, R_G      = 'h01, R_RAI    = 'h02, R_RHAI   = 'h03,
    R_AINT   = 'h04, R_DINT   = 'h05, R_IINT   = 'h06, R_BTHR   = 'h07,
    R_FTHR   = 'h08, R_RC     = 'h09, R_RT     = 'h0A, R_ALPHA  = 'h0B,
    R_STAGE  = 'h0C, R_CNPS   = 'h0D
  } reg_e;

  logic        wr_take, rd_take;
  logic [31:0] wmask;
  logic [31:0] cur_w;  // current value of the register being written
  logic [31:0] new_w;
  logic [31:0] rd_val;

  // Word-read of any register, used both for reads and for read-modify-write.
  function automatic logic [31:0] read_word(logic [ADDR_W-3:0] idx,
                                            dcqcn_cfg_t c, dcqcn_status_t s);
    case (idx)
      R_CTRL:  return {30'd0, c.clamp_target, c.enable};
      R_G:     return 32'(c.g);
      R_RAI:   return 32'(c.r_ai);
      R_RHAI:  return 32'(c.r_hai);
      R_AINT:  return 32'(c.alpha_interval);
      R_DINT:  return 32'(c.dec_interval);
      R_IINT:  return 32'(c.inc_interval);
      R_BTHR:  return 32'(c.byte_threshold);
      R_FTHR:  return 32'(c.f_threshold);
      R_RC:    return 32'(s.rc);
      R_RT:    return 32'(s.rt);
      R_ALPHA: return 32'(s.alpha);
      R_STAGE: return 32'(s.f);
      R_CNPS:  return s.cnp_count;
      default: return 32'd0;
    endcase
  endfunction

  assign wr_take = s_axil_awvalid & s_axil_wvalid & ~s_axil_bvalid;
  assign rd_take = s_axil_arvalid & ~s_axil_rvalid;

  assign s_axil_awready = wr_take;
  assign s_axil_wready  = wr_take;
  assign s_axil_arready = rd_take;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  always_comb begin
    for (int b = 0; b < 4; b++)
      wmask[8*b +: 8] = {8{s_axil_wstrb[b]}};
    cur_w  = read_word(s_axil_awaddr[ADDR_W-1:2], cfg, status);
    new_w  = (cur_w & ~wmask) | (s_axil_wdata & wmask);
    rd_val = read_word(s_axil_araddr[ADDR_W-1:2], cfg, status);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg           <= CFG_RESET;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;

      if (wr_take) begin
        s_axil_bvalid <= 1'b1;
        case (s_axil_awaddr[ADDR_W-1:2])
          R_CTRL:  begin cfg.enable <= new_w[0]; cfg.clamp_target <= new_w[1]; end
          R_G:     cfg.g              <= gain_t'(new_w);
          R_RAI:   cfg.r_ai           <= rate_t'(new_w);
          R_RHAI:  cfg.r_hai          <= rate_t'(new_w);
          R_AINT:  cfg.alpha_interval <= cycles_t'(new_w);
          R_DINT:  cfg.dec_interval   <= cycles_t'(new_w);
          R_IINT:  cfg.inc_interval   <= cycles_t'(new_w);
          R_BTHR:  cfg.byte_threshold <= bytes_t'(new_w);
          R_FTHR:  cfg.f_threshold    <= stage_t'(new_w);
          default: ;
        endcase
      end

      if (rd_take) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_val;
      end
    end
  end

  // AXI4-Lite: a response, once valid, holds until accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
                                  (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
                                  (s_axil_rvalid && !s_axil_rready) |=> s_axil_rvalid
                                                                     && $stable(s_axil_rdata));

endmodule
