// dcqcn_top: DCQCN congestion-control block for an FPGA RoCEv2 sender.
//
// The block sits on the AXI4-Stream transmit path between a RoCEv2 engine
// (s_axis_*) and a UDP/IP + 10GbE MAC (m_axis_*). A credit-based rate limiter
// (dcqcn_rate_limiter) paces the stream at the current rate R_C. R_C is
// computed by the DCQCN reaction point (dcqcn_module) from the CNP reception
// signal that the inbound MAC path raises for each Congestion Notification
// Packet: each CNP cuts R_C by the factor (1 - alpha/2), and timer and byte
// counter events let it recover towards the target rate R_T. All algorithm
// parameters and the live R_C, R_T and alpha sit in an AXI4-Lite register
// file (dcqcn_regs). This structure follows the document; the number formats,
// register map and reset values of R_C = R_T = line rate are this design's.
//
// Interface: one clock (156.25 MHz for a 64-bit 10 Gb/s datapath), synchronous
// active-high reset; cnp_in may be asynchronous to clk. throttled is high
// while a ready sink is being held back for lack of credit. Timing: the
// stream path has no latency; a CNP changes R_C three clock edges after
// the edge that first samples cnp_in high (two synchronizer stages with edge
// detect, then the rate register), and the pacing follows from the next cycle on.
module dcqcn_top
  import dcqcn_pkg::*;
#(
  parameter int unsigned DATA_BYTES       = 8,
  parameter real         CLK_FREQ_HZ      = 156.25e6,
  parameter int unsigned CREDIT_CAP_BYTES = 2 * DATA_BYTES,
  parameter int unsigned SYNC_STAGES      = 2,
  parameter int unsigned AXIL_ADDR_W      = 8
) (
  input  logic                     clk,
  input  logic                     rst,

  // CNP reception, from the inbound MAC path
  input  logic                     cnp_in,

  // transmit stream from the RoCEv2 engine
  input  logic [8*DATA_BYTES-1:0]  s_axis_tdata,
  input  logic [DATA_BYTES-1:0]    s_axis_tkeep,
  input  logic                     s_axis_tlast,
  input  logic                     s_axis_tvalid,
  output logic                     s_axis_tready,

  // paced transmit stream to the UDP/IP + MAC
  output logic [8*DATA_BYTES-1:0]  m_axis_tdata,
  output logic [DATA_BYTES-1:0]    m_axis_tkeep,
  output logic                     m_axis_tlast,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,

  // run-time register access
  input  logic [AXIL_ADDR_W-1:0]   s_axil_awaddr,
  input  logic                     s_axil_awvalid,
  output logic                     s_axil_awready,
  input  logic [31:0]              s_axil_wdata,
  input  logic [3:0]               s_axil_wstrb,
  input  logic                     s_axil_wvalid,
  output logic                     s_axil_wready,
  output logic [1:0]               s_axil_bresp,
  output logic                     s_axil_bvalid,
  input  logic                     s_axil_bready,
  input  logic [AXIL_ADDR_W-1:0]   s_axil_araddr,
  input  logic                     s_axil_arvalid,
  output logic                     s_axil_arready,
  output logic [31:0]              s_axil_rdata,
  output logic [1:0]               s_axil_rresp,
  output logic                     s_axil_rvalid,
  input  logic                     s_axil_rready,

  output logic                     throttled
);

  localparam int unsigned TXB_W     = $clog2(DATA_BYTES + 1);
  localparam rate_t       LINE_RATE = rate_t'(DATA_BYTES) << RATE_FRAC;

  dcqcn_cfg_t       cfg;
  dcqcn_status_t    status;
  rate_t            rc;
  logic [TXB_W-1:0] tx_bytes;

  // Event strobes of the reaction point, kept for monitoring in simulation.
  logic   ev_cnp, ev_dec, ev_ignored, ev_inc, ev_timer, ev_byte, ev_alpha;
  phase_e ev_phase;

  dcqcn_regs #(.CLK_FREQ_HZ(CLK_FREQ_HZ), .ADDR_W(AXIL_ADDR_W)) u_regs (
    .clk, .rst,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cfg, .status
  );

  dcqcn_module #(.TXB_W(TXB_W), .LINE_RATE(LINE_RATE), .SYNC_STAGES(SYNC_STAGES)) u_dcqcn (
    .clk, .rst, .cnp_in, .tx_bytes, .cfg,
    .rc, .status,
    .ev_cnp, .ev_dec, .ev_ignored, .ev_inc, .ev_timer, .ev_byte,
    .ev_phase, .ev_alpha
  );

  dcqcn_rate_limiter #(
    .DATA_BYTES(DATA_BYTES), .CREDIT_CAP_BYTES(CREDIT_CAP_BYTES), .TXB_W(TXB_W)
  ) u_limiter (
    .clk, .rst, .enable(cfg.enable), .rc,
    .s_axis_tdata, .s_axis_tkeep, .s_axis_tlast, .s_axis_tvalid, .s_axis_tready,
    .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready,
    .tx_bytes, .throttled
  );

endmodule
