// dcqcn_rate_limiter: credit-based pacer on the AXI4-Stream transmit path.
//
// R_C acts as a credit generator. A fractional credit accumulator, kept in
// the same fixed-point unit as the rates (bytes with RATE_FRAC fractional
// bits), gains R_C every cycle, which is R_C / f_clk bytes per cycle when R_C
// is read in bytes per second, and loses the payload bytes of the beat that
// moves on the master side in that cycle. While the accumulator holds less
// than the size of the beat waiting on the slave side (popcount of tkeep),
// that beat is held back: m_axis_tvalid and s_axis_tready are both low. This
// mechanism is the document's. Its own choices: the beat passes straight
// through (no register stage), the accumulator starts empty and saturates at
// CREDIT_CAP_BYTES so that an idle period cannot build up a line-rate burst
// longer than that, and with enable low the limiter lets every beat through
// (the document's DCQCN-disabled mode) while still counting bytes.
//
// Interface: plain AXI4-Stream slave (s_axis_*) and master (m_axis_*) with
// tdata, tkeep and tlast. tx_bytes reports the bytes moved this cycle (to the
// DCQCN byte counter); throttled is high in a cycle in which a beat is valid
// and the sink is ready but credit is short. Timing: zero latency; the gate
// depends only on registered credit and the slave's tkeep, so m_axis_tvalid
// never depends on m_axis_tready, and once raised it stays high until the
// beat moves (credit only grows while nothing moves).
module dcqcn_rate_limiter
  import dcqcn_pkg::*;
#(
  parameter int unsigned DATA_BYTES       = 8,
  parameter int unsigned CREDIT_CAP_BYTES = 2 * DATA_BYTES,
  parameter int unsigned TXB_W            = $clog2(DATA_BYTES + 1)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      enable,
  input  rate_t                     rc,

  input  logic [8*DATA_BYTES-1:0]   s_axis_tdata,
  input  logic [DATA_BYTES-1:0]     s_axis_tkeep,
  input  logic                      s_axis_tlast,
  input  logic                      s_axis_tvalid,
  output logic                      s_axis_tready,

  output logic [8*DATA_BYTES-1:0]   m_axis_tdata,
  output logic [DATA_BYTES-1:0]     m_axis_tkeep,
  output logic                      m_axis_tlast,
  output logic                      m_axis_tvalid,
  input  logic                      m_axis_tready,

  output logic [TXB_W-1:0]          tx_bytes,
  output logic                      throttled
);

  // Wide enough for CAP + R_C without overflow.
  localparam int unsigned CREDIT_W = RATE_W + $clog2(CREDIT_CAP_BYTES + 1) + 1;
  localparam logic [CREDIT_W-1:0] CAP = CREDIT_W'(CREDIT_CAP_BYTES) << RATE_FRAC;

  logic [CREDIT_W-1:0] credit_q;
  logic [CREDIT_W-1:0] credit_sum;
  logic [CREDIT_W-1:0] need;
  logic [TXB_W-1:0]    beat_bytes;
  logic                allow;
  logic                moved;

  always_comb begin
    beat_bytes = '0;
    for (int i = 0; i < DATA_BYTES; i++)
      beat_bytes = beat_bytes + TXB_W'(s_axis_tkeep[i]);
  end

  assign need  = CREDIT_W'(beat_bytes) << RATE_FRAC;
  assign allow = ~enable | (credit_q >= need);

  assign m_axis_tdata  = s_axis_tdata;
  assign m_axis_tkeep  = s_axis_tkeep;
  assign m_axis_tlast  = s_axis_tlast;
  assign m_axis_tvalid = s_axis_tvalid & allow;
  assign s_axis_tready = m_axis_tready & allow;

  assign moved     = m_axis_tvalid & m_axis_tready;
  assign tx_bytes  = moved ? beat_bytes : '0;
  assign throttled = s_axis_tvalid & m_axis_tready & ~allow;

  always_comb begin
    credit_sum = credit_q + CREDIT_W'(rc);
    if (moved)  // saturating: with enable low a beat may move uncovered
      credit_sum = (credit_sum > need) ? credit_sum - need : '0;
    if (credit_sum > CAP)
      credit_sum = CAP;
  end

  always_ff @(posedge clk) begin
    if (rst)
      credit_q <= '0;
    else
      credit_q <= credit_sum;
  end

  // Credit never goes negative: a beat moves only when it is covered.
  a_credit_cover: assert property (@(posedge clk) disable iff (rst)
                                   (moved && enable) |-> credit_q >= need);
  // The cap must hold the largest beat, or a full beat could never move.
  initial assert (CREDIT_CAP_BYTES >= DATA_BYTES);

endmodule
