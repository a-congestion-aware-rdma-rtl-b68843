// cnp_sync: rising-edge synchronizer for the CNP reception port.
//
// The inbound MAC path raises cnp_in while it recognises a Congestion
// Notification Packet. This block passes cnp_in through SYNC_STAGES flip-flops
// into the local clock domain and emits a single-cycle pulse, cnp_pulse, on
// each rising edge of the synchronised level. A level held high for many
// cycles therefore counts as one CNP; a new CNP needs the input to fall first.
//
// The document names a rising-edge synchronizer feeding the CNP to the
// DCQCN sub-processes; the two-stage depth and the synchronous active-high
// reset are choices of this design.
//
// Timing: cnp_pulse rises SYNC_STAGES clock edges after the edge that first
// samples cnp_in high, and stays high for one cycle. SYNC_STAGES must be at
// least 2.
module cnp_sync #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic cnp_in,
  output logic cnp_pulse
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   level_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q    <= '0;
      level_q   <= 1'b0;
      cnp_pulse <= 1'b0;
    end else begin
      sync_q    <= {sync_q[SYNC_STAGES-2:0], cnp_in};
      level_q   <= sync_q[SYNC_STAGES-1];
      cnp_pulse <= sync_q[SYNC_STAGES-1] & ~level_q;
    end
  end

endmodule
