// emulated_switch: behavioural model of a congested switch plus the CNP path.
//
// Watches the transmit stream leaving the sender and keeps the number of
// payload bytes moved in the last N_W clock cycles (a sliding window; with
// N_W = 5000 at 6.4 ns that is 32 us). Whenever that count exceeds
// threshold_bytes and at least cooldown cycles have passed since the last
// trigger, it schedules a Congestion Notification Packet: after cnp_delay
// cycles (the round trip through receiver and network) it raises cnp for
// CNP_LEN cycles, as the inbound MAC path of the sender would. threshold,
// cooldown and delay are inputs so a test can script a bottleneck that
// changes over time. This is a test model, not hardware of the design.
module emulated_switch #(
  parameter int N_W     = 5000,
  parameter int DB      = 8,
  parameter int CNP_LEN = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          beat,        // a beat moved this cycle
  input  logic [DB-1:0] beat_keep,   // its tkeep
  input  int            threshold_bytes,
  input  int            cooldown,
  input  int            cnp_delay,
  output int            window_bytes,
  output logic          cnp,
  output int            triggers
);

  byte unsigned hist [N_W];
  int           wr_ptr;
  int           since_trigger;
  longint       now;
  longint       fire_at [$];
  longint       cnp_until;

  function automatic int popc(logic [DB-1:0] k);
    int c = 0;
    for (int i = 0; i < DB; i++) c += int'(k[i]);
    return c;
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      foreach (hist[i]) hist[i] = 8'd0;
      wr_ptr        = 0;
      window_bytes  = 0;
      since_trigger = 1 << 30;
      now           = 0;
      cnp_until     = -1;
      triggers      = 0;
      fire_at.delete();
      cnp          <= 1'b0;
    end else begin
      byte unsigned nb;
      now++;
      nb = beat ? 8'(popc(beat_keep)) : 8'd0;
      window_bytes = window_bytes - int'(hist[wr_ptr]) + int'(nb);
      hist[wr_ptr] = nb;
      wr_ptr = (wr_ptr + 1 == N_W) ? 0 : wr_ptr + 1;
      if (since_trigger < (1 << 30)) since_trigger++;
      if (window_bytes > threshold_bytes && since_trigger >= cooldown) begin
        since_trigger = 0;
        triggers++;
        fire_at.push_back(now + longint'(cnp_delay));
      end
      if (fire_at.size() > 0 && fire_at[0] <= now) begin
        void'(fire_at.pop_front());
        cnp_until = now + CNP_LEN;
      end
      cnp <= (now < cnp_until);
    end
  end

endmodule
