// tb_cnp_sync: self-checking test of the CNP rising-edge synchronizer.
//
// Drives random CNP levels (short and long pulses) and compares cnp_pulse
// with a reference that delays the sampled input by the synchronizer depth
// and detects its rising edge. Also checks that a level held for many cycles
// produces exactly one pulse and that the latency is SYNC_STAGES + 1 edges.
module tb_cnp_sync;

  logic clk = 1'b0;
  logic rst;
  logic cnp_in;
  logic cnp_pulse;
  int   checks = 0, failures = 0;

  cnp_sync #(.SYNC_STAGES(2)) dut (.clk, .rst, .cnp_in, .cnp_pulse);

  always #5 clk = ~clk;

  // Reference: history of the values sampled at each rising edge.
  logic [7:0] hist = '0;
  int n_pulses = 0, n_edges = 0;

  always @(posedge clk) begin
    if (rst) hist <= '0;
    else     hist <= {hist[6:0], cnp_in};
  end

  // After the edge settles, cnp_pulse must equal hist[2] & ~hist[3] where
  // hist[0] is the value sampled at this edge.
  always @(negedge clk) if (!rst) begin
    checks++;
    if (cnp_pulse !== (hist[2] & ~hist[3])) begin
      failures++;
      $display("FAIL t=%0t pulse=%0b hist=%b", $time, cnp_pulse, hist);
    end
    if (cnp_pulse) n_pulses++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; cnp_in = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // One long level: exactly one pulse, latency 3 edges.
    @(negedge clk) cnp_in = 1'b1;
    n_edges = 0;
    while (!cnp_pulse) begin @(posedge clk); #1; n_edges++; end
    checks++;
    if (n_edges != 3) begin failures++; $display("FAIL latency %0d", n_edges); end
    repeat (50) @(negedge clk);
    cnp_in = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_pulses != 1) begin failures++; $display("FAIL long level gave %0d pulses", n_pulses); end
    // Random levels.
    repeat (2000) begin
      @(negedge clk);
      cnp_in = ($urandom_range(0, 3) == 0) ? ~cnp_in : cnp_in;
    end
    @(negedge clk) cnp_in = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_pulses < 50) begin failures++; $display("FAIL only %0d pulses", n_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
