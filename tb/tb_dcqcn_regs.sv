// tb_dcqcn_regs: self-checking test of the AXI4-Lite register file.
//
// Checks the reset values against the hardware parameter set converted by
// hand to 156.25 MHz cycles and the fixed-point rate unit (g = 1/256 -> 256,
// 6 MB/s -> 40265, 12 MB/s -> 80531, 40 us -> 6250, 3 us -> 469,
// 2 ms -> 312500 cycles, F = 5, enable and ClampTargetRate set), then
// writes and reads back every writable register, checks byte strobes, the
// read-only monitoring registers, the cfg outputs, and that responses wait
// for a late BREADY / RREADY.
module tb_dcqcn_regs;
  import dcqcn_pkg::*;

  logic          clk = 1'b0;
  logic          rst;
  logic [7:0]    awaddr, araddr;
  logic          awvalid, awready, wvalid, wready, bvalid, bready;
  logic          arvalid, arready, rvalid, rready;
  logic [31:0]   wdata, rdata;
  logic [3:0]    wstrb;
  logic [1:0]    bresp, rresp;
  dcqcn_cfg_t    cfg;
  dcqcn_status_t status;
  int            checks = 0, failures = 0;

  dcqcn_regs dut (
    .clk, .rst,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .cfg, .status);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++; $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic axil_write(logic [7:0] a, logic [31:0] d, logic [3:0] s = 4'hF, int bdelay = 0);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b0;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 1'b0; wvalid = 1'b0;
    repeat (bdelay) begin
      @(negedge clk);
      checks++;
      if (!bvalid) begin failures++; $display("FAIL bvalid dropped before bready"); end
    end
    @(negedge clk) bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    check("bresp", bresp, 0);
    #1 bready = 1'b0;
  endtask

  task automatic axil_read(logic [7:0] a, output logic [31:0] d, input int rdelay = 0);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b0;
    do @(posedge clk); while (!arready);
    #1 arvalid = 1'b0;
    repeat (rdelay) @(negedge clk);
    @(negedge clk) rready = 1'b1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    check("rresp", rresp, 0);
    #1 rready = 1'b0;
  endtask

  logic [31:0] d;
  localparam logic [7:0] RW_ADDR [9] = '{8'h00, 8'h04, 8'h08, 8'h0C, 8'h10, 8'h14, 8'h18, 8'h1C, 8'h20};
  localparam longint     RESET   [9] = '{3, 256, 40265, 80531, 6250, 469, 312500, 10485760, 5};
  localparam longint     MASKS   [9] = '{3, 'hFFFF, 'hFFFFFF, 'hFFFFFF, 'hFFFFFFFF, 'hFFFFFFFF,
                                         'hFFFFFFFF, 'hFFFFFFFF, 'hFF};

  initial begin
    rst = 1'b1;
    awaddr = '0; araddr = '0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    wdata = '0; wstrb = '0;
    status = '{rc: 24'h123456, rt: 24'h654321, alpha: 17'h1ABCD, f: 8'd7, cnp_count: 32'd99};
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Reset values.
    for (int i = 0; i < 9; i++) begin
      axil_read(RW_ADDR[i], d);
      check($sformatf("reset value @%0h", RW_ADDR[i]), d, RESET[i]);
    end
    check("cfg.enable reset", cfg.enable, 1);
    check("cfg.clamp reset", cfg.clamp_target, 1);
    check("cfg.inc_interval reset", cfg.inc_interval, 312500);

    // Read-only monitoring registers.
    axil_read(8'h24, d, 3); check("RC", d, 'h123456);
    axil_read(8'h28, d);    check("RT", d, 'h654321);
    axil_read(8'h2C, d);    check("ALPHA", d, 'h1ABCD);
    axil_read(8'h30, d);    check("STAGE", d, 7);
    axil_read(8'h34, d);    check("CNP_COUNT", d, 99);
    axil_write(8'h24, 32'h0);
    axil_read(8'h24, d);    check("RC not writable", d, 'h123456);
    axil_read(8'h80, d);    check("unmapped reads zero", d, 0);

    // Write / read back every writable register with random data.
    for (int i = 0; i < 9; i++) begin
      logic [31:0] v;
      v = $urandom();
      axil_write(RW_ADDR[i], v, 4'hF, i % 3);
      axil_read(RW_ADDR[i], d);
      check($sformatf("readback @%0h", RW_ADDR[i]), d, longint'(v) & MASKS[i]);
    end

    // Field outputs follow the registers.
    axil_write(8'h00, 32'h2);          // enable off, clamp on
    check("cfg.enable", cfg.enable, 0);
    check("cfg.clamp", cfg.clamp_target, 1);
    axil_write(8'h18, 32'd12345);
    check("cfg.inc_interval", cfg.inc_interval, 12345);
    axil_write(8'h08, 32'h00ABCDEF);
    check("cfg.r_ai", cfg.r_ai, 'hABCDEF);

    // Byte strobes: only byte 1 of BYTE_THRESHOLD changes.
    axil_write(8'h1C, 32'h11223344);
    axil_write(8'h1C, 32'hAAAAAAAA, 4'b0010);
    axil_read(8'h1C, d);
    check("wstrb", d, 'h1122AA44);
    check("cfg.byte_threshold", cfg.byte_threshold, 'h1122AA44);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
