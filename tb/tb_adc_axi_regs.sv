// tb_adc_axi_regs: writes and reads every configuration register over AXI4-Lite,
// checks reset values, read-only counters, byte strobes and the interrupt
// (set by frame_done, masked by CTRL[2], cleared by writing 1 to IRQ_STATUS).
module tb_adc_axi_regs;
  logic clk = 0, rst_n = 0;
  logic [7:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic cfg_enable, cfg_mode, irq, frame_done = 0;
  logic [15:0] cfg_sample_div, cfg_decim;
  logic [4:0] cfg_shift;
  logic [31:0] frame_count = 32'h1234_5678, drop_count = 32'h0000_00AB, overrun_count = 32'h42;
  logic [63:0] now = 64'hDEAD_BEEF_0BAD_F00D;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_axi_regs #(.ADDR_W(8)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .cfg_enable, .cfg_mode, .cfg_sample_div, .cfg_decim, .cfg_shift,
    .frame_done, .frame_count, .drop_count, .overrun_count, .now, .irq);

  `include "axil_master.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_rd(input logic [31:0] a, input logic [31:0] e);
    logic [31:0] d;
    axil_read(a, d);
    check(d == e, $sformatf("read %h: %h expected %h", a, d, e));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_rd(8'h00, 0);
    expect_rd(8'h04, 200);
    expect_rd(8'h08, 100);
    expect_rd(8'h0C, 4);
    check(!cfg_enable && cfg_sample_div == 200 && cfg_decim == 100, "reset outputs");
    axil_write(8'h00, 32'h3);
    axil_write(8'h04, 32'd150);
    axil_write(8'h08, 32'd25);
    axil_write(8'h0C, 32'd9);
    check(cfg_enable && cfg_mode && cfg_sample_div == 150 && cfg_decim == 25 && cfg_shift == 9,
          "configuration outputs");
    expect_rd(8'h00, 3);
    expect_rd(8'h04, 150);
    expect_rd(8'h08, 25);
    expect_rd(8'h0C, 9);
    // byte strobe: only the upper byte of SAMPLE_DIV changes
    @(negedge clk);
    awaddr = 8'h04; wdata = 32'h0000_0100; wstrb = 4'b0010; awvalid = 1; wvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk); bready = 0;
    expect_rd(8'h04, 32'd150 - 32'd0 + 32'h100 - (32'd150 & 32'hFF00));
    expect_rd(8'h14, 32'h1234_5678);
    expect_rd(8'h18, 32'hAB);
    expect_rd(8'h1C, 32'h42);
    expect_rd(8'h20, 32'h0BAD_F00D);
    expect_rd(8'h24, 32'hDEAD_BEEF);
    expect_rd(8'h3C, 0);
    // interrupt
    @(negedge clk); frame_done = 1; @(negedge clk); frame_done = 0;
    expect_rd(8'h10, 1);
    check(!irq, "irq masked");
    axil_write(8'h00, 32'h7);
    check(irq, "irq raised when enabled");
    axil_write(8'h10, 32'h1);
    check(!irq, "irq cleared");
    expect_rd(8'h10, 0);
    check(bresp == 0 && rresp == 0, "OKAY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
