// tb_adc_spi_master: reads random 18-bit values through the SPI master from the ADC
// model and checks value, CONVST/CS_n framing and the transfer length in clocks.
module tb_adc_spi_master;
  localparam int unsigned CONV = 80;
  localparam int unsigned HALF = 1;
  localparam int unsigned EXPECT_CYC = 1 + CONV + 2 * HALF * 18 + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic convst, cs_n, sclk, sdo, valid, busy;
  logic [17:0] data, sample;
  int unsigned conversions;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  adc_spi_master #(.DATA_W(18), .CONV_CYCLES(CONV), .SCLK_HALF(HALF)) dut (
    .clk, .rst_n, .start, .convst, .cs_n, .sclk, .sdo, .data, .valid, .busy);
  adc_model #(.DATA_W(18)) adc (.convst, .cs_n, .sclk, .sdo, .sample, .conversions);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // framing rule: CONVST and CS_n are never active together
  always @(posedge clk) if (rst_n && convst && !cs_n) begin
    failures++; $display("FAIL: convst during cs");
  end

  initial begin
    int cyc;
    sample = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(cs_n && !convst && !busy, "idle state after reset");
    for (int n = 0; n < 40; n++) begin
      logic [17:0] v;
      v = (n == 0) ? 18'h3FFFF : (n == 1) ? 18'h20001 : 18'($urandom);
      sample = v;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!valid) begin @(negedge clk); cyc++; end
      check(data == v, $sformatf("data %h expected %h", data, v));
      check(cyc == EXPECT_CYC, $sformatf("latency %0d expected %0d", cyc, EXPECT_CYC));
      @(negedge clk);
      check(!busy && cs_n, "idle after transfer");
    end
    check(conversions == 40, "conversion count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
