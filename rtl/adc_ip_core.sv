// adc_ip_core: acquisition core for the 16 current channels of one module.
// Sixteen SPI masters read their ADCs in parallel on every sample tick of the
// controller. The controller time-stamps each sample set and marks decimation windows;
// sixteen decimation filters reduce 1 MSps to 10 kSps (average or low-pass, chosen in
// the registers). Each decimated set is packed into a 5-beat 128-bit AXI-Stream frame
// for the DDR4 buffer, and an interrupt tells the real-time processors a frame is there.
// Configuration and counters sit behind an AXI4-Lite slave (see adc_axi_regs).
// Status word of a frame: [31] filter mode that produced the frame, [30:16] 0, [15:0] overrun count.
// Latency: a decimated value leaves the filters 2 clocks after the last SPI transfer of
// its window completes and the frame's first beat is offered one clock after that.
// The block structure (SPI master, controller, AXI Stream, AXI Slave) follows the
// document's firmware architecture; clocking and formats are this design's choices.
module adc_ip_core
  import lm_pkg::*;
#(
  parameter int unsigned N_CH        = lm_pkg::CH_COUNT,
  parameter int unsigned CONV_CYCLES = 80,
  parameter int unsigned SCLK_HALF   = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ADC SPI buses
  output logic [N_CH-1:0]    adc_convst,
  output logic [N_CH-1:0]    adc_cs_n,
  output logic [N_CH-1:0]    adc_sclk,
  input  logic [N_CH-1:0]    adc_sdo,
  // stream to the DDR4 buffer
  output logic [AXIS_WIDTH-1:0]  m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast,
  // register slave
  input  logic [7:0]         s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [7:0]         s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  output logic               irq
);

  logic                       cfg_enable, cfg_mode;
  logic [15:0]                cfg_sample_div, cfg_decim;
  logic [4:0]                 cfg_shift;
  logic                       adc_start;
  logic [N_CH-1:0]            adc_valid;
  logic [N_CH-1:0]            adc_busy;
  logic [N_CH-1:0][ADC_W-1:0] adc_data;
  logic                       set_valid, set_last, overrun;
  logic [TS_W-1:0]            set_ts, now, win_ts;
  logic [N_CH-1:0][ADC_W-1:0] set_data;
  logic [N_CH-1:0]            dec_valid;
  logic [N_CH-1:0]            dec_mode;
  logic [N_CH-1:0][VAL_W-1:0] dec_data;
  logic                       frame_done;
  logic [31:0]                frame_count, drop_count, overrun_count;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    adc_spi_master #(.DATA_W(ADC_W), .CONV_CYCLES(CONV_CYCLES), .SCLK_HALF(SCLK_HALF)) u_spi (
      .clk, .rst_n, .start(adc_start),
      .convst(adc_convst[c]), .cs_n(adc_cs_n[c]), .sclk(adc_sclk[c]), .sdo(adc_sdo[c]),
      .data(adc_data[c]), .valid(adc_valid[c]), .busy(adc_busy[c]));

    decim_filter #(.IN_W(ADC_W), .OUT_W(VAL_W)) u_dec (
      .clk, .rst_n, .mode(cfg_mode), .shift(cfg_shift),
      .in_valid(set_valid), .in_last(set_last), .in_data(set_data[c]),
      .out_valid(dec_valid[c]), .out_mode(dec_mode[c]), .out_data(dec_data[c]));
  end

  acq_controller #(.N_CH(N_CH)) u_ctrl (
    .clk, .rst_n, .cfg_enable, .cfg_sample_div, .cfg_decim,
    .adc_start, .adc_valid, .adc_data,
    .set_valid, .set_last, .set_ts, .set_data, .overrun, .now);

  // Time stamp of a window = time stamp of its last sample set.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_ts        <= '0;
      overrun_count <= '0;
    end else begin
      if (set_valid && set_last) win_ts <= set_ts;
      if (overrun) overrun_count <= overrun_count + 1'b1;
    end
  end

  axis_frame_packer #(.N_CH(N_CH), .AXIS_W(AXIS_WIDTH)) u_pack (
    .clk, .rst_n, .in_valid(dec_valid[0]), .in_ts(win_ts),
    .in_status({dec_mode[0], 15'd0, overrun_count[15:0]}), .in_data(dec_data),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .frame_done, .drop_count, .frame_count);

  adc_axi_regs #(.ADDR_W(8)) u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .cfg_enable, .cfg_mode, .cfg_sample_div, .cfg_decim, .cfg_shift,
    .frame_done, .frame_count, .drop_count, .overrun_count, .now, .irq);

endmodule
