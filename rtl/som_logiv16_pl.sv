// som_logiv16_pl: programmable logic of one SoM-LogIV16 loss-monitor module.
// Two independent parts share the FPGA:
//  * the ADC acquisition core (clock clk_acq, 200 MHz): 16 ADCs read over parallel
//    SPI buses at 1 MSps, time-stamped, decimated to 10 kSps and streamed as 128-bit
//    AXI-Stream frames to the DDR4 buffer, with an interrupt for the real-time cores;
//  * one Virtual Backplane node (clock clk_vb, 156.25 MHz): a shared memory behind an
//    AXI4 slave, kept equal across modules over three 64B/66B fibre links.
// They exchange no signals inside the logic: the processors read the acquired data from
// DDR4 and publish what other modules need through the shared memory. The processing
// system, DDR4 controller, AXI interconnect and serial transceivers are outside; their
// connections are this module's ports. Resets are active low, one per clock domain,
// and must be released synchronously to their clock.
module som_logiv16_pl
  import lm_pkg::*;
#(
  parameter int unsigned N_CH    = lm_pkg::CH_COUNT,
  parameter int unsigned N_LINKS = 3,
  parameter int unsigned VB_AW   = 10,
  parameter logic [3:0]  NODE_ID = 4'd1
) (
  input  logic                     clk_acq,
  input  logic                     rst_acq_n,
  input  logic                     clk_vb,
  input  logic                     rst_vb_n,
  // ADC SPI buses
  output logic [N_CH-1:0]          adc_convst,
  output logic [N_CH-1:0]          adc_cs_n,
  output logic [N_CH-1:0]          adc_sclk,
  input  logic [N_CH-1:0]          adc_sdo,
  // AXI-Stream to the DDR4 buffer
  output logic [AXIS_WIDTH-1:0]        m_axis_tdata,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,
  output logic                     m_axis_tlast,
  output logic                     irq,
  // AXI4-Lite: acquisition registers
  input  logic [7:0]               acq_awaddr,
  input  logic                     acq_awvalid,
  output logic                     acq_awready,
  input  logic [31:0]              acq_wdata,
  input  logic [3:0]               acq_wstrb,
  input  logic                     acq_wvalid,
  output logic                     acq_wready,
  output logic [1:0]               acq_bresp,
  output logic                     acq_bvalid,
  input  logic                     acq_bready,
  input  logic [7:0]               acq_araddr,
  input  logic                     acq_arvalid,
  output logic                     acq_arready,
  output logic [31:0]              acq_rdata,
  output logic [1:0]               acq_rresp,
  output logic                     acq_rvalid,
  input  logic                     acq_rready,
  // AXI4: shared memory
  input  logic [3:0]               vb_awid,
  input  logic [VB_AW+1:0]         vb_awaddr,
  input  logic [7:0]               vb_awlen,
  input  logic [2:0]               vb_awsize,
  input  logic [1:0]               vb_awburst,
  input  logic                     vb_awvalid,
  output logic                     vb_awready,
  input  logic [31:0]              vb_wdata,
  input  logic [3:0]               vb_wstrb,
  input  logic                     vb_wlast,
  input  logic                     vb_wvalid,
  output logic                     vb_wready,
  output logic [3:0]               vb_bid,
  output logic [1:0]               vb_bresp,
  output logic                     vb_bvalid,
  input  logic                     vb_bready,
  input  logic [3:0]               vb_arid,
  input  logic [VB_AW+1:0]         vb_araddr,
  input  logic [7:0]               vb_arlen,
  input  logic [2:0]               vb_arsize,
  input  logic [1:0]               vb_arburst,
  input  logic                     vb_arvalid,
  output logic                     vb_arready,
  output logic [3:0]               vb_rid,
  output logic [31:0]              vb_rdata,
  output logic                     vb_rlast,
  output logic [1:0]               vb_rresp,
  output logic                     vb_rvalid,
  input  logic                     vb_rready,
  // serial transceivers of the link ports
  input  logic [N_LINKS-1:0]       link_tx_blk_en,
  output logic [N_LINKS-1:0][65:0] link_tx_block,
  input  logic [N_LINKS-1:0][65:0] link_rx_block,
  input  logic [N_LINKS-1:0]       link_rx_block_valid,
  output logic [N_LINKS-1:0]       link_rx_slip,
  output logic [N_LINKS-1:0]       link_locked,
  // backplane status
  output logic [31:0]              vb_hub_drops,
  output logic [31:0]              vb_hub_forwards,
  output logic [N_LINKS-1:0][31:0] vb_bcc_errors,
  output logic [N_LINKS-1:0][31:0] vb_link_sent,
  output logic [N_LINKS-1:0][31:0] vb_lock_losses,
  output logic [31:0]              vb_updates_received
);

  adc_ip_core #(.N_CH(N_CH)) u_acq (
    .clk(clk_acq), .rst_n(rst_acq_n),
    .adc_convst, .adc_cs_n, .adc_sclk, .adc_sdo,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .s_axi_awaddr(acq_awaddr), .s_axi_awvalid(acq_awvalid), .s_axi_awready(acq_awready),
    .s_axi_wdata(acq_wdata), .s_axi_wstrb(acq_wstrb), .s_axi_wvalid(acq_wvalid),
    .s_axi_wready(acq_wready), .s_axi_bresp(acq_bresp), .s_axi_bvalid(acq_bvalid),
    .s_axi_bready(acq_bready), .s_axi_araddr(acq_araddr), .s_axi_arvalid(acq_arvalid),
    .s_axi_arready(acq_arready), .s_axi_rdata(acq_rdata), .s_axi_rresp(acq_rresp),
    .s_axi_rvalid(acq_rvalid), .s_axi_rready(acq_rready), .irq);

  virtual_backplane #(.N_LINKS(N_LINKS), .ADDR_W(VB_AW), .NODE_ID(NODE_ID)) u_vb (
    .clk(clk_vb), .rst_n(rst_vb_n),
    .s_axi_awid(vb_awid), .s_axi_awaddr(vb_awaddr), .s_axi_awlen(vb_awlen),
    .s_axi_awsize(vb_awsize), .s_axi_awburst(vb_awburst),
    .s_axi_awvalid(vb_awvalid), .s_axi_awready(vb_awready),
    .s_axi_wdata(vb_wdata), .s_axi_wstrb(vb_wstrb), .s_axi_wlast(vb_wlast),
    .s_axi_wvalid(vb_wvalid), .s_axi_wready(vb_wready), .s_axi_bid(vb_bid),
    .s_axi_bresp(vb_bresp), .s_axi_bvalid(vb_bvalid), .s_axi_bready(vb_bready),
    .s_axi_arid(vb_arid), .s_axi_araddr(vb_araddr), .s_axi_arlen(vb_arlen),
    .s_axi_arsize(vb_arsize), .s_axi_arburst(vb_arburst),
    .s_axi_arvalid(vb_arvalid), .s_axi_arready(vb_arready), .s_axi_rid(vb_rid),
    .s_axi_rdata(vb_rdata), .s_axi_rresp(vb_rresp), .s_axi_rlast(vb_rlast),
    .s_axi_rvalid(vb_rvalid), .s_axi_rready(vb_rready),
    .link_tx_blk_en, .link_tx_block, .link_rx_block, .link_rx_block_valid,
    .link_rx_slip, .link_locked,
    .hub_drops(vb_hub_drops), .hub_forwards(vb_hub_forwards),
    .link_bcc_errors(vb_bcc_errors), .link_sent(vb_link_sent),
    .link_lock_losses(vb_lock_losses), .updates_received(vb_updates_received));

endmodule
