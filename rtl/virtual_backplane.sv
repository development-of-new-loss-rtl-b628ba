// virtual_backplane: one node of the Virtual Backplane, a shared memory kept
// consistent across all modules connected by fibre links.
// The network port (hub port 0) is the AXI4 slave the processors use: a write
// updates the local copy and becomes an update message; the hub copies it to the
// N_LINKS link ports (hub ports 1..N_LINKS), whose 64B/66B transmitters send it to the
// neighbouring modules. Messages received on a link are written into the local copy
// and passed on to the other links while their hop count lasts, so that a write reaches
// every module of a chain, star or ring. Lost messages are not repeated by the
// hardware; the processors rewrite all their data periodically (10 kHz in the
// document), which repairs any loss. Local writes leave at most one per TX_GAP clocks
// so that several nodes writing at once do not overflow the hubs. Latency from an AXI
// write to the neighbour's
// memory: about 8 clocks (hub FIFOs, block register, receiver register) plus the
// transceivers and fibre. Three link ports and the overall structure follow the
// document; everything about message format and forwarding is this design's choice.
module virtual_backplane
  import lm_pkg::*;
#(
  parameter int unsigned N_LINKS    = 3,
  parameter int unsigned ADDR_W     = 10,
  parameter int unsigned ID_W       = 4,
  parameter logic [3:0]  NODE_ID    = 4'd1,
  parameter logic [3:0]  MAX_HOPS   = 4'd7,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned TX_GAP     = 8,
  parameter int unsigned LOCK_GOOD  = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [ID_W-1:0]                 s_axi_awid,
  input  logic [ADDR_W+1:0]               s_axi_awaddr,
  input  logic [7:0]                      s_axi_awlen,
  input  logic [2:0]                      s_axi_awsize,
  input  logic [1:0]                      s_axi_awburst,
  input  logic                            s_axi_awvalid,
  output logic                            s_axi_awready,
  input  logic [31:0]                     s_axi_wdata,
  input  logic [3:0]                      s_axi_wstrb,
  input  logic                            s_axi_wlast,
  input  logic                            s_axi_wvalid,
  output logic                            s_axi_wready,
  output logic [ID_W-1:0]                 s_axi_bid,
  output logic [1:0]                      s_axi_bresp,
  output logic                            s_axi_bvalid,
  input  logic                            s_axi_bready,
  input  logic [ID_W-1:0]                 s_axi_arid,
  input  logic [ADDR_W+1:0]               s_axi_araddr,
  input  logic [7:0]                      s_axi_arlen,
  input  logic [2:0]                      s_axi_arsize,
  input  logic [1:0]                      s_axi_arburst,
  input  logic                            s_axi_arvalid,
  output logic                            s_axi_arready,
  output logic [ID_W-1:0]                 s_axi_rid,
  output logic [31:0]                     s_axi_rdata,
  output logic                            s_axi_rlast,
  output logic [1:0]                      s_axi_rresp,
  output logic                            s_axi_rvalid,
  input  logic                            s_axi_rready,
  // transceivers
  input  logic [N_LINKS-1:0]              link_tx_blk_en,
  output logic [N_LINKS-1:0][65:0]        link_tx_block,
  input  logic [N_LINKS-1:0][65:0]        link_rx_block,
  input  logic [N_LINKS-1:0]              link_rx_block_valid,
  output logic [N_LINKS-1:0]              link_rx_slip,
  output logic [N_LINKS-1:0]              link_locked,
  // status
  output logic [31:0]                     hub_drops,
  output logic [31:0]                     hub_forwards,
  output logic [N_LINKS-1:0][31:0]        link_bcc_errors,
  output logic [N_LINKS-1:0][31:0]        link_sent,
  output logic [N_LINKS-1:0][31:0]        link_lock_losses,
  output logic [31:0]                     updates_received
);

  localparam int unsigned NP = N_LINKS + 1;

  logic    [NP-1:0] h_in_valid, h_in_ready, h_out_valid, h_out_ready;
  vb_msg_t [NP-1:0] h_in_msg, h_out_msg;

  vb_network_port #(.ADDR_W(ADDR_W), .ID_W(ID_W), .NODE_ID(NODE_ID), .MAX_HOPS(MAX_HOPS),
                    .TX_GAP(TX_GAP)) u_np (
    .clk, .rst_n,
    .s_axi_awid, .s_axi_awaddr, .s_axi_awlen, .s_axi_awsize, .s_axi_awburst,
    .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb, .s_axi_wlast,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bid, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_arid, .s_axi_araddr, .s_axi_arlen, .s_axi_arsize, .s_axi_arburst,
    .s_axi_arvalid, .s_axi_arready, .s_axi_rid, .s_axi_rdata, .s_axi_rresp, .s_axi_rlast,
    .s_axi_rvalid, .s_axi_rready,
    .tx_valid(h_in_valid[0]), .tx_msg(h_in_msg[0]), .tx_ready(h_in_ready[0]),
    .rx_valid(h_out_valid[0]), .rx_msg(h_out_msg[0]), .rx_ready(h_out_ready[0]),
    .rx_update_count(updates_received));

  vb_hub #(.N_PORTS(NP), .FIFO_DEPTH(FIFO_DEPTH), .NODE_ID(NODE_ID)) u_hub (
    .clk, .rst_n,
    .in_valid(h_in_valid), .in_msg(h_in_msg), .in_ready(h_in_ready),
    .out_valid(h_out_valid), .out_msg(h_out_msg), .out_ready(h_out_ready),
    .drop_count(hub_drops), .fwd_count(hub_forwards));

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    vb_link_port #(.LOCK_GOOD(LOCK_GOOD)) u_link (
      .clk, .rst_n,
      .tx_valid(h_out_valid[l+1]), .tx_msg(h_out_msg[l+1]), .tx_ready(h_out_ready[l+1]),
      .rx_valid(h_in_valid[l+1]), .rx_msg(h_in_msg[l+1]),
      .tx_blk_en(link_tx_blk_en[l]), .tx_block(link_tx_block[l]),
      .rx_block(link_rx_block[l]), .rx_block_valid(link_rx_block_valid[l]),
      .rx_slip(link_rx_slip[l]), .locked(link_locked[l]),
      .sent_count(link_sent[l]), .bcc_errors(link_bcc_errors[l]),
      .lock_losses(link_lock_losses[l]));
  end

endmodule
