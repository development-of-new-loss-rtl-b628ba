// vb_link_port: full-duplex fibre link port of the Virtual Backplane (ports 1..3).
// Combines the 64B/66B transmitter (messages from the hub out to the transceiver) and
// the receiver (blocks from the transceiver back into messages for the hub). The
// transceiver, its gearbox and the SFP+ module are outside: the port exchanges one
// 66-bit block per clock with them and asks the receiver for a block slip while
// searching for lock. Received messages are pushed into the hub without waiting: if
// the hub is full they are lost, as the network has no back-pressure. See vb_link_tx
// and vb_link_rx for the coding. The duplex link port is the document's; the parallel
// block interface to the transceiver is this design's choice.
module vb_link_port
  import lm_pkg::*;
#(
  parameter int unsigned LOCK_GOOD = 64,
  parameter int unsigned BAD_LIMIT = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // hub side
  input  logic        tx_valid,
  input  vb_msg_t     tx_msg,
  output logic        tx_ready,
  output logic        rx_valid,
  output vb_msg_t     rx_msg,
  // transceiver side
  input  logic        tx_blk_en,
  output logic [65:0] tx_block,
  input  logic [65:0] rx_block,
  input  logic        rx_block_valid,
  output logic        rx_slip,
  // status
  output logic        locked,
  output logic [31:0] sent_count,
  output logic [31:0] bcc_errors,
  output logic [31:0] lock_losses
);

  vb_link_tx u_tx (
    .clk, .rst_n, .blk_en(tx_blk_en), .tx_valid, .tx_msg, .tx_ready, .tx_block,
    .sent_count);

  vb_link_rx #(.LOCK_GOOD(LOCK_GOOD), .BAD_LIMIT(BAD_LIMIT)) u_rx (
    .clk, .rst_n, .rx_block, .rx_block_valid, .rx_slip, .locked, .rx_valid, .rx_msg,
    .bcc_errors, .lock_losses);

endmodule
