// vb_link_tx: transmit half of a fibre link port, 64B/66B encoding.
// One 66-bit block is produced each clock that blk_en is high (one block per 156.25 MHz
// clock gives the 10.3125 Gbps line rate). When a message is waiting it is sent as a
// data block: sync header 01, payload {BCC, message}, where the block check character
// is the CRC-8 of the 56 message bits. Otherwise an idle control block is sent (sync
// header 10, block type 0x1E, rest zero). The 64 payload bits are scrambled with the
// self-synchronising polynomial x^58 + x^39 + 1; the sync header is not. Bit 0 of
// tx_block is sent first; bits [1:0] hold the sync header. tx_ready equals blk_en: a
// message is taken in the clock its block is formed and appears on tx_block the next
// clock. 64B/66B coding, 32 data bits per block and a BCC follow the document; the
// payload layout, the CRC and the idle block are this design's choices.
module vb_link_tx
  import lm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        blk_en,
  input  logic        tx_valid,
  input  vb_msg_t     tx_msg,
  output logic        tx_ready,
  output logic [65:0] tx_block,
  output logic [31:0] sent_count
);

  logic [57:0] scr, scr_next;
  logic [63:0] payload, scrambled;
  logic [1:0]  sh;

  assign tx_ready = blk_en;

  always_comb begin
    if (tx_valid) begin
      sh      = SH_DATA;
      payload = {bcc8(tx_msg), tx_msg};
    end else begin
      sh      = SH_CTRL;
      payload = {56'd0, BT_IDLE};
    end
    scr_next = scr;
    for (int i = 0; i < 64; i++) begin
      scrambled[i] = payload[i] ^ scr_next[38] ^ scr_next[57];
      scr_next     = {scr_next[56:0], scrambled[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scr        <= '1;
      tx_block   <= {64'd0, SH_CTRL};
      sent_count <= '0;
    end else if (blk_en) begin
      scr      <= scr_next;
      tx_block <= {scrambled, sh};
      if (tx_valid) sent_count <= sent_count + 1'b1;
    end
  end

endmodule
