// vb_link_rx: receive half of a fibre link port, 64B/66B decoding.
// Takes one 66-bit block per clock with rx_block_valid (sync header in bits [1:0]).
// Block lock: out of lock, every block with a valid sync header (01 or 10) counts
// towards LOCK_GOOD; a block with an invalid header requests a one-block slip of the
// transceiver's alignment (rx_slip, one clock) and restarts the count. In lock, the
// blocks are watched in windows of 64; BAD_LIMIT invalid headers in one window drop the
// lock. Payloads are descrambled (x^58 + x^39 + 1) whether locked or not, so the
// descrambler is already in step when lock is reached. In lock, a data block whose BCC
// matches the CRC-8 of its message bits is delivered on rx_valid/rx_msg the next clock;
// one that does not is discarded and counted in bcc_errors. Idle blocks are ignored.
// There is no retransmission. Follows the document's 64B/66B coding and BCC check;
// the lock procedure is the usual 10GBASE-R one with this design's thresholds.
module vb_link_rx
  import lm_pkg::*;
#(
  parameter int unsigned LOCK_GOOD = 64,
  parameter int unsigned BAD_LIMIT = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [65:0] rx_block,
  input  logic        rx_block_valid,
  output logic        rx_slip,
  output logic        locked,
  output logic        rx_valid,
  output vb_msg_t     rx_msg,
  output logic [31:0] bcc_errors,
  output logic [31:0] lock_losses
);

  logic [57:0] dsc, dsc_next;
  logic [63:0] payload;
  logic [1:0]  sh;
  logic        sh_ok;
  logic [6:0]  good_cnt;
  logic [5:0]  win_cnt;
  logic [4:0]  bad_cnt;
  vb_msg_t     msg;

  assign sh    = rx_block[1:0];
  assign sh_ok = (sh == SH_DATA) || (sh == SH_CTRL);

  always_comb begin
    dsc_next = dsc;
    for (int i = 0; i < 64; i++) begin
      payload[i] = rx_block[i+2] ^ dsc_next[38] ^ dsc_next[57];
      dsc_next   = {dsc_next[56:0], rx_block[i+2]};
    end
    msg = vb_msg_t'(payload[MSG_W-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsc         <= '0;
      good_cnt    <= '0;
      win_cnt     <= '0;
      bad_cnt     <= '0;
      locked      <= 1'b0;
      rx_slip     <= 1'b0;
      rx_valid    <= 1'b0;
      rx_msg      <= '0;
      bcc_errors  <= '0;
      lock_losses <= '0;
    end else begin
      rx_slip  <= 1'b0;
      rx_valid <= 1'b0;
      if (rx_block_valid) begin
        dsc <= dsc_next;
        if (!locked) begin
          if (!sh_ok) begin
            rx_slip  <= 1'b1;
            good_cnt <= '0;
          end else if (good_cnt == 7'(LOCK_GOOD - 1)) begin
            locked   <= 1'b1;
            good_cnt <= '0;
            win_cnt  <= '0;
            bad_cnt  <= '0;
          end else begin
            good_cnt <= good_cnt + 1'b1;
          end
        end else begin
          win_cnt <= win_cnt + 1'b1;
          if (!sh_ok && bad_cnt == 5'(BAD_LIMIT - 1)) begin
            locked      <= 1'b0;
            rx_slip     <= 1'b1;
            lock_losses <= lock_losses + 1'b1;
            bad_cnt     <= '0;
          end else if (win_cnt == 6'd63) begin
            bad_cnt <= '0;
          end else if (!sh_ok) begin
            bad_cnt <= bad_cnt + 1'b1;
          end
          if (sh == SH_DATA) begin
            if (payload[63:56] == bcc8(payload[MSG_W-1:0])) begin
              rx_valid <= 1'b1;
              rx_msg   <= msg;
            end else begin
              bcc_errors <= bcc_errors + 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
