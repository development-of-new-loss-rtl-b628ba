// lm_pkg: types and constants shared by the loss-monitor programmable logic.
// The ADC acquisition side uses 16 channels of 18-bit samples taken at 1 MSps and
// decimated to 10 kSps. The Virtual Backplane side moves 56-bit update messages
// (source node, hop count, word address, 32-bit data) between the network port, the
// hub and the 64B/66B link ports. Channel count, sample width, 128-bit stream width and
// 32 data bits per link block follow the document; the message fields, the CRC-8 block
// check character and the 64B/66B constants are this design's choices (the latter per
// the usual 10GBASE-R conventions).
package lm_pkg;

  localparam int unsigned CH_COUNT  = 16;
  localparam int unsigned ADC_W     = 18;
  localparam int unsigned VAL_W     = 32;
  localparam int unsigned TS_W      = 64;
  localparam int unsigned AXIS_WIDTH = 128;

  // Virtual Backplane update message.
  typedef struct packed {
    logic [3:0]  src;    // originating node
    logic [3:0]  hops;   // remaining link-to-link hops
    logic [15:0] addr;   // 32-bit word address in the shared memory
    logic [31:0] data;
  } vb_msg_t;

  localparam int unsigned MSG_W = $bits(vb_msg_t);  // 56

  // 64B/66B constants.
  localparam logic [1:0] SH_DATA = 2'b01;
  localparam logic [1:0] SH_CTRL = 2'b10;
  localparam logic [7:0] BT_IDLE = 8'h1E;

  // Block check character: CRC-8, polynomial x^8 + x^2 + x + 1, initial value 0,
  // computed MSB first over the 56 message bits.
  function automatic logic [7:0] bcc8(input logic [MSG_W-1:0] m);
    logic [7:0] c;
    logic       fb;
    c = 8'h00;
    for (int i = MSG_W - 1; i >= 0; i--) begin
      fb = c[7] ^ m[i];
      c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

endpackage
