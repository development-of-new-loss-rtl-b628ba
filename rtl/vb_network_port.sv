// vb_network_port: port 0 of the Virtual Backplane, the processors' view of the shared
// memory.
// An AXI4 slave, 32-bit data, byte address = 4 * word address, with INCR and FIXED
// bursts of up to 256 beats (WRAP is treated as INCR); one write burst and one read
// burst are handled at a time, independently of each other.
//   write: each W beat stores its word in the local DPRAM and, in the same clock, is
//          encoded into an update message {NODE_ID, MAX_HOPS, word address, data} that
//          leaves on the tx stream towards the hub. A beat waits (wready low) while the
//          hub cannot take the message or while a decoded update uses the DPRAM. Beats
//          are whole words (wstrb is not used). B (with the burst's ID) follows the beat
//          marked wlast. Local messages leave at most one every TX_GAP clocks: the links
//          have no back-pressure, and in a ring of three every hub takes in about seven
//          times one node's send rate (own writes plus copies forwarded both ways), so
//          unpaced bursts from several nodes at once would overflow the hub FIFOs. At the
//          default of 8 the whole 1024-word memory still leaves in 8192 clocks, well
//          inside one 10 kHz refresh period (15625 clocks at 156.25 MHz).
//   read:  returns the local DPRAM words, one beat every two clocks, rlast on the last.
// Messages from the hub (rx) are decoded and written into the DPRAM; they cannot be
// refused (rx is always ready), matching a network with no back-pressure. A message
// with this node's own ID, or with an address outside the memory, is discarded.
// The AXI4 slave, WRITE/ENCODE/DECODE, DPRAM and stream duplex structure follows the
// document; burst handling, message fields, the send pacing and the loop rule are this
// design's choices.
module vb_network_port
  import lm_pkg::*;
#(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned ID_W     = 4,
  parameter logic [3:0]  NODE_ID  = 4'd1,
  parameter logic [3:0]  MAX_HOPS = 4'd7,
  parameter int unsigned TX_GAP   = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ID_W-1:0]     s_axi_awid,
  input  logic [ADDR_W+1:0]   s_axi_awaddr,
  input  logic [7:0]          s_axi_awlen,
  input  logic [2:0]          s_axi_awsize,
  input  logic [1:0]          s_axi_awburst,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wlast,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [ID_W-1:0]     s_axi_bid,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [ID_W-1:0]     s_axi_arid,
  input  logic [ADDR_W+1:0]   s_axi_araddr,
  input  logic [7:0]          s_axi_arlen,
  input  logic [2:0]          s_axi_arsize,
  input  logic [1:0]          s_axi_arburst,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [ID_W-1:0]     s_axi_rid,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rlast,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // stream duplex to the hub
  output logic                tx_valid,
  output vb_msg_t             tx_msg,
  input  logic                tx_ready,
  input  logic                rx_valid,
  input  vb_msg_t             rx_msg,
  output logic                rx_ready,
  output logic [31:0]         rx_update_count
);

  localparam logic [1:0] BURST_FIXED = 2'b00;

  // write burst state
  logic              w_active;
  logic [ADDR_W-1:0] w_addr;
  logic              w_fixed;
  logic [ID_W-1:0]   w_id;
  // read burst state
  typedef enum logic [1:0] {R_IDLE, R_ISSUE, R_WAIT, R_SEND} rstate_t;
  rstate_t           r_state;
  logic [ADDR_W-1:0] r_addr;
  logic              r_fixed;
  logic [7:0]        r_left;

  logic              rx_write;
  logic              local_write;
  logic              we;
  logic [ADDR_W-1:0] waddr;
  logic [31:0]       wdata;
  logic [31:0]       ram_q;
  logic [7:0]        gap_cnt;

  // DECODE
  assign rx_ready = 1'b1;
  assign rx_write = rx_valid && (rx_msg.src != NODE_ID) &&
                    (rx_msg.addr < 16'(2**ADDR_W));

  // WRITE + ENCODE
  assign s_axi_awready = !w_active && !s_axi_bvalid;
  assign tx_valid      = w_active && s_axi_wvalid && !rx_write && (gap_cnt == '0);
  assign tx_msg        = '{src: NODE_ID, hops: MAX_HOPS, addr: 16'(w_addr), data: s_axi_wdata};
  assign local_write   = tx_valid && tx_ready;
  assign s_axi_wready  = local_write;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  always_comb begin
    we    = rx_write || local_write;
    waddr = rx_write ? rx_msg.addr[ADDR_W-1:0] : w_addr;
    wdata = rx_write ? rx_msg.data : s_axi_wdata;
  end

  assign s_axi_arready = (r_state == R_IDLE);

  vb_dpram #(.ADDR_W(ADDR_W), .DATA_W(32)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr(r_addr), .rdata(ram_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_active        <= 1'b0;
      w_addr          <= '0;
      w_fixed         <= 1'b0;
      w_id            <= '0;
      s_axi_bid       <= '0;
      s_axi_bvalid    <= 1'b0;
      rx_update_count <= '0;
      gap_cnt         <= '0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (local_write)          gap_cnt <= 8'(TX_GAP - 1);
      else if (gap_cnt != '0)   gap_cnt <= gap_cnt - 1'b1;
      if (s_axi_awvalid && s_axi_awready) begin
        w_active <= 1'b1;
        w_addr   <= s_axi_awaddr[ADDR_W+1:2];
        w_fixed  <= (s_axi_awburst == BURST_FIXED);
        w_id     <= s_axi_awid;
      end
      if (local_write) begin
        if (!w_fixed) w_addr <= w_addr + 1'b1;
        if (s_axi_wlast) begin
          w_active     <= 1'b0;
          s_axi_bvalid <= 1'b1;
          s_axi_bid    <= w_id;
        end
      end
      if (rx_write) rx_update_count <= rx_update_count + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_state      <= R_IDLE;
      r_addr       <= '0;
      r_fixed      <= 1'b0;
      r_left       <= '0;
      s_axi_rid    <= '0;
      s_axi_rdata  <= '0;
      s_axi_rlast  <= 1'b0;
      s_axi_rvalid <= 1'b0;
    end else begin
      unique case (r_state)
        R_IDLE: if (s_axi_arvalid) begin
          r_addr    <= s_axi_araddr[ADDR_W+1:2];
          r_fixed   <= (s_axi_arburst == BURST_FIXED);
          r_left    <= s_axi_arlen;
          s_axi_rid <= s_axi_arid;
          r_state   <= R_ISSUE;
        end
        R_ISSUE: r_state <= R_WAIT;           // DPRAM samples r_addr
        R_WAIT: begin
          s_axi_rdata  <= ram_q;
          s_axi_rlast  <= (r_left == 8'd0);
          s_axi_rvalid <= 1'b1;
          r_state      <= R_SEND;
        end
        R_SEND: if (s_axi_rready) begin
          s_axi_rvalid <= 1'b0;
          s_axi_rlast  <= 1'b0;
          if (r_left == 8'd0) begin
            r_state <= R_IDLE;
          end else begin
            r_left  <= r_left - 8'd1;
            if (!r_fixed) r_addr <= r_addr + 1'b1;
            r_state <= R_ISSUE;
          end
        end
        default: r_state <= R_IDLE;
      endcase
    end
  end

  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_rvalid && !s_axi_rready) |=>
                            (s_axi_rvalid && $stable(s_axi_rdata) && $stable(s_axi_rlast)));

endmodule
