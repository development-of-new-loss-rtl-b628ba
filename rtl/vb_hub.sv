// vb_hub: round-robin message hub of one Virtual Backplane node.
// Port 0 is the local network port, ports 1..N_PORTS-1 are fibre link ports. Every
// port has an RX FIFO (messages arriving from the port) and a TX FIFO (messages
// leaving to it). Each clock a round-robin arbiter picks one non-empty RX FIFO and
// copies its head message into the TX FIFOs of the other ports:
//   from port 0 (a local write):  to every link port, hop count unchanged;
//   from a link port:             to port 0 always, and to the other link ports only
//                                 while the hop count is non-zero, decremented by one;
//                                 a message that carries this node's own ID has come
//                                 back around a loop and goes nowhere.
// The hop count bounds how far a message travels in a ring or mesh of modules. There
// is no back-pressure across the network: a message that meets a full FIFO is lost and
// counted in drop_count. Throughput is one message per clock through the hub.
// RX/TX FIFOs per port and round-robin service follow the document; the forwarding
// rule, the hop count and the FIFO depth are this design's choices.
module vb_hub
  import lm_pkg::*;
#(
  parameter int unsigned N_PORTS    = 4,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter logic [3:0]  NODE_ID    = 4'd1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic    [N_PORTS-1:0] in_valid,
  input  vb_msg_t [N_PORTS-1:0] in_msg,
  output logic    [N_PORTS-1:0] in_ready,
  output logic    [N_PORTS-1:0] out_valid,
  output vb_msg_t [N_PORTS-1:0] out_msg,
  input  logic    [N_PORTS-1:0] out_ready,
  output logic    [31:0]        drop_count,
  output logic    [31:0]        fwd_count
);

  logic    [N_PORTS-1:0] rx_full, rx_empty, rx_pop;
  vb_msg_t [N_PORTS-1:0] rx_head;
  logic    [N_PORTS-1:0] tx_full, tx_empty, tx_push;
  vb_msg_t [N_PORTS-1:0] tx_data;
  logic    [N_PORTS-1:0] grant;
  vb_msg_t               sel;
  logic    [N_PORTS-1:0] from_port;
  logic    [N_PORTS-1:0] want;
  logic    [$clog2(2*N_PORTS+1)-1:0] drops;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_rx (
      .clk, .rst_n, .wr_en(in_valid[p]), .wr_data(in_msg[p]), .full(rx_full[p]),
      .rd_en(rx_pop[p]), .rd_data(rx_head[p]), .empty(rx_empty[p]));
    sync_fifo #(.WIDTH(MSG_W), .DEPTH(FIFO_DEPTH)) u_tx (
      .clk, .rst_n, .wr_en(tx_push[p]), .wr_data(tx_data[p]), .full(tx_full[p]),
      .rd_en(out_ready[p]), .rd_data(out_msg[p]), .empty(tx_empty[p]));
    assign in_ready[p]  = !rx_full[p];
    assign out_valid[p] = !tx_empty[p];
  end

  rr_arbiter #(.N(N_PORTS)) u_arb (
    .clk, .rst_n, .req(~rx_empty), .advance(1'b1), .grant);

  assign rx_pop    = grant;
  assign from_port = grant;

  always_comb begin
    sel = '0;
    for (int p = 0; p < N_PORTS; p++) if (grant[p]) sel = rx_head[p];
    want    = '0;
    tx_data = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      tx_data[p] = sel;
      if (|grant && !from_port[p] && (from_port[0] || sel.src != NODE_ID)) begin
        if (p == 0) begin
          want[p] = 1'b1;
        end else if (from_port[0]) begin
          want[p] = 1'b1;
        end else if (sel.hops != 4'd0) begin
          want[p]         = 1'b1;
          tx_data[p].hops = sel.hops - 4'd1;
        end
      end
    end
    tx_push = want & ~tx_full;
    drops   = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      drops = drops + $bits(drops)'(want[p] & tx_full[p]) + $bits(drops)'(in_valid[p] & rx_full[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_count <= '0;
      fwd_count  <= '0;
    end else begin
      drop_count <= drop_count + 32'(drops);
      if (|grant) fwd_count <= fwd_count + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
