// tb_virtual_backplane: three nodes (IDs 1, 2, 3) joined in a ring by their link
// ports. After the links lock, words written over AXI on any node must appear in the
// memories of all three; the hop limit must stop messages circling the ring; updates
// carrying a node's own ID must not be written back into it.
module tb_virtual_backplane;
  import lm_pkg::*;
  localparam int AW = 8;
  localparam int NN = 3;
  localparam int NL = 3;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0][AW+1:0] awaddr = '0, araddr = '0;
  logic [NN-1:0] awvalid = '0, wvalid = '0, bready = '0, arvalid = '0, rready = '0;
  logic [NN-1:0][31:0] wdata = '0, rdata;
  logic [NN-1:0] awready, wready, bvalid, arready, rvalid, rlast;
  logic [NN-1:0][1:0] bresp, rresp;
  logic [NN-1:0][NL-1:0][65:0] txb, rxb;
  logic [NN-1:0][NL-1:0] slip, locked;
  logic [NN-1:0][31:0] drops, fwds, updates;
  logic [NN-1:0][NL-1:0][31:0] bccerr, sent, losses;
  logic [31:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  always #3.2 clk = ~clk;

  for (genvar n = 0; n < NN; n++) begin : g_node
    virtual_backplane #(.N_LINKS(NL), .ADDR_W(AW), .NODE_ID(4'(n + 1)), .MAX_HOPS(4'd3)) u_node (
      .clk, .rst_n,
      .s_axi_awid(4'(n)), .s_axi_awaddr(awaddr[n]), .s_axi_awlen(8'd0), .s_axi_awsize(3'd2),
      .s_axi_awburst(2'b01), .s_axi_awvalid(awvalid[n]), .s_axi_awready(awready[n]),
      .s_axi_wdata(wdata[n]), .s_axi_wstrb(4'hF), .s_axi_wlast(1'b1), .s_axi_wvalid(wvalid[n]),
      .s_axi_wready(wready[n]), .s_axi_bid(), .s_axi_bresp(bresp[n]), .s_axi_bvalid(bvalid[n]),
      .s_axi_bready(bready[n]), .s_axi_arid(4'(n)), .s_axi_araddr(araddr[n]),
      .s_axi_arlen(8'd0), .s_axi_arsize(3'd2), .s_axi_arburst(2'b01), .s_axi_arvalid(arvalid[n]),
      .s_axi_arready(arready[n]), .s_axi_rid(), .s_axi_rdata(rdata[n]), .s_axi_rresp(rresp[n]),
      .s_axi_rlast(rlast[n]),
      .s_axi_rvalid(rvalid[n]), .s_axi_rready(rready[n]),
      .link_tx_blk_en('1), .link_tx_block(txb[n]), .link_rx_block(rxb[n]),
      .link_rx_block_valid('1), .link_rx_slip(slip[n]), .link_locked(locked[n]),
      .hub_drops(drops[n]), .hub_forwards(fwds[n]), .link_bcc_errors(bccerr[n]),
      .link_sent(sent[n]), .link_lock_losses(losses[n]), .updates_received(updates[n]));
  end

  // ring: node0.link0 - node1.link0, node1.link1 - node2.link0, node2.link1 - node0.link1;
  // link 2 of every node is looped back to itself
  always_comb begin
    rxb[1][0] = txb[0][0]; rxb[0][0] = txb[1][0];
    rxb[2][0] = txb[1][1]; rxb[1][1] = txb[2][0];
    rxb[0][1] = txb[2][1]; rxb[2][1] = txb[0][1];
    for (int n = 0; n < NN; n++) rxb[n][2] = txb[n][2];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int n, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr[n] = (AW+2)'(a); wdata[n] = d; awvalid[n] = 1; wvalid[n] = 1; bready[n] = 1;
    fork
      begin do @(posedge clk); while (!awready[n]); @(negedge clk); awvalid[n] = 0; end
      begin do @(posedge clk); while (!wready[n]);  @(negedge clk); wvalid[n] = 0; end
    join
    while (!bvalid[n]) @(negedge clk);
    @(negedge clk); bready[n] = 0;
  endtask

  task automatic rd(input int n, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr[n] = (AW+2)'(a); arvalid[n] = 1; rready[n] = 1;
    do @(posedge clk); while (!arready[n]);
    @(negedge clk); arvalid[n] = 0;
    while (!rvalid[n]) @(negedge clk);
    d = rdata[n];
    check(rlast[n], "single read carries rlast");
    @(negedge clk); rready[n] = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, f0, f1;
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&locked);
    check(1'b1, "all links locked");
    for (int k = 0; k < 60; k++) begin
      automatic int n = $urandom % NN;
      automatic int a = $urandom % (2**AW);
      automatic logic [31:0] v = $urandom;
      wr(n, 32'(a * 4), v);
      ref_mem[a] = v;
      repeat (40) @(negedge clk);   // a 10 kHz update cycle leaves far more time
    end
    repeat (200) @(negedge clk);
    for (int n = 0; n < NN; n++)
      for (int a = 0; a < 2**AW; a++) begin
        rd(n, 32'(a * 4), d);
        check(d == ref_mem[a], $sformatf("node %0d word %0d: %h expected %h", n, a, d, ref_mem[a]));
      end
    // traffic stops: the hop limit ends circulation in the ring
    f0 = fwds[0];
    repeat (200) @(negedge clk);
    f1 = fwds[0];
    check(f0 == f1, "no message circulates forever");
    for (int n = 0; n < NN; n++) begin
      check(bccerr[n] == '0, "no BCC errors");
      check(drops[n] == 0, "no hub drops");
      check(losses[n] == '0, "no lock losses");
    end
    $display("forwards=%0d/%0d/%0d updates=%0d/%0d/%0d", fwds[0], fwds[1], fwds[2],
             updates[0], updates[1], updates[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
