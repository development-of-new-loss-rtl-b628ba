// tb_vb_refresh: the shared-memory refresh workload. Three nodes at their default
// parameters (1024-word memory, hop limit 7, FIFO depth 16) are joined in a ring by
// their link ports. Every 100 us (10 kHz at 156.25 MHz = 15625 clocks) each node writes
// its own 256-word region with one AXI4 INCR burst of fresh values, as the processors
// would refresh their data. All three nodes start their bursts in the same clock, which
// is the heaviest case for the hubs. After every cycle each node's whole memory is read
// back with bursts and must equal the reference on all nodes, no message may be
// dropped by a hub or fail its block check, and every burst must end with B / rlast.
// Each word reaches every other node twice, once each way round the ring; the third
// link port of each node has no fibre.
// The region size per node is this testbench's choice; the document gives the rate,
// not the amount of shared data.
module tb_vb_refresh;
  import lm_pkg::*;
  localparam int AW     = 10;
  localparam int NN     = 3;
  localparam int NL     = 3;
  localparam int REGION = 256;
  localparam int PERIOD = 15625;
  localparam int CYCLES = 3;

  logic clk = 0, rst_n = 0;
  logic [NN-1:0][AW+1:0] awaddr = '0, araddr = '0;
  logic [NN-1:0][7:0] awlen = '0, arlen = '0;
  logic [NN-1:0] awvalid = '0, wvalid = '0, wlast = '0, bready = '0, arvalid = '0, rready = '0;
  logic [NN-1:0][31:0] wdata = '0, rdata;
  logic [NN-1:0] awready, wready, bvalid, arready, rvalid, rlast;
  logic [NN-1:0][1:0] bresp, rresp;
  logic [NN-1:0][3:0] bid, rid;
  logic [NN-1:0][NL-1:0][65:0] txb, rxb;
  logic [NN-1:0][NL-1:0] slip, locked;
  logic [NN-1:0][31:0] drops, fwds, updates;
  logic [NN-1:0][NL-1:0][31:0] bccerr, sent, losses;
  logic [31:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  always #3.2 clk = ~clk;

  for (genvar n = 0; n < NN; n++) begin : g_node
    virtual_backplane #(.NODE_ID(4'(n + 1))) u_node (
      .clk, .rst_n,
      .s_axi_awid(4'(n + 5)), .s_axi_awaddr(awaddr[n]), .s_axi_awlen(awlen[n]),
      .s_axi_awsize(3'd2), .s_axi_awburst(2'b01), .s_axi_awvalid(awvalid[n]),
      .s_axi_awready(awready[n]),
      .s_axi_wdata(wdata[n]), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast[n]),
      .s_axi_wvalid(wvalid[n]), .s_axi_wready(wready[n]), .s_axi_bid(bid[n]),
      .s_axi_bresp(bresp[n]), .s_axi_bvalid(bvalid[n]), .s_axi_bready(bready[n]),
      .s_axi_arid(4'(n + 9)), .s_axi_araddr(araddr[n]), .s_axi_arlen(arlen[n]),
      .s_axi_arsize(3'd2), .s_axi_arburst(2'b01), .s_axi_arvalid(arvalid[n]),
      .s_axi_arready(arready[n]), .s_axi_rid(rid[n]), .s_axi_rdata(rdata[n]),
      .s_axi_rresp(rresp[n]), .s_axi_rlast(rlast[n]),
      .s_axi_rvalid(rvalid[n]), .s_axi_rready(rready[n]),
      .link_tx_blk_en('1), .link_tx_block(txb[n]), .link_rx_block(rxb[n]),
      .link_rx_block_valid(3'b011), .link_rx_slip(slip[n]), .link_locked(locked[n]),
      .hub_drops(drops[n]), .hub_forwards(fwds[n]), .link_bcc_errors(bccerr[n]),
      .link_sent(sent[n]), .link_lock_losses(losses[n]), .updates_received(updates[n]));
  end

  // ring: node0.link0 - node1.link0, node1.link1 - node2.link0, node2.link1 - node0.link1;
  // link 2 of every node has no fibre (no valid blocks received)
  always_comb begin
    rxb[1][0] = txb[0][0]; rxb[0][0] = txb[1][0];
    rxb[2][0] = txb[1][1]; rxb[1][1] = txb[2][0];
    rxb[0][1] = txb[2][1]; rxb[2][1] = txb[0][1];
    for (int n = 0; n < NN; n++) rxb[n][2] = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] value(input int cyc, input int a);
    return {8'(cyc), 8'(a * 37), 16'(a)};
  endfunction

  // one INCR write burst of REGION words starting at word address base
  task automatic wr_burst(input int n, input int base, input int cyc);
    int beat = 0;
    @(negedge clk);
    awaddr[n] = (AW+2)'(base * 4); awlen[n] = 8'(REGION - 1); awvalid[n] = 1; bready[n] = 1;
    do @(posedge clk); while (!awready[n]);
    @(negedge clk); awvalid[n] = 0;
    while (beat < REGION) begin
      wvalid[n] = 1; wdata[n] = value(cyc, base + beat); wlast[n] = (beat == REGION - 1);
      @(posedge clk);
      if (wready[n]) beat++;
      @(negedge clk);
    end
    wvalid[n] = 0; wlast[n] = 0;
    while (!bvalid[n]) @(negedge clk);
    check(bid[n] == 4'(n + 5) && bresp[n] == 2'b00, "B carries the write ID, OKAY");
    @(negedge clk); bready[n] = 0;
  endtask

  // read the whole memory of node n with REGION-word bursts and compare
  task automatic rd_all(input int n, input int cyc);
    for (int base = 0; base < 2**AW; base += REGION) begin
      int beat = 0, bad = 0;
      @(negedge clk);
      araddr[n] = (AW+2)'(base * 4); arlen[n] = 8'(REGION - 1); arvalid[n] = 1; rready[n] = 1;
      do @(posedge clk); while (!arready[n]);
      @(negedge clk); arvalid[n] = 0;
      while (beat < REGION) begin
        if (rvalid[n]) begin
          if (rdata[n] != ref_mem[base + beat]) begin
            if (bad < 4) $display("node %0d word %0d: %h expected %h", n, base + beat,
                                  rdata[n], ref_mem[base + beat]);
            bad++;
          end
          if (beat == REGION - 1) check(rlast[n] && rid[n] == 4'(n + 9), "rlast and ID on last beat");
          beat++;
        end
        @(negedge clk);
      end
      rready[n] = 0;
      check(bad == 0, $sformatf("cycle %0d node %0d words %0d..%0d agree", cyc, n, base,
                                base + REGION - 1));
    end
  endtask

  initial begin
    repeat (CYCLES * PERIOD + 60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (locked[0][1:0] == 2'b11 && locked[1][1:0] == 2'b11 && locked[2][1:0] == 2'b11);
    check(locked[0][2] == 1'b0, "link without fibre does not lock");
    for (int cyc = 1; cyc <= CYCLES; cyc++) begin
      for (int n = 0; n < NN; n++)
        for (int a = 0; a < REGION; a++) ref_mem[n * REGION + a] = value(cyc, n * REGION + a);
      fork
        wr_burst(0, 0 * REGION, cyc);
        wr_burst(1, 1 * REGION, cyc);
        wr_burst(2, 2 * REGION, cyc);
        repeat (PERIOD) @(posedge clk);
      join_any
      repeat (300) @(negedge clk);
      for (int n = 0; n < NN; n++) rd_all(n, cyc);
      wait fork;
    end
    for (int n = 0; n < NN; n++) begin
      check(drops[n] == 0, $sformatf("node %0d: no hub drops (%0d)", n, drops[n]));
      check(bccerr[n] == '0, "no BCC errors");
      check(losses[n] == '0, "no lock losses");
      check(updates[n] == 32'(2 * CYCLES * (NN - 1) * REGION),
            $sformatf("node %0d applied %0d updates", n, updates[n]));
    end
    $display("forwards=%0d/%0d/%0d updates=%0d/%0d/%0d drops=%0d/%0d/%0d", fwds[0], fwds[1],
             fwds[2], updates[0], updates[1], updates[2], drops[0], drops[1], drops[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
