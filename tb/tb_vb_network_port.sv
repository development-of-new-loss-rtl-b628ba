// tb_vb_network_port: AXI4 writes (single beats and INCR/FIXED bursts) must land in the
// local memory and leave as one update message {node, hops, address, data} per beat;
// bursts must read back with the right IDs and rlast; updates arriving from the hub
// must be readable, except those carrying this node's own ID or an out-of-range
// address; a write beat must wait while the hub is not ready and while updates arrive;
// consecutive messages must be exactly TX_GAP (default 8) clocks apart at the fastest.
module tb_vb_network_port;
  import lm_pkg::*;
  localparam int AW = 6;
  localparam logic [3:0] ME = 4'd3;

  logic clk = 0, rst_n = 0;
  logic [3:0] awid = '0, arid = '0, bid, rid;
  logic [AW+1:0] awaddr = '0, araddr = '0;
  logic [7:0] awlen = '0, arlen = '0;
  logic [1:0] awburst = 2'b01, arburst = 2'b01;
  logic awvalid = 0, wvalid = 0, wlast = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic awready, wready, bvalid, arready, rvalid, rlast;
  logic [1:0] bresp, rresp;
  logic tx_valid, tx_ready = 1, rx_valid = 0, rx_ready;
  vb_msg_t tx_msg, rx_msg = '0;
  logic [31:0] rx_update_count;
  logic [31:0] ref_mem [2**AW];
  vb_msg_t txq [$];
  int checks = 0, failures = 0, stalls = 0;
  int cyc = 0, last_tx = -1000, min_gap = 1000;

  always #5 clk = ~clk;

  vb_network_port #(.ADDR_W(AW), .ID_W(4), .NODE_ID(ME), .MAX_HOPS(4'd5)) dut (
    .clk, .rst_n,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(3'd2),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(3'd2), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg, .rx_ready, .rx_update_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_valid && tx_ready) begin
      txq.push_back(tx_msg);
      if (cyc - last_tx < min_gap) min_gap = cyc - last_tx;
      last_tx = cyc;
    end
    if (wvalid && !wready) stalls++;
  end

  // burst write: len+1 beats from word a (INCR) or all to word a (FIXED)
  task automatic bwrite(input int a, input int len, input bit fixed, input logic [3:0] id,
                        input logic [31:0] d []);
    @(negedge clk);
    awid = id; awaddr = (AW+2)'(a * 4); awlen = 8'(len); awburst = fixed ? 2'b00 : 2'b01;
    awvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0;
    for (int i = 0; i <= len; i++) begin
      wdata = d[i]; wlast = (i == len); wvalid = 1;
      do @(posedge clk); while (!wready);
      @(negedge clk);
      ref_mem[fixed ? a : a + i] = d[i];
    end
    wvalid = 0; wlast = 0;
    while (!bvalid) @(negedge clk);
    check(bid == id, "write response ID");
    @(negedge clk); bready = 0;
  endtask

  task automatic bread_check(input int a, input int len, input bit fixed, input logic [3:0] id);
    @(negedge clk);
    arid = id; araddr = (AW+2)'(a * 4); arlen = 8'(len); arburst = fixed ? 2'b00 : 2'b01;
    arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    for (int i = 0; i <= len; i++) begin
      while (!rvalid) @(negedge clk);
      check(rdata == ref_mem[fixed ? a : a + i],
            $sformatf("read word %0d: %h expected %h", fixed ? a : a + i, rdata, ref_mem[fixed ? a : a + i]));
      check(rlast == (i == len) && rid == id, "rlast / rid");
      @(negedge clk);
    end
    rready = 0;
  endtask

  task automatic remote(input logic [3:0] src, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    rx_valid = 1; rx_msg = '{src: src, hops: 4'd2, addr: a, data: d};
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    logic [31:0] d [];
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single-beat writes, each one message
    for (int n = 0; n < 20; n++) begin
      automatic int a = $urandom % (2**AW);
      d = new[1];
      d[0] = $urandom;
      bwrite(a, 0, 0, 4'(n), d);
      check(txq.size() == 1, "one message per beat");
      if (txq.size() > 0) begin
        automatic vb_msg_t m = txq.pop_front();
        check(m.src == ME && m.hops == 4'd5 && m.addr == 16'(a) && m.data == d[0], "message fields");
      end
    end
    // INCR burst of 16 words
    d = new[16];
    foreach (d[i]) d[i] = $urandom;
    bwrite(8, 15, 0, 4'hA, d);
    check(txq.size() == 16, "16 messages for a 16-beat burst");
    for (int i = 0; i < 16 && txq.size() > 0; i++) begin
      automatic vb_msg_t m = txq.pop_front();
      check(m.addr == 16'(8 + i) && m.data == d[i], "burst message order");
    end
    bread_check(8, 15, 0, 4'h5);
    // FIXED burst: every beat to the same word
    d = new[4];
    foreach (d[i]) d[i] = $urandom;
    bwrite(40, 3, 1, 4'h2, d);
    txq.delete();
    bread_check(40, 2, 1, 4'h6);
    // remote updates
    for (int n = 0; n < 30; n++) begin
      automatic int a = $urandom % (2**AW);
      automatic logic [31:0] v = $urandom;
      remote(4'd1 + 4'(n % 2), 16'(a), v);
      ref_mem[a] = v;
    end
    remote(ME, 16'd0, 32'hBAD0_0000);        // own message: ignored
    remote(4'd2, 16'd500, 32'hBAD0_0001);    // outside the memory: ignored
    check(rx_update_count == 30, $sformatf("updates %0d", rx_update_count));
    bread_check(0, 2**AW - 1, 0, 4'h7);       // whole memory in one burst
    // hub not ready: the beat waits
    @(negedge clk); tx_ready = 0;
    d = new[1];
    d[0] = 32'h1111_2222;
    fork
      bwrite(4, 0, 0, 4'h1, d);
      begin repeat (10) @(negedge clk); tx_ready = 1; end
    join
    check(stalls >= 8, "write held while the hub is busy");
    // an update arriving during a write burst takes the memory first
    d = new[2];
    d[0] = 32'h3333_4444; d[1] = 32'h7777_8888;
    fork
      bwrite(5, 1, 0, 4'h1, d);
      begin
        rx_valid = 1; rx_msg = '{src: 4'd1, hops: 4'd0, addr: 16'h7, data: 32'h5555_6666};
        repeat (4) @(negedge clk);
        rx_valid = 0;
      end
    join
    ref_mem[7] = 32'h5555_6666;
    bread_check(4, 3, 0, 4'h3);
    check(rx_ready, "updates never refused");
    check(bresp == 0 && rresp == 0, "OKAY responses");
    check(min_gap == 8, $sformatf("local messages paced to 8 clocks (closest %0d)", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
