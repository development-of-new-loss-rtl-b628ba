// tb_som_logiv16_pl: end-to-end run of the module's programmable logic at its default
// parameters. Acquisition: 16 ADC models, 1 MSps, decimation 100; frames are checked
// against window sums / low-pass values formed by the testbench from the converted
// values, with random back-pressure, one long stall (frame drop), a too-short sample
// period (overrun) and the interrupt. Backplane: link 0 is looped back to itself (own
// updates must be discarded), link 1 goes to a peer node (ID 2) directly, link 2 to the
// same peer through a channel with a bit offset (slips needed) that corrupts one block
// (BCC drop). Words written on either side must appear on the other. Each mechanism is
// counted and one that never happened is a failure.
module tb_som_logiv16_pl;
  import lm_pkg::*;
  localparam int N = 16;
  localparam int R = 100;
  localparam int DIV = 200;
  localparam int VAW = 10;

  logic clk_acq = 0, clk_vb = 0, rst_acq_n = 0, rst_vb_n = 0;
  always #2.5 clk_acq = ~clk_acq;   // 200 MHz
  always #3.2 clk_vb  = ~clk_vb;    // 156.25 MHz

  // acquisition side
  logic [N-1:0] convst, cs_n, sclk, sdo;
  logic [N-1:0][17:0] sample;
  int unsigned conv [N];
  logic [127:0] tdata;
  logic tvalid, tlast, irq, tready = 1;
  logic [7:0] a_awaddr = '0, a_araddr = '0;
  logic a_awvalid = 0, a_wvalid = 0, a_bready = 0, a_arvalid = 0, a_rready = 0;
  logic [31:0] a_wdata = '0, a_rdata;
  logic a_awready, a_wready, a_bvalid, a_arready, a_rvalid;
  logic [1:0] a_bresp, a_rresp;
  // backplane side
  logic [VAW+1:0] v_awaddr = '0, v_araddr = '0;
  logic v_awvalid = 0, v_wvalid = 0, v_bready = 0, v_arvalid = 0, v_rready = 0;
  logic [31:0] v_wdata = '0, v_rdata;
  logic v_awready, v_wready, v_bvalid, v_arready, v_rvalid, v_rlast, p_rlast;
  logic [1:0] v_bresp, v_rresp;
  logic [2:0][65:0] txb, rxb;
  logic [2:0] rxv, slip, locked;
  logic [31:0] hub_drops, hub_fwds, updates;
  logic [2:0][31:0] bccerr, lsent, losses;

  som_logiv16_pl dut (
    .clk_acq, .rst_acq_n, .clk_vb, .rst_vb_n,
    .adc_convst(convst), .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(sdo),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tlast(tlast), .irq,
    .acq_awaddr(a_awaddr), .acq_awvalid(a_awvalid), .acq_awready(a_awready),
    .acq_wdata(a_wdata), .acq_wstrb(4'hF), .acq_wvalid(a_wvalid), .acq_wready(a_wready),
    .acq_bresp(a_bresp), .acq_bvalid(a_bvalid), .acq_bready(a_bready),
    .acq_araddr(a_araddr), .acq_arvalid(a_arvalid), .acq_arready(a_arready),
    .acq_rdata(a_rdata), .acq_rresp(a_rresp), .acq_rvalid(a_rvalid), .acq_rready(a_rready),
    .vb_awid(4'd1), .vb_awaddr(v_awaddr), .vb_awlen(8'd0), .vb_awsize(3'd2), .vb_awburst(2'b01),
    .vb_awvalid(v_awvalid), .vb_awready(v_awready),
    .vb_wdata(v_wdata), .vb_wstrb(4'hF), .vb_wlast(1'b1), .vb_wvalid(v_wvalid), .vb_wready(v_wready),
    .vb_bid(), .vb_bresp(v_bresp), .vb_bvalid(v_bvalid), .vb_bready(v_bready),
    .vb_arid(4'd1), .vb_araddr(v_araddr), .vb_arlen(8'd0), .vb_arsize(3'd2), .vb_arburst(2'b01),
    .vb_arvalid(v_arvalid), .vb_arready(v_arready), .vb_rid(),
    .vb_rdata(v_rdata), .vb_rresp(v_rresp), .vb_rlast(v_rlast), .vb_rvalid(v_rvalid), .vb_rready(v_rready),
    .link_tx_blk_en('1), .link_tx_block(txb), .link_rx_block(rxb),
    .link_rx_block_valid(rxv), .link_rx_slip(slip), .link_locked(locked),
    .vb_hub_drops(hub_drops), .vb_hub_forwards(hub_fwds), .vb_bcc_errors(bccerr),
    .vb_link_sent(lsent), .vb_lock_losses(losses), .vb_updates_received(updates));

  for (genvar c = 0; c < N; c++) begin : g_adc
    adc_model #(.DATA_W(18)) u_adc (
      .convst(convst[c]), .cs_n(cs_n[c]), .sclk(sclk[c]), .sdo(sdo[c]),
      .sample(sample[c]), .conversions(conv[c]));
  end

  // peer node
  logic [VAW+1:0] p_awaddr = '0, p_araddr = '0;
  logic p_awvalid = 0, p_wvalid = 0, p_bready = 0, p_arvalid = 0, p_rready = 0;
  logic [31:0] p_wdata = '0, p_rdata;
  logic p_awready, p_wready, p_bvalid, p_arready, p_rvalid;
  logic [1:0] p_bresp, p_rresp;
  logic [2:0][65:0] ptxb, prxb;
  logic [2:0] prxv, pslip, plocked;
  logic [31:0] p_drops, p_fwds, p_updates;
  logic [2:0][31:0] p_bccerr, p_sent, p_losses;

  virtual_backplane #(.NODE_ID(4'd2)) u_peer (
    .clk(clk_vb), .rst_n(rst_vb_n),
    .s_axi_awid(4'd2), .s_axi_awaddr(p_awaddr), .s_axi_awlen(8'd0), .s_axi_awsize(3'd2),
    .s_axi_awburst(2'b01), .s_axi_awvalid(p_awvalid), .s_axi_awready(p_awready),
    .s_axi_wdata(p_wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(1'b1), .s_axi_wvalid(p_wvalid),
    .s_axi_wready(p_wready), .s_axi_bid(), .s_axi_bresp(p_bresp), .s_axi_bvalid(p_bvalid),
    .s_axi_bready(p_bready), .s_axi_arid(4'd2), .s_axi_araddr(p_araddr), .s_axi_arlen(8'd0),
    .s_axi_arsize(3'd2), .s_axi_arburst(2'b01), .s_axi_arvalid(p_arvalid),
    .s_axi_arready(p_arready), .s_axi_rid(), .s_axi_rdata(p_rdata), .s_axi_rresp(p_rresp),
    .s_axi_rlast(p_rlast),
    .s_axi_rvalid(p_rvalid), .s_axi_rready(p_rready),
    .link_tx_blk_en('1), .link_tx_block(ptxb), .link_rx_block(prxb),
    .link_rx_block_valid(prxv), .link_rx_slip(pslip), .link_locked(plocked),
    .hub_drops(p_drops), .hub_forwards(p_fwds), .link_bcc_errors(p_bccerr),
    .link_sent(p_sent), .link_lock_losses(p_losses), .updates_received(p_updates));

  // links: dut.0 <-> dut.0 (loopback), dut.1 <-> peer.0, dut.2 -> channel -> peer.1,
  // peer.1 -> dut.2; peer.2 idle
  bit chan [$];
  logic [65:0] chan_out = '0;
  logic chan_v = 0;
  int flip_once = 0, slips = 0;
  always_comb begin
    rxb[0] = txb[0]; rxv[0] = 1'b1;
    rxb[1] = ptxb[0]; rxv[1] = 1'b1;
    prxb[0] = txb[1]; prxv[0] = 1'b1;
    rxb[2] = ptxb[1]; rxv[2] = 1'b1;
    prxb[2] = ptxb[2]; prxv[2] = 1'b1;
    prxb[1] = chan_out; prxv[1] = chan_v;
  end
  always @(posedge clk_vb) begin
    logic [65:0] b;
    b = txb[2];
    if (flip_once > 0 && b[1:0] == SH_DATA) begin b[40] = ~b[40]; flip_once--; end
    for (int i = 0; i < 66; i++) chan.push_back(b[i]);
    if (pslip[1]) begin void'(chan.pop_front()); slips++; end
    if (chan.size() >= 132) begin
      for (int i = 0; i < 66; i++) chan_out[i] <= chan.pop_front();
      chan_v <= 1'b1;
    end else chan_v <= 1'b0;
  end
  initial repeat (23) chan.push_back(1'b1);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk_acq);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- acquisition reference model ----------------
  longint sum [N], y [N];
  int nsamp = 0, lp_mode = 0, next_mode = 0, counting = 1;
  longint exp_q [$];
  int mode_q [$];
  function automatic longint fdiv(longint v, int s);
    longint p = longint'(1) << s;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction
  initial for (int c = 0; c < N; c++) begin sum[c] = 0; y[c] = 0; sample[c] = 18'($urandom); end
  always @(posedge convst[0]) begin
    for (int c = 0; c < N; c++) begin
      longint x;
      x = longint'($signed(sample[c]));
      sum[c] += x;
      y[c]   += fdiv(x * 256 - y[c], 4);
    end
    nsamp++;
    if (nsamp % R == 0) begin
      for (int c = 0; c < N; c++) begin exp_q.push_back(lp_mode ? y[c] : sum[c]); sum[c] = 0; end
      mode_q.push_back(lp_mode);
      lp_mode = next_mode;
    end
  end
  always @(negedge convst[0]) for (int c = 0; c < N; c++) sample[c] = 18'($urandom);

  // frames
  int beats = 0, frames = 0, frames_avg = 0, frames_lp = 0, irqs = 0, stall_pct = 0;
  int drops_seen = 0, skip_frames = 0;
  logic [4:0][127:0] got;
  always @(negedge clk_acq) tready <= (($urandom % 100) >= stall_pct);
  always @(posedge irq) irqs++;
  always @(posedge clk_acq) if (rst_acq_n && tvalid && tready) begin
    got[beats] = tdata;
    beats++;
    if (beats == 5) begin
      int m;
      beats = 0;
      if (counting) begin
        m = mode_q.pop_front();
        check(got[0][127] == 1'(m), "frame mode bit");
        if (m) frames_lp++; else frames_avg++;
        for (int c = 0; c < N; c++) begin
          longint e;
          e = exp_q.pop_front();
          check(got[1 + c / 4][(c % 4) * 32 +: 32] == 32'(e),
                $sformatf("frame %0d ch %0d", frames, c));
        end
      end
      frames++;
    end
  end

  task automatic awr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_acq);
    a_awaddr = a; a_wdata = d; a_awvalid = 1; a_wvalid = 1; a_bready = 1;
    do @(posedge clk_acq); while (!a_awready);
    @(negedge clk_acq); a_awvalid = 0; a_wvalid = 0;
    while (!a_bvalid) @(negedge clk_acq);
    @(negedge clk_acq); a_bready = 0;
  endtask
  task automatic ard(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk_acq);
    a_araddr = a; a_arvalid = 1; a_rready = 1;
    do @(posedge clk_acq); while (!a_arready);
    @(negedge clk_acq); a_arvalid = 0;
    while (!a_rvalid) @(negedge clk_acq);
    d = a_rdata;
    @(negedge clk_acq); a_rready = 0;
  endtask

  task automatic vwr(input bit peer, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk_vb);
    if (!peer) begin v_awaddr = (VAW+2)'(a); v_wdata = d; v_awvalid = 1; v_wvalid = 1; v_bready = 1; end
    else       begin p_awaddr = (VAW+2)'(a); p_wdata = d; p_awvalid = 1; p_wvalid = 1; p_bready = 1; end
    fork
      begin
        do @(posedge clk_vb); while (!(peer ? p_awready : v_awready));
        @(negedge clk_vb); v_awvalid = 0; p_awvalid = 0;
      end
      begin
        do @(posedge clk_vb); while (!(peer ? p_wready : v_wready));
        @(negedge clk_vb); v_wvalid = 0; p_wvalid = 0;
      end
    join
    while (!(peer ? p_bvalid : v_bvalid)) @(negedge clk_vb);
    @(negedge clk_vb); v_bready = 0; p_bready = 0;
  endtask
  task automatic vrd(input bit peer, input logic [31:0] a, output logic [31:0] d);
    @(negedge clk_vb);
    if (!peer) begin v_araddr = (VAW+2)'(a); v_arvalid = 1; v_rready = 1; end
    else       begin p_araddr = (VAW+2)'(a); p_arvalid = 1; p_rready = 1; end
    do @(posedge clk_vb); while (!(peer ? p_arready : v_arready));
    @(negedge clk_vb); v_arvalid = 0; p_arvalid = 0;
    while (!(peer ? p_rvalid : v_rvalid)) @(negedge clk_vb);
    d = peer ? p_rdata : v_rdata;
    check(peer ? p_rlast : v_rlast, "rlast on a single read");
    @(negedge clk_vb); v_rready = 0; p_rready = 0;
  endtask

  // ---------------- backplane traffic (runs in parallel) ----------------
  int vb_ok = 0, vb_writes = 0;
  initial begin
    logic [31:0] d;
    logic [31:0] mine [64], theirs [64];
    repeat (10) @(posedge clk_vb);
    rst_vb_n = 1;
    wait (&locked && &plocked[1:0]);
    for (int k = 0; k < 64; k++) begin
      mine[k] = $urandom; theirs[k] = $urandom;
      vwr(0, 32'(k * 4), mine[k]);            // words 0..63 published by this module
      vwr(1, 32'((64 + k) * 4), theirs[k]);   // words 64..127 published by the peer
      vb_writes += 2;
      if (k == 20) flip_once = 1;             // one corrupted block on link 2
    end
    repeat (300) @(negedge clk_vb);
    // the writer rewrites its data each cycle: a second pass repairs the lost update
    for (int k = 0; k < 64; k++) begin
      vwr(0, 32'(k * 4), mine[k]);
      vwr(1, 32'((64 + k) * 4), theirs[k]);
    end
    repeat (300) @(negedge clk_vb);
    for (int k = 0; k < 64; k++) begin
      vrd(1, 32'(k * 4), d);        check(d == mine[k], $sformatf("peer word %0d", k));
      vrd(0, 32'((64 + k) * 4), d); check(d == theirs[k], $sformatf("local word %0d", 64 + k));
      vrd(0, 32'(k * 4), d);        check(d == mine[k], $sformatf("local own word %0d", k));
    end
    vb_ok = 1;
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] d;
    repeat (10) @(posedge clk_acq);
    rst_acq_n = 1;
    awr(8'h00, 32'h5);                       // enable, averaging, interrupt on
    stall_pct = 30;                          // random back-pressure
    wait (frames == 3);
    repeat (10) @(posedge clk_acq);
    awr(8'h10, 32'h1);
    next_mode = 1;
    awr(8'h00, 32'h7);                       // low-pass from the next window
    wait (frames == 6);
    // long stall of the sink: the next frame waits, the one after is dropped
    counting = 0;
    stall_pct = 100;
    repeat (2 * R * DIV + 200) @(posedge clk_acq);
    stall_pct = 0;
    repeat (R * DIV) @(posedge clk_acq);
    ard(8'h18, d); drops_seen = int'(d);
    // sample period shorter than an SPI transfer: ticks are skipped
    awr(8'h04, 32'd50);
    repeat (2000) @(posedge clk_acq);
    ard(8'h1C, d);
    check(d > 0, "overrun counted");
    awr(8'h00, 32'h0);
    wait (vb_ok);
    // mechanism counts
    $display("frames avg=%0d lp=%0d irqs=%0d drops=%0d overruns=%0d", frames_avg, frames_lp,
             irqs, drops_seen, d);
    $display("links locked: slips=%0d bcc_errors(peer link1)=%0d vb_updates=%0d peer_updates=%0d fwds=%0d",
             slips, p_bccerr[1], updates, p_updates, hub_fwds);
    check(frames_avg >= 2, "averaging frames");
    check(frames_lp >= 2, "low-pass frames");
    check(irqs >= 2, "interrupts");
    check(drops_seen >= 1, "frame dropped under stall");
    check(slips > 0, "receiver slipped to lock");
    check(p_bccerr[1] >= 1, "corrupted block dropped by BCC check");
    check(updates >= 64 && p_updates >= 64, "updates received on both nodes");
    check(lsent[0] > 0 && dut.u_vb.u_np.rx_update_count == updates, "loopback copies discarded");
    check(hub_fwds > 0, "hub forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
