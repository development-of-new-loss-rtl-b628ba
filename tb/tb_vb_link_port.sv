// tb_vb_link_port: a link port talks to itself through a serial channel model. The
// channel starts at a random bit offset, so the receiver must slip until it finds block
// lock. Then messages must arrive intact and in order; a block with a flipped payload
// bit must be discarded by the BCC check; a burst of corrupted sync headers must drop
// the lock, which must then be regained. Payload bits are also checked to be scrambled.
module tb_vb_link_port;
  import lm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, rx_valid, rx_slip, locked;
  vb_msg_t tx_msg = '0, rx_msg;
  logic [65:0] tx_block, rx_block = '0;
  logic rx_block_valid = 0;
  logic [31:0] sent_count, bcc_errors, lock_losses;
  bit chan [$];
  vb_msg_t expq [$];
  int checks = 0, failures = 0, slips = 0, got = 0, flip_payload = 0, flip_sh = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  vb_link_port dut (
    .clk, .rst_n, .tx_valid, .tx_msg, .tx_ready, .rx_valid, .rx_msg,
    .tx_blk_en(1'b1), .tx_block, .rx_block, .rx_block_valid, .rx_slip,
    .locked, .sent_count, .bcc_errors, .lock_losses);

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

  // serial channel: 66 bits in and out per clock, bit 0 first; a slip drops one bit
  always @(posedge clk) if (rst_n) begin
    logic [65:0] b;
    cyc++;
    b = tx_block;
    if (flip_payload > 0 && tx_block[1:0] == SH_DATA) begin b[30] = ~b[30]; flip_payload--; end
    if (flip_sh > 0) begin b[1:0] = 2'b11; flip_sh--; end
    for (int i = 0; i < 66; i++) chan.push_back(b[i]);
    if (rx_slip) begin void'(chan.pop_front()); slips++; end
    if (chan.size() >= 132) begin
      for (int i = 0; i < 66; i++) rx_block[i] <= chan.pop_front();
      rx_block_valid <= 1'b1;
    end else rx_block_valid <= 1'b0;
    if (rx_valid) begin
      got++;
      check(expq.size() > 0 && rx_msg == expq[0], $sformatf("message %h", rx_msg));
      if (expq.size() > 0) void'(expq.pop_front());
    end
  end

  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      vb_msg_t m;
      @(negedge clk);
      m.src = 4'($urandom); m.hops = 4'($urandom); m.addr = 16'($urandom); m.data = $urandom;
      tx_msg = m; tx_valid = 1;
      expq.push_back(m);
      @(negedge clk);
      tx_valid = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random start offset of the bit stream
    repeat (1 + $urandom % 60) chan.push_back(1'b0);
    wait (locked);
    check(slips > 0, "receiver slipped to find the block boundary");
    repeat (10) @(negedge clk);
    expq.delete();
    // messages through a locked link
    send(50);
    repeat (10) @(negedge clk);
    check(got == 50 && expq.size() == 0, $sformatf("delivered %0d of 50", got));
    check(sent_count == 50, "sent count");
    check(bcc_errors == 0, "no BCC errors on a clean channel");
    check(tx_block[65:2] != {56'd0, BT_IDLE}, "payload scrambled");
    // one corrupted data block: lost, counted
    @(negedge clk); flip_payload = 1;
    send(1);
    expq.delete();
    send(5);
    repeat (10) @(negedge clk);
    check(bcc_errors == 1, $sformatf("bcc errors %0d", bcc_errors));
    check(got == 55, $sformatf("%0d delivered after error", got));
    // 20 blocks with bad sync headers: lock lost, then found again
    @(negedge clk); flip_sh = 20;
    repeat (30) @(negedge clk);
    check(lock_losses == 1, "lock lost");
    wait (locked);
    repeat (5) @(negedge clk);
    expq.delete();
    send(10);
    repeat (10) @(negedge clk);
    check(got >= 65, "delivery after relock");
    $display("slips=%0d got=%0d", slips, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
