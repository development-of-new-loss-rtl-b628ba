// tb_vb_hub: random messages enter the four hub ports; a reference model of the
// forwarding rule (port 0 -> all links; link -> port 0 always and other links while
// hops > 0, hops decremented; a link message with the hub's own node ID goes nowhere)
// predicts what each port must output. Also checks
// round-robin service under full load, and that messages meeting a full TX FIFO are
// dropped and counted rather than stalling the hub.
module tb_vb_hub;
  import lm_pkg::*;
  localparam int NP = 4;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  vb_msg_t [NP-1:0] in_msg = '0, out_msg;
  logic [31:0] drop_count, fwd_count;
  vb_msg_t expq [NP][$];
  int checks = 0, failures = 0, sent = 0, received = 0, expected_drops = 0;
  int last_grant = -1, rr_checks = 0;

  always #5 clk = ~clk;

  vb_hub #(.N_PORTS(NP), .FIFO_DEPTH(8), .NODE_ID(4'd9)) dut (
    .clk, .rst_n, .in_valid, .in_msg, .in_ready, .out_valid, .out_msg, .out_ready,
    .drop_count, .fwd_count);

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

  // outputs: every message must be one the model expects on that port
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (out_valid[p] && out_ready[p]) begin
        int idx;
        idx = -1;
        for (int i = 0; i < expq[p].size(); i++) if (expq[p][i] == out_msg[p]) idx = i;
        check(idx >= 0, $sformatf("unexpected message on port %0d: %h", p, out_msg[p]));
        if (idx >= 0) expq[p].delete(idx);
        received++;
      end
    end
  end

  // round robin: with every RX FIFO non-empty, consecutive grants rotate
  always @(posedge clk) if (rst_n) begin
    if (&(~dut.rx_empty)) begin
      for (int p = 0; p < NP; p++) if (dut.grant[p]) begin
        if (last_grant >= 0) begin
          check(p == (last_grant + 1) % NP, $sformatf("grant %0d after %0d", p, last_grant));
          rr_checks++;
        end
        last_grant = p;
      end
    end else last_grant = -1;
  end

  function automatic void model(int src, vb_msg_t m);
    for (int p = 0; p < NP; p++) begin
      vb_msg_t o = m;
      if (p == src) continue;
      if (src != 0 && m.src == 4'd9) continue;   // own message back from a loop
      if (src == 0 || p == 0) expq[p].push_back(o);
      else if (m.hops != 0) begin o.hops = m.hops - 1; expq[p].push_back(o); end
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random traffic, light load
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = '0;
      for (int p = 0; p < NP; p++) begin
        if (($urandom % 8) == 0) begin
          vb_msg_t m;
          m.src = (($urandom % 5) == 0) ? 4'd9 : 4'(p); m.hops = 4'($urandom % 3); m.addr = 16'($urandom); m.data = $urandom;
          in_msg[p] = m; in_valid[p] = 1; model(p, m); sent++;
        end
      end
    end
    @(negedge clk); in_valid = '0;
    repeat (40) @(negedge clk);
    for (int p = 0; p < NP; p++) check(expq[p].size() == 0, $sformatf("port %0d missing %0d", p, expq[p].size()));
    check(drop_count == 0, "no drops at light load");
    // full load on all ports for a burst: round robin must rotate
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        vb_msg_t m;
        m.src = 4'(p); m.hops = 4'd1; m.addr = 16'(n); m.data = $urandom;
        in_msg[p] = m; in_valid[p] = 1; model(p, m);
      end
    end
    @(negedge clk); in_valid = '0;
    repeat (40) @(negedge clk);
    check(rr_checks >= 8, $sformatf("round robin observed %0d times", rr_checks));
    for (int p = 0; p < NP; p++) begin check(expq[p].size() == 0, "burst delivered"); foreach (expq[p][i]) $display("left p%0d %h", p, expq[p][i]); end
    // port 2 stops reading: its TX FIFO (8) fills and further messages are dropped
    out_ready[2] = 0;
    for (int n = 0; n < 12; n++) begin
      vb_msg_t m;
      @(negedge clk);
      m.src = 4'd0; m.hops = 4'd0; m.addr = 16'(100 + n); m.data = $urandom;
      in_msg[0] = m; in_valid = 4'b0001;
      if (n < 8) model(0, m);
      else begin
        // still delivered to ports 1 and 3
        expq[1].push_back(m); expq[3].push_back(m);
      end
      @(negedge clk); in_valid = '0;
    end
    repeat (20) @(negedge clk);
    check(drop_count == 4, $sformatf("drop_count %0d expected 4", drop_count));
    out_ready[2] = 1;
    repeat (20) @(negedge clk);
    for (int p = 0; p < NP; p++) check(expq[p].size() == 0, $sformatf("port %0d after drops: %0d left", p, expq[p].size()));
    $display("sent=%0d received=%0d rr=%0d", sent, received, rr_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
