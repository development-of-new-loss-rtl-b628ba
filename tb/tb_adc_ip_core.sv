// tb_adc_ip_core: the acquisition core with 16 ADC models at its default rates
// (1 MSps sampling, decimation 100 -> 10 kSps). The testbench records every value each
// ADC converts, forms the expected window sums and low-pass values itself, and compares
// them with the channel words of the AXI-Stream frames; it also checks the frame period
// (100 sample periods), the time stamps, sequence numbers, interrupt and counters.
module tb_adc_ip_core;
  import lm_pkg::*;
  localparam int N = 16;
  localparam int R = 100;
  localparam int DIV = 200;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] convst, cs_n, sclk, sdo;
  logic [N-1:0][17:0] sample;
  int unsigned conv [N];
  logic [127:0] tdata;
  logic tvalid, tlast, irq;
  logic tready = 1;
  logic [7:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  adc_ip_core #(.N_CH(N)) dut (
    .clk, .rst_n, .adc_convst(convst), .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdo(sdo),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq);

  for (genvar c = 0; c < N; c++) begin : g_adc
    adc_model #(.DATA_W(18)) u_adc (
      .convst(convst[c]), .cs_n(cs_n[c]), .sclk(sclk[c]), .sdo(sdo[c]),
      .sample(sample[c]), .conversions(conv[c]));
  end

  `include "axil_master.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: window sums and low-pass state of every channel
  longint sum [N], y [N];
  int     nsamp = 0;
  int     lp_mode = 0;          // mode of the window being formed
  int     next_mode = 0;
  longint exp_q [$];            // 16 values per frame
  int     mode_q [$];

  function automatic longint fdiv(longint v, int s);
    longint p = longint'(1) << s;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction

  initial for (int c = 0; c < N; c++) begin sum[c] = 0; y[c] = 0; sample[c] = 18'($urandom); end

  // channel 0 decides when a sample set is taken; all channels convert together
  always @(posedge convst[0]) begin
    for (int c = 0; c < N; c++) begin
      longint x;
      x = longint'($signed(sample[c]));
      sum[c] += x;
      y[c]   += fdiv(x * 256 - y[c], 4);
    end
    nsamp++;
    if (nsamp % R == 0) begin
      for (int c = 0; c < N; c++) begin
        exp_q.push_back(lp_mode ? y[c] : sum[c]);
        sum[c] = 0;
      end
      mode_q.push_back(lp_mode);
      lp_mode = next_mode;
    end
  end

  // a new input value for every conversion, changed while CONVST is high
  always @(negedge convst[0]) for (int c = 0; c < N; c++) sample[c] = 18'($urandom);

  // frame receiver
  int beats = 0, frames = 0, irqs = 0;
  logic [4:0][127:0] got;
  longint first_ts = 0, prev_ts = 0, prev_t = 0;
  always @(posedge clk) if (rst_n && tvalid && tready) begin
    got[beats] = tdata;
    beats++;
    if (beats == 5) begin
      int m;
      beats = 0;
      m = mode_q.pop_front();
      check(got[0][95:64] == 32'(frames), "sequence number");
      check(got[0][127] == 1'(m), "mode bit in status");
      if (frames > 0)
        check(longint'(got[0][63:0]) - prev_ts == longint'(R * DIV),
              $sformatf("time stamp step %0d", longint'(got[0][63:0]) - prev_ts));
      prev_ts = longint'(got[0][63:0]);
      for (int c = 0; c < N; c++) begin
        longint e;
        e = exp_q.pop_front();
        check(got[1 + c / 4][(c % 4) * 32 +: 32] == 32'(e),
              $sformatf("frame %0d ch %0d: %0d expected %0d", frames, c,
                        $signed(got[1 + c / 4][(c % 4) * 32 +: 32]), e));
      end
      frames++;
    end
  end

  always @(posedge irq) irqs++;

  initial begin
    logic [31:0] d;
    repeat (5) @(posedge clk);
    rst_n = 1;
    axil_write(8'h00, 32'h5);            // enable, averaging, interrupt on
    wait (frames == 3);
    check(irqs >= 1, "interrupt raised");
    repeat (10) @(posedge clk);
    axil_write(8'h10, 32'h1);
    check(!irq, "interrupt cleared");
    next_mode = 1;
    axil_write(8'h00, 32'h7);            // low-pass from the next window
    wait (frames == 7);
    axil_read(8'h14, d);
    check(d == 7, $sformatf("frame counter %0d", d));
    axil_read(8'h1C, d);
    check(d == 0, "no overruns at 1 MSps");
    axil_read(8'h18, d);
    check(d == 0, "no drops");
    check(conv[5] >= 700, "ADC conversions at 1 MSps");
    $display("frames=%0d irqs=%0d nsamp=%0d conv0=%0d", frames, irqs, nsamp, conv[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
