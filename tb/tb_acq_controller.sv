// tb_acq_controller: answers the controller's start pulses with per-channel results after
// random delays and checks the sample period, time stamps, collected data, the
// decimation-window marker and the overrun case.
module tb_acq_controller;
  import lm_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] div = 16'd20, decim = 16'd5;
  logic adc_start, set_valid, set_last, overrun;
  logic [N-1:0] adc_valid = '0;
  logic [N-1:0][ADC_W-1:0] adc_data = '0, sent;
  logic [TS_W-1:0] set_ts, now, last_ts;
  logic [N-1:0][ADC_W-1:0] set_data;
  int checks = 0, failures = 0, sets = 0, overruns = 0, lasts = 0, max_delay = 10;

  always #5 clk = ~clk;

  acq_controller #(.N_CH(N)) dut (
    .clk, .rst_n, .cfg_enable(en), .cfg_sample_div(div), .cfg_decim(decim),
    .adc_start, .adc_valid, .adc_data, .set_valid, .set_last, .set_ts, .set_data,
    .overrun, .now);

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

  // ADC responder: each channel answers after its own random delay
  int cnt [N];
  initial for (int c = 0; c < N; c++) cnt[c] = 0;
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      adc_valid[c] <= 1'b0;
      if (cnt[c] == 1) begin
        adc_valid[c] <= 1'b1;
        adc_data[c]  <= sent[c];
      end
      if (cnt[c] > 0) cnt[c] = cnt[c] - 1;
    end
    if (adc_start) begin
      for (int c = 0; c < N; c++) begin
        sent[c] = ADC_W'($urandom);
        cnt[c]  = 1 + ($urandom % max_delay);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (overrun) overruns++;
    if (set_valid) begin
      sets++;
      check(set_data == sent, "collected data");
      if (sets > 1 && max_delay < 15)
        check(set_ts - last_ts == TS_W'(div), $sformatf("period %0d", set_ts - last_ts));
      last_ts = set_ts;
      check(set_last == ((sets % decim) == 0), $sformatf("window marker at set %0d", sets));
      if (set_last) lasts++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); en = 1;
    wait (sets == 30);
    check(overruns == 0, "no overrun with short transfers");
    check(lasts == 6, "six windows");
    // transfers longer than the period: ticks must be skipped
    @(negedge clk); max_delay = 30;
    repeat (400) @(posedge clk);
    check(overruns > 0, "overrun seen");
    @(negedge clk); en = 0;
    repeat (60) @(posedge clk);
    check(!dut.collecting, "idle after disable");
    $display("sets=%0d overruns=%0d", sets, overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
