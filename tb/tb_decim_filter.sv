// tb_decim_filter: feeds random 18-bit samples in windows of 100 (1 MSps -> 10 kSps) and
// compares each output with a reference computed in the testbench: the window sum in
// averaging mode, a first-order low-pass (8 fraction bits) in filter mode.
module tb_decim_filter;
  localparam int R = 100;

  logic clk = 0, rst_n = 0, mode = 0, in_valid = 0, in_last = 0;
  logic [4:0] shift = 5'd3;
  logic signed [17:0] in_data = '0;
  logic out_valid, out_mode;
  logic signed [31:0] out_data;
  int checks = 0, failures = 0, outs = 0;
  longint ref_sum = 0, ref_y = 0, expect_q[$];
  int mode_q[$];

  always #5 clk = ~clk;

  decim_filter #(.IN_W(18), .OUT_W(32)) dut (
    .clk, .rst_n, .mode, .shift, .in_valid, .in_last, .in_data, .out_valid, .out_mode, .out_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    checks++;
    outs++;
    e = expect_q.pop_front();
    checks++;
    if (out_mode != 1'(mode_q.pop_front())) begin failures++; $display("FAIL: out_mode"); end
    if (out_data != 32'(e)) begin
      failures++;
      $display("FAIL: out %0d expected %0d (mode %0d)", out_data, e, mode);
    end
  end

  // floor division by 2^s, as an arithmetic shift does
  function automatic longint fdiv(longint v, int s);
    longint p = longint'(1) << s;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction

  task automatic window(input int m, input int kind);
    for (int i = 0; i < R; i++) begin
      longint x;
      @(negedge clk);
      case (kind)
        0: in_data = 18'($urandom);
        1: in_data = 18'sh1FFFF;          // full scale positive
        default: in_data = -18'sd131072;  // full scale negative
      endcase
      x = longint'(in_data);
      in_valid = 1;
      in_last  = (i == R - 1);
      ref_sum += x;
      ref_y   += fdiv(x * 256 - ref_y, int'(shift));
      if (in_last) begin
        expect_q.push_back(m ? ref_y : ref_sum);
        mode_q.push_back(m);
        ref_sum = 0;
      end
      @(negedge clk);
      in_valid = 0;
      in_last  = 0;
      // idle gaps between samples, as at 1 MSps
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) window(0, w % 3);
    // switch to low-pass: takes effect after the current window
    @(negedge clk); mode = 1;
    window(0, 0);
    for (int w = 0; w < 6; w++) window(1, w % 3);
    @(negedge clk); shift = 5'd6;
    for (int w = 0; w < 4; w++) window(1, 1);
    repeat (5) @(posedge clk);
    checks++;
    if (outs != 17 || expect_q.size() != 0) begin
      failures++; $display("FAIL: %0d outputs", outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
