// tb_axis_frame_packer: offers decimated sets to the packer while the stream sink
// applies random back-pressure, rebuilds every frame from the beats and compares it with
// the offered set; a set offered during a pending frame must be dropped and counted.
module tb_axis_frame_packer;
  import lm_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, in_valid = 0, tready = 0;
  logic [63:0] in_ts = '0;
  logic [31:0] in_status = '0;
  logic [N-1:0][31:0] in_data = '0;
  logic [127:0] tdata;
  logic tvalid, tlast, frame_done;
  logic [31:0] drop_count, frame_count;
  int checks = 0, failures = 0, beats = 0, frames = 0, dones = 0, offered = 0, drops = 0;
  int ready_pct = 100;
  typedef struct { logic [63:0] ts; logic [31:0] st; logic [31:0] seq; logic [N-1:0][31:0] d; } set_t;
  set_t q[$];
  logic [4:0][127:0] got;

  always #5 clk = ~clk;

  axis_frame_packer #(.N_CH(N), .AXIS_W(128)) dut (
    .clk, .rst_n, .in_valid, .in_ts, .in_status, .in_data,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tlast(tlast), .frame_done, .drop_count, .frame_count);

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

  always @(negedge clk) tready <= (($urandom % 100) < ready_pct);

  always @(posedge clk) if (rst_n) begin
    if (frame_done) dones++;
    if (tvalid && tready) begin
      got[beats] = tdata;
      check(tlast == (beats == 4), "tlast position");
      beats++;
      if (beats == 5) begin
        set_t e;
        beats = 0;
        frames++;
        e = q.pop_front();
        check(got[0] == {e.st, e.seq, e.ts}, "header beat");
        for (int c = 0; c < N; c++)
          check(got[1 + c / 4][(c % 4) * 32 +: 32] == e.d[c], $sformatf("channel %0d", c));
      end
    end
  end

  task automatic offer();
    set_t s;
    @(negedge clk);
    s.ts = {$urandom, $urandom};
    s.st = $urandom;
    s.seq = offered;
    for (int c = 0; c < N; c++) s.d[c] = $urandom;
    in_ts = s.ts; in_status = s.st; in_data = s.d;
    in_valid = 1;
    if (tvalid) drops++; else q.push_back(s);
    offered++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    ready_pct = 100;
    offer();
    repeat (7) @(negedge clk);
    check(frames == 1 && dones == 1, "single frame in 5 beats");
    ready_pct = 50;
    for (int i = 0; i < 20; i++) begin
      offer();
      repeat (12 + $urandom % 20) @(negedge clk);
    end
    ready_pct = 0;   // sink stalls: next set is kept, the one after is dropped
    offer();
    repeat (3) @(negedge clk);
    offer();
    ready_pct = 100;
    repeat (20) @(negedge clk);
    check(drops >= 1, "a drop happened");
    check(drop_count == 32'(drops), $sformatf("drop_count %0d expected %0d", drop_count, drops));
    check(frame_count == 32'(frames) && dones == frames, "frame counters");
    check(q.size() == 0, "all frames received");
    $display("frames=%0d drops=%0d", frames, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
