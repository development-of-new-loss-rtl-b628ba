// tb_vb_dpram: random writes and reads against a reference array; checks the
// one-clock read latency and read-during-write (old data) behaviour.
module tb_vb_dpram;
  localparam int AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vb_dpram #(.ADDR_W(AW), .DATA_W(32)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    @(negedge clk);
    // memory starts cleared
    for (int i = 0; i < 2**AW; i++) begin
      raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata != 0) begin failures++; $display("FAIL: not cleared at %0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] expected;
      we    = ($urandom % 2) == 1;
      waddr = AW'($urandom);
      wdata = $urandom;
      raddr = (n % 5 == 0) ? waddr : AW'($urandom);
      expected = ref_mem[raddr];           // old data on a collision
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata != expected) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
