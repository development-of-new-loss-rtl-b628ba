// axil_master.svh: AXI4-Lite master tasks for testbenches. The including module must
// declare clk and the signals awaddr, awvalid, awready, wdata, wstrb, wvalid, wready,
// bvalid, bready, araddr, arvalid, arready, rdata, rvalid, rready. Each task drives one
// single-beat transaction and waits for its response.
task automatic axil_write(input logic [31:0] a, input logic [31:0] d);
  @(negedge clk);
  awaddr = a[$bits(awaddr)-1:0]; wdata = d; wstrb = 4'hF;
  awvalid = 1; wvalid = 1; bready = 1;
  do @(posedge clk); while (!(awready && wready));
  @(negedge clk);
  awvalid = 0; wvalid = 0;
  while (!bvalid) @(negedge clk);
  @(negedge clk);
  bready = 0;
endtask

task automatic axil_read(input logic [31:0] a, output logic [31:0] d);
  @(negedge clk);
  araddr = a[$bits(araddr)-1:0]; arvalid = 1; rready = 1;
  do @(posedge clk); while (!arready);
  @(negedge clk);
  arvalid = 0;
  while (!rvalid) @(negedge clk);
  d = rdata;
  @(negedge clk);
  rready = 0;
endtask
