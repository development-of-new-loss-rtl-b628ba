// vb_dpram: this node's copy of the Virtual Backplane shared memory.
// A simple dual-port RAM of 2^ADDR_W words: one write port and one synchronous read
// port (read data appears the clock after raddr; a read of the word written in the
// same clock returns the old contents). The memory starts cleared after configuration,
// as FPGA block RAM does. The dual-port memory is named by the document; its size and
// port arrangement are this design's choices.
module vb_dpram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
