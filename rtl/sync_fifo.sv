// sync_fifo: single-clock first-in first-out buffer, used for the hub's RX and TX FIFOs.
// DEPTH entries of WIDTH bits (DEPTH a power of two). Writes with wr_en while not full,
// reads with rd_en while not empty; rd_data always shows the oldest entry (first-word
// fall-through). A write and a read in the same clock both take effect. The FIFOs are
// named in the document; depth and behaviour are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 56,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

endmodule
