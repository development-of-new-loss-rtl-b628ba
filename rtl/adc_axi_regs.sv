// adc_axi_regs: AXI4-Lite register file of the ADC acquisition core, and its interrupt.
// Word registers (byte offsets):
//   0x00 CTRL        rw  [0] enable acquisition, [1] filter mode (0 average, 1 low-pass),
//                        [2] interrupt enable                              reset 0
//   0x04 SAMPLE_DIV  rw  clocks per sample tick                            reset 200
//   0x08 DECIM       rw  samples per decimated output                     reset 100
//   0x0C LP_SHIFT    rw  low-pass time constant, 2^LP_SHIFT samples        reset 4
//   0x10 IRQ_STATUS  rw1c [0] a frame reached the DDR4 stream
//   0x14 FRAMES      ro  frames sent        0x18 DROPS   ro  frames dropped
//   0x1C OVERRUNS    ro  skipped sample ticks
//   0x20 TIME_LO / 0x24 TIME_HI  ro  current time-stamp counter
// A write needs AW and W together (both are accepted in the same clock) and answers
// on B one clock later; a read answers on R one clock after AR. Unmapped reads return
// 0. irq is a level: IRQ_STATUS[0] and CTRL[2].
// The AXI slave and the interrupt to the real-time processors follow the document; the
// register map is this design's own.
module adc_axi_regs #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // configuration out
  output logic              cfg_enable,
  output logic              cfg_mode,
  output logic [15:0]       cfg_sample_div,
  output logic [15:0]       cfg_decim,
  output logic [4:0]        cfg_shift,
  // status in
  input  logic              frame_done,
  input  logic [31:0]       frame_count,
  input  logic [31:0]       drop_count,
  input  logic [31:0]       overrun_count,
  input  logic [63:0]       now,
  output logic              irq
);

  logic        irq_en;
  logic        irq_pend;
  logic        do_write;
  logic [31:0] wmask;

  assign do_write      = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = do_write;
  assign s_axi_wready  = do_write;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;
  assign irq           = irq_en && irq_pend;

  always_comb begin
    for (int i = 0; i < 4; i++) wmask[i*8 +: 8] = {8{s_axi_wstrb[i]}};
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [31:0] m);
    return (old & ~m) | (nw & m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_enable     <= 1'b0;
      cfg_mode       <= 1'b0;
      irq_en         <= 1'b0;
      cfg_sample_div <= 16'd200;
      cfg_decim      <= 16'd100;
      cfg_shift      <= 5'd4;
      irq_pend       <= 1'b0;
      s_axi_bvalid   <= 1'b0;
      s_axi_rvalid   <= 1'b0;
      s_axi_rdata    <= '0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (frame_done) irq_pend <= 1'b1;
      if (do_write) begin
        s_axi_bvalid <= 1'b1;
        unique case (s_axi_awaddr[ADDR_W-1:2])
          0: begin
            {irq_en, cfg_mode, cfg_enable} <=
              3'(merge({29'd0, irq_en, cfg_mode, cfg_enable}, s_axi_wdata, wmask));
          end
          1: cfg_sample_div <= 16'(merge({16'd0, cfg_sample_div}, s_axi_wdata, wmask));
          2: cfg_decim      <= 16'(merge({16'd0, cfg_decim}, s_axi_wdata, wmask));
          3: cfg_shift      <= 5'(merge({27'd0, cfg_shift}, s_axi_wdata, wmask));
          4: if (s_axi_wstrb[0] && s_axi_wdata[0] && !frame_done) irq_pend <= 1'b0;
          default: ;
        endcase
      end
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr[ADDR_W-1:2])
          0: s_axi_rdata <= {29'd0, irq_en, cfg_mode, cfg_enable};
          1: s_axi_rdata <= {16'd0, cfg_sample_div};
          2: s_axi_rdata <= {16'd0, cfg_decim};
          3: s_axi_rdata <= {27'd0, cfg_shift};
          4: s_axi_rdata <= {31'd0, irq_pend};
          5: s_axi_rdata <= frame_count;
          6: s_axi_rdata <= drop_count;
          7: s_axi_rdata <= overrun_count;
          8: s_axi_rdata <= now[31:0];
          9: s_axi_rdata <= now[63:32];
          default: s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response is held until it is taken.
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
                            (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata)));

endmodule
