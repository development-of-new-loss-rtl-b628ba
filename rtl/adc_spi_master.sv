// adc_spi_master: reads one 18-bit conversion from an ADS9110-type SAR ADC.
// On `start` the master raises CONVST for CONV_CYCLES clocks (the ADC converts while
// CONVST is high), then lowers CS_n and drives DATA_W SCLK periods, each SCLK_HALF
// clocks low then SCLK_HALF clocks high. SDO is sampled on every rising SCLK edge, most
// significant bit first. When the last bit is in, CS_n rises and `data` is presented
// with a one-clock `valid`. `busy` is high from `start` until `valid`.
// Timing: a read takes 1 + CONV_CYCLES + 2*SCLK_HALF*DATA_W + 1 clocks.
// The 18-bit width and the SPI transfer follow the document; the read-after-conversion
// framing, the SCLK rate (clk/2) and the conversion wait (400 ns at 200 MHz) are this
// design's choices, taken from the usual way this ADC family is read.
module adc_spi_master #(
  parameter int unsigned DATA_W      = 18,
  parameter int unsigned CONV_CYCLES = 80,
  parameter int unsigned SCLK_HALF   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              convst,
  output logic              cs_n,
  output logic              sclk,
  input  logic              sdo,
  output logic [DATA_W-1:0] data,
  output logic              valid,
  output logic              busy
);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_SHIFT, S_DONE} state_t;
  state_t state;

  logic [$clog2(CONV_CYCLES+1)-1:0] conv_cnt;
  logic [$clog2(SCLK_HALF+1)-1:0]   half_cnt;
  logic [$clog2(DATA_W+1)-1:0]      bit_cnt;
  logic [DATA_W-1:0]                shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      conv_cnt <= '0;
      half_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '0;
      data     <= '0;
      valid    <= 1'b0;
      convst   <= 1'b0;
      cs_n     <= 1'b1;
      sclk     <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_CONV;
          convst   <= 1'b1;
          conv_cnt <= '0;
        end
        S_CONV: begin
          conv_cnt <= conv_cnt + 1'b1;
          if (conv_cnt == $bits(conv_cnt)'(CONV_CYCLES - 1)) begin
            convst   <= 1'b0;
            cs_n     <= 1'b0;
            sclk     <= 1'b0;
            half_cnt <= '0;
            bit_cnt  <= '0;
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          half_cnt <= half_cnt + 1'b1;
          if (half_cnt == $bits(half_cnt)'(SCLK_HALF - 1)) begin
            half_cnt <= '0;
            sclk     <= ~sclk;
            if (!sclk) begin
              // rising edge: capture one bit
              shreg   <= {shreg[DATA_W-2:0], sdo};
              bit_cnt <= bit_cnt + 1'b1;
            end else if (bit_cnt == $bits(bit_cnt)'(DATA_W)) begin
              // falling edge after the last bit ends the frame
              state <= S_DONE;
            end
          end
        end
        S_DONE: begin
          cs_n  <= 1'b1;
          sclk  <= 1'b0;
          data  <= shreg;
          valid <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
