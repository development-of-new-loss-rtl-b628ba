// acq_controller: sample timing and time-stamping for the 16 ADC channels.
// A divider produces one sample tick every `cfg_sample_div` clocks (200 clocks =
// 1 MSps at 200 MHz). On a tick all SPI masters are started together and the free
// running 64-bit clock counter is latched as the time stamp of that sample set. When
// every channel has delivered its result, the set is presented for one clock on
// set_valid with its time stamp; set_last marks every `cfg_decim`-th set, closing a
// decimation window (100 sets = 10 kSps out). A tick that arrives while transfers are
// still running is skipped and pulses `overrun`. Clearing cfg_enable stops the ticks
// and restarts the window.
// The 1 MSps rate, the 10 kSps output, parallel SPI buses and "time-stamp first, then
// down-sample" follow the document; the time-stamp format, the divider and the overrun
// rule are this design's choices.
module acq_controller
  import lm_pkg::*;
#(
  parameter int unsigned N_CH = lm_pkg::CH_COUNT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_enable,
  input  logic [15:0]               cfg_sample_div,
  input  logic [15:0]               cfg_decim,
  output logic                      adc_start,
  input  logic [N_CH-1:0]           adc_valid,
  input  logic [N_CH-1:0][ADC_W-1:0] adc_data,
  output logic                      set_valid,
  output logic                      set_last,
  output logic [TS_W-1:0]           set_ts,
  output logic [N_CH-1:0][ADC_W-1:0] set_data,
  output logic                      overrun,
  output logic [TS_W-1:0]           now
);

  logic [15:0]     div_cnt;
  logic [15:0]     win_cnt;
  logic            tick;
  logic            collecting;
  logic [N_CH-1:0] got;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!cfg_enable) begin
        div_cnt <= '0;
      end else if (div_cnt >= cfg_sample_div - 16'd1) begin
        div_cnt <= '0;
        tick    <= 1'b1;
      end else begin
        div_cnt <= div_cnt + 16'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_start  <= 1'b0;
      collecting <= 1'b0;
      got        <= '0;
      set_valid  <= 1'b0;
      set_last   <= 1'b0;
      set_ts     <= '0;
      set_data   <= '0;
      win_cnt    <= '0;
      overrun    <= 1'b0;
    end else begin
      adc_start <= 1'b0;
      set_valid <= 1'b0;
      overrun   <= 1'b0;
      if (!cfg_enable) win_cnt <= '0;
      if (tick) begin
        if (collecting) begin
          overrun <= 1'b1;
        end else begin
          adc_start  <= 1'b1;
          collecting <= 1'b1;
          got        <= '0;
          set_ts     <= now;
        end
      end
      if (collecting) begin
        for (int c = 0; c < N_CH; c++) begin
          if (adc_valid[c]) set_data[c] <= adc_data[c];
        end
        got <= got | adc_valid;
        if ((got | adc_valid) == '1) begin
          collecting <= 1'b0;
          set_valid  <= 1'b1;
          if (win_cnt >= cfg_decim - 16'd1) begin
            set_last <= 1'b1;
            win_cnt  <= '0;
          end else begin
            set_last <= 1'b0;
            win_cnt  <= win_cnt + 16'd1;
          end
        end
      end
    end
  end

endmodule
