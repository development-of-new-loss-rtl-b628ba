// adc_model: behavioural model of an 18-bit SPI SAR ADC (ADS9110-like), for testbenches.
// The value on `sample` is captured at the rising edge of CONVST. When CS_n falls, the
// most significant bit is driven on SDO; each falling SCLK edge while CS_n is low moves
// the next bit out. SDO is 0 while CS_n is high. `conversions` counts captured samples.
module adc_model #(
  parameter int unsigned DATA_W = 18
) (
  input  logic              convst,
  input  logic              cs_n,
  input  logic              sclk,
  output logic              sdo,
  input  logic [DATA_W-1:0] sample,
  output int unsigned       conversions
);

  logic [DATA_W-1:0] held = '0;
  logic [DATA_W-1:0] sh   = '0;

  initial begin
    sdo         = 1'b0;
    conversions = 0;
  end

  always @(posedge convst) begin
    held        <= sample;
    conversions <= conversions + 1;
  end

  always @(negedge cs_n) begin
    sh  = held;
    sdo = sh[DATA_W-1];
  end

  always @(posedge cs_n) sdo = 1'b0;

  always @(negedge sclk) begin
    if (!cs_n) begin
      sh  = {sh[DATA_W-2:0], 1'b0};
      sdo = sh[DATA_W-1];
    end
  end

endmodule
