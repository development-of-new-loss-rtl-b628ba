// decim_filter: down-sampling filter of one channel (1 MSps in, one value per window out).
// Every in_valid sample enters the filter; in_last marks the final sample of a
// decimation window, after which one value leaves on out_valid (next clock).
//   mode 0, averaging: the window's samples are summed; out_data is the sum (the mean
//           times the window length, kept exact, to be scaled by the reader).
//   mode 1, low-pass: first-order recursive filter y <- y + (x - y) / 2^shift with
//           8 fraction bits; out_data is y * 256 sampled at the window end. The time
//           constant is 2^shift input samples.
// Changing mode takes effect at the next window; out_mode tells which mode produced
// out_data. The two methods (low-pass filtering
// and averaging) follow the document; their number formats are this design's choice.
module decim_filter #(
  parameter int unsigned IN_W  = 18,
  parameter int unsigned OUT_W = 32,
  parameter int unsigned FRAC  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    mode,
  input  logic [4:0]              shift,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic                    out_mode,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned ACC_W = OUT_W + 8;

  logic signed [ACC_W-1:0] acc;     // running sum (mode 0)
  logic signed [ACC_W-1:0] y;       // filter state with FRAC fraction bits (mode 1)
  logic signed [ACC_W-1:0] x_ext;
  logic signed [ACC_W-1:0] sum_next;
  logic signed [ACC_W-1:0] y_next;
  logic                    mode_q;

  always_comb begin
    x_ext    = ACC_W'(in_data);
    sum_next = acc + x_ext;
    y_next   = y + (((x_ext <<< FRAC) - y) >>> shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      y         <= '0;
      mode_q    <= 1'b0;
      out_valid <= 1'b0;
      out_mode  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        y <= y_next;
        if (in_last) begin
          acc       <= '0;
          out_valid <= 1'b1;
          out_data  <= mode_q ? OUT_W'(y_next) : OUT_W'(sum_next);
          out_mode  <= mode_q;
          mode_q    <= mode;
        end else begin
          acc <= sum_next;
        end
      end
    end
  end

endmodule
