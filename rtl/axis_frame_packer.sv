// axis_frame_packer: AXI-Stream master that carries decimated sample sets to the
// shared DDR4 buffer over a 128-bit stream.
// Each in_valid set becomes one frame of 1 + N_CH*32/128 beats (5 for 16 channels):
//   beat 0: [63:0] time stamp, [95:64] frame sequence number, [127:96] status word
//   beat k: channels 4(k-1) .. 4(k-1)+3, channel 4(k-1) in bits [31:0]
// tlast is set on the final beat. The set is captured when in_valid arrives; a set that
// arrives while the previous frame is still being sent is dropped and counted in
// drop_count (the acquisition is never stalled). frame_done pulses for one clock when
// the last beat is accepted. The sequence number counts all sets offered, dropped or
// not, so a reader can see gaps.
// The 128-bit AXI-Stream and the 16-channel multiplexing follow the document; the frame
// layout and the drop rule are this design's choices.
module axis_frame_packer
  import lm_pkg::*;
#(
  parameter int unsigned N_CH   = lm_pkg::CH_COUNT,
  parameter int unsigned AXIS_W = lm_pkg::AXIS_WIDTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [TS_W-1:0]            in_ts,
  input  logic [31:0]                in_status,
  input  logic [N_CH-1:0][VAL_W-1:0] in_data,
  output logic [AXIS_W-1:0]          m_axis_tdata,
  output logic                       m_axis_tvalid,
  input  logic                       m_axis_tready,
  output logic                       m_axis_tlast,
  output logic                       frame_done,
  output logic [31:0]                drop_count,
  output logic [31:0]                frame_count
);

  localparam int unsigned PER_BEAT = AXIS_W / VAL_W;
  localparam int unsigned N_BEATS  = 1 + (N_CH + PER_BEAT - 1) / PER_BEAT;

  logic [N_BEATS-1:0][AXIS_W-1:0] frame;
  logic [$clog2(N_BEATS)-1:0]     beat;
  logic [31:0]                    seq;

  assign m_axis_tdata = frame[beat];
  assign m_axis_tlast = m_axis_tvalid && (beat == $bits(beat)'(N_BEATS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame         <= '0;
      beat          <= '0;
      seq           <= '0;
      m_axis_tvalid <= 1'b0;
      frame_done    <= 1'b0;
      drop_count    <= '0;
      frame_count   <= '0;
    end else begin
      frame_done <= 1'b0;
      if (m_axis_tvalid && m_axis_tready) begin
        if (beat == $bits(beat)'(N_BEATS - 1)) begin
          m_axis_tvalid <= 1'b0;
          beat          <= '0;
          frame_done    <= 1'b1;
          frame_count   <= frame_count + 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
      if (in_valid) begin
        seq <= seq + 1'b1;
        if (m_axis_tvalid) begin
          drop_count <= drop_count + 1'b1;
        end else begin
          frame[0] <= {in_status, seq, in_ts};
          for (int b = 1; b < N_BEATS; b++) begin
            for (int w = 0; w < PER_BEAT; w++) begin
              frame[b][w*VAL_W +: VAL_W] <= ((b-1)*PER_BEAT + w < N_CH) ?
                                            in_data[(b-1)*PER_BEAT + w] : '0;
            end
          end
          m_axis_tvalid <= 1'b1;
          beat          <= '0;
        end
      end
    end
  end

  // AXI-Stream rule: data and last are held while valid waits for ready.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
  endproperty
  a_hold: assert property (p_hold);

endmodule
