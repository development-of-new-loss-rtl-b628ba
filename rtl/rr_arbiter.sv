// rr_arbiter: round-robin arbiter over N requesters.
// grant is one-hot (or zero when nothing requests) and combinational from req; when
// `advance` is set, priority moves to the requester after the one granted, so every
// requester is served within N grants. Used by the hub, whose round-robin service is
// named in the document; the rotating-priority scheme is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  logic [$clog2(N)-1:0] prio;      // index with highest priority
  logic [$clog2(N)-1:0] gidx;

  always_comb begin
    grant = '0;
    gidx  = '0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [$clog2(N)-1:0] idx;
      idx = $bits(idx)'((32'(prio) + 32'(k)) % N);
      if (req[idx]) begin
        grant = '0;
        grant[idx] = 1'b1;
        gidx  = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                prio <= '0;
    else if (advance && |req)  prio <= (gidx == $bits(gidx)'(N - 1)) ? '0 : gidx + 1'b1;
  end

endmodule
