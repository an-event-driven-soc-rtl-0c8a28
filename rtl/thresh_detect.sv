// thresh_detect - dual-polarity threshold crossing detector.
//
// The filtered sample is compared in absolute value with the channel's
// threshold, so negative-going and positive-going spikes are both seen.
// The comparison is strict (|y| > thresh).  Purely combinational; the
// shared block datapath presents one channel's sample at a time.
module thresh_detect #(
  parameter int unsigned W  = 10,  // sample width, two's complement
  parameter int unsigned TW = 7    // threshold width
) (
  input  logic signed [W-1:0] y,
  input  logic        [TW-1:0] thresh,
  output logic                 hit
);
  logic [W:0] mag;
  always_comb begin
    mag   = y[W-1] ? (W+1)'(-$signed({y[W-1], y})) : (W+1)'({1'b0, y});
    hit = mag > (W+1)'(thresh);
  end
endmodule
