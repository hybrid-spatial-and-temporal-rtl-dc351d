// timestamp_binner: turns a pair of timestamps into a histogram bin index.
//
// This is the input line of one histogram channel. The time difference
// dt = meas - ref (T bits, modulo 2^T) is taken first. TIME_OFFSET is then
// removed, so that bin 0 starts at dt = TIME_OFFSET, and the BIT_TRUNC least
// significant bits are dropped, so one bin is 2^BIT_TRUNC timestamp LSBs wide.
// The next N bits are the bin. The full-scale range of a channel is therefore
// [TIME_OFFSET, TIME_OFFSET + 2^(N+BIT_TRUNC)) in timestamp LSBs.
//
// Following the design: the subtractor, the TIME_OFFSET and BIT_TRUNC
// registers and the truncation. This design's own choices: the offset is
// subtracted (the bin range starts at TIME_OFFSET) and events that fall
// outside the range (dt below TIME_OFFSET, or beyond the last bin) are
// dropped rather than folded into the histogram.
//
// Interface: in_valid/meas/ref in, out_valid/out_bin out, plus
// out_range_err which flags a valid input outside the range.
// Timing: purely combinational, so the histogram channel's two-cycle latency
// is the latency of the whole input line.
module timestamp_binner #(
  parameter int unsigned T   = 32,            // timestamp width
  parameter int unsigned N   = 8,             // bin address width (2^N bins)
  parameter int unsigned BTW = $clog2(T)      // width of BIT_TRUNC
) (
  input  logic           in_valid,
  input  logic [T-1:0]   meas,
  input  logic [T-1:0]   ref_ts,
  input  logic [T-1:0]   time_offset,
  input  logic [BTW-1:0] bit_trunc,
  output logic           out_valid,
  output logic [N-1:0]   out_bin,
  output logic           out_range_err
);

  logic [T-1:0] dt;
  logic [T-1:0] shifted;
  logic [T-1:0] scaled;
  logic         below;
  logic         beyond;

  always_comb begin
    dt      = meas - ref_ts;
    below   = dt < time_offset;
    shifted = dt - time_offset;
    scaled  = shifted >> bit_trunc;
    beyond  = (scaled >> N) != '0;
    out_bin       = scaled[N-1:0];
    out_valid     = in_valid && !below && !beyond;
    out_range_err = in_valid && (below || beyond);
  end

endmodule
