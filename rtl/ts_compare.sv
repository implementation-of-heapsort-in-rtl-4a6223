// ts_compare: wrap-around timestamp comparison.
//
// Timestamps are KEY_W-bit counters that wrap, so "older" is decided from the
// modular difference rather than from the raw values:
//   a_lt_b  = bit KEY_W-1 of (a - b) mod 2^KEY_W is set
//   a_le_b  = bit KEY_W-1 of (b - a) mod 2^KEY_W is clear
// This is the pair of "<" and "<=" operators the sorter uses; a_lt_b is
// always the inverse of b_le_a, so a single instance also yields the reverse
// strict comparison. The result is only meaningful when the two stamps are
// less than half a period apart, which the bounded disorder of the stream
// guarantees. Purely combinational, no clock.
//
// The two operators, including their behaviour at a difference of exactly
// half a period (a_lt_b true, a_le_b false for a = b + 2^(KEY_W-1)), follow
// the bit tests of the published sorter; packaging them as a module is this
// design's choice.
module ts_compare #(
  parameter int unsigned KEY_W = 16
) (
  input  logic [KEY_W-1:0] a,
  input  logic [KEY_W-1:0] b,
  output logic             a_lt_b,   // a strictly older than b
  output logic             a_le_b    // a older than or equal to b
);

  logic [KEY_W-1:0] diff_ab, diff_ba;

  always_comb begin
    diff_ab = a - b;
    diff_ba = b - a;
    a_lt_b  = diff_ab[KEY_W-1];
    a_le_b  = !diff_ba[KEY_W-1];
  end

endmodule
