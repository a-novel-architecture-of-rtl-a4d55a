// b2_inversion: the second-bit inversion operator of ETI coding.
//
// The word b1 b2 b3 ... is taken in pairs; when the word's decision bit is set,
// the second bit of every pair is inverted (be1 = b1, be2 = !b2, ...), otherwise
// the word passes unchanged. For an 8-bit word sent MSB first this inverts bits
// 6, 4, 2 and 0, which turns every transition inside the word into a
// non-transition and back, so Nt transitions become WL-1-Nt. The operator is its
// own inverse and is used unchanged in the decoder.
//
// Serial, one bit per bit period: `second` marks bits in the second place of a
// pair (odd position counted from 0 at the first bit). The result is
// registered ("D-FF") on clock edges where `bit_en` is high, one bit period of
// latency. The operator is the published one; its serial form with an output
// flip-flop follows the block diagram of the link.
module b2_inversion (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic bit_in,
  input  logic db,
  input  logic second,
  output logic bit_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bit_out <= 1'b0;
    else if (bit_en) bit_out <= bit_in ^ (db & second);
  end

endmodule
