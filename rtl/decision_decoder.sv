// decision_decoder: recovers a word's decision bit from the phase detector.
//
// The transmitter places a mid-bit edge only in the last bit of an inverted
// word, so the S6^S7 flag of the phase detector, taken at the last bit of a
// word, is that word's decision bit. It is latched on the `bit_en` edge of the
// last bit and held for one word, while the buffered copy of the word passes
// through the decoder's second-bit inversion. The decoding rule is this
// design's choice, matched to its phase encoder.
module decision_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic last,
  input  logic s6s7,
  output logic db
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              db <= 1'b0;
    else if (bit_en && last) db <= s6s7;
  end

endmodule
