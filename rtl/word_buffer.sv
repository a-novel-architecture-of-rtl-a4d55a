// word_buffer: holds the serial bits of one data word while its decision bit
// is being worked out.
//
// A WL-stage shift register advanced once per bit period: `bit_out` is the bit
// that entered WL bit periods earlier, i.e. the bit at the same position of the
// previous word. The decision bit of that word is final exactly when its first
// bit appears here. The same buffer is used in the encoder and the decoder.
// A plain shift register is this design's choice; only the buffer's purpose is
// given.
module word_buffer #(
  parameter int unsigned WL = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic bit_in,
  output logic bit_out
);

  logic [WL-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (bit_en) sr <= {sr[WL-2:0], bit_in};
  end

  assign bit_out = sr[WL-1];

endmodule
