// alexander_pd: Alexander (bang-bang) phase detector for the ETI receiver.
//
// Three consecutive samples of the line are compared: S5, the second-half
// sample of the previous bit; S6, the first-half sample of the current bit;
// and S7, its second-half sample. S5^S6 flags a data edge aligned with the
// bit-period edge (clock and data in phase); S6^S7 flags an edge in the middle
// of the bit, i.e. data late by half a bit, which is how the transmitter marks
// an inverted word. Both flags set means a half-bit pulse (the special path).
//
// The two half-bit samples come from the decoder's line flip-flops
// (`samp_first`, `samp_second`); S5 is kept here, updated on `bit_en` edges.
// The flags are combinational and valid when `bit_en` is high, which is when
// both samples of the current bit are present. The S5S6/S6S7 flag names follow
// the description; the sampling points follow this design's half-bit line.
module alexander_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_en,
  input  logic samp_first,
  input  logic samp_second,
  output logic s5s6,
  output logic s6s7
);

  logic s5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s5 <= 1'b0;
    else if (bit_en) s5 <= samp_second;
  end

  assign s5s6 = s5 ^ samp_first;
  assign s6s7 = samp_first ^ samp_second;

endmodule
