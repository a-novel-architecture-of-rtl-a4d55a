// phase_encoder: embeds each word's decision bit in the timing of the line.
//
// The line is driven at half-bit resolution: `clk` runs at twice the bit rate
// and every bit occupies two clock cycles, a first and a second half. The
// second half always carries the encoded bit. The first half is chosen by one
// of three paths (see eti_pkg):
//   plain   - word not inverted, or not its last bit: the first half carries
//             the bit too, so data edges line up with bit-period edges (zero
//             phase difference with the bit clock);
//   shift   - last bit of an inverted word, different from the bit before: the
//             first half still carries the previous bit, so the edge arrives
//             half a bit late and the last bit is half as wide;
//   special - last bit of an inverted word, equal to the bit before: there is
//             no edge to delay, so the first half carries the complement,
//             making a half-bit pulse whose trailing edge is the late edge.
// In both non-plain paths an edge appears in the middle of the last bit, and
// nowhere else in the stream, which is what the receiver's phase detector
// looks for. Only the special path adds transitions (two per such word).
//
// Inputs change on `bit_en` edges (one bit period each) and come from the
// pre-encoder. `line` is a flip-flop output: the first half of a bit appears
// one clock after its bit-period edge, the second half two clocks after.
// `path` reports the path of the bit currently on the inputs.
// The three paths, and the late last edge of an inverted word, follow the
// description of the scheme. The half-bit clocking and the complement pulse of
// the special path are this design's choices.
module phase_encoder
  import eti_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_en,
  input  logic        enc_bit,
  input  logic        enc_db,
  input  logic        enc_last,
  output logic        line,
  output phase_path_e path
);

  logic prev_q;          // encoded bit of the previous bit period
  logic first_half;      // value of the first half slot of the current bit

  always_comb begin
    if (!(enc_db && enc_last))   path = PATH_PLAIN;
    else if (prev_q != enc_bit)  path = PATH_SHIFT;
    else                         path = PATH_SPECIAL;
  end

  always_comb begin
    unique case (path)
      PATH_SHIFT:   first_half = prev_q;
      PATH_SPECIAL: first_half = ~enc_bit;
      default:      first_half = enc_bit;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q <= 1'b0;
      line   <= 1'b0;
    end else if (bit_en) begin
      line   <= enc_bit;      // second half of the current bit
      prev_q <= enc_bit;
    end else begin
      line   <= first_half;   // first half of the bit just presented
    end
  end

endmodule
