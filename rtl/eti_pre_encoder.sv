// eti_pre_encoder: the transition-inversion part of the ETI encoder, without
// the phase encoding.
//
// The serial stream feeds check_transition and, in parallel, a one-word
// word_buffer. When a word has fully entered, its decision bit is known and the
// same word starts to leave the buffer; b2_inversion then inverts every second
// bit of it if the decision bit is set. The output therefore lags the input by
// WL + 1 bit periods. With NTH = WL/2 an output word has min(Nt, WL-1-Nt)
// transitions between its own bits.
//
// Alongside each encoded bit the block gives, registered in the same bit
// period: the word's decision bit (`enc_db`) and whether the bit is the last
// of its word (`enc_last`). The decision bit is not part of the serial stream; the
// phase encoder embeds it. `word_start` marks the bit period carrying the first
// bit of a frame and aligns the word counter. The structure follows the
// dashed "pre-encoder" box of the link's block diagram.
module eti_pre_encoder #(
  parameter int unsigned WL  = 8,
  parameter int unsigned NTH = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_en,
  input  logic                  bit_in,
  input  logic                  word_start,
  output logic                  enc_bit,
  output logic                  enc_db,
  output logic                  enc_last,
  output logic [$clog2(WL)-1:0] nt
);

  logic second, last, db, buf_bit;

  check_transition #(.WL(WL), .NTH(NTH)) u_check (
    .clk, .rst_n, .bit_en, .bit_in, .word_start,
    .second, .last, .nt, .db
  );

  // the bit leaving the buffer sits at the same word position as the bit
  // entering check_transition
  word_buffer #(.WL(WL)) u_buffer (
    .clk, .rst_n, .bit_en, .bit_in, .bit_out(buf_bit)
  );

  b2_inversion u_b2inv (
    .clk, .rst_n, .bit_en, .bit_in(buf_bit), .db, .second,
    .bit_out(enc_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_db    <= 1'b0;
      enc_last  <= 1'b0;
    end else if (bit_en) begin
      enc_db    <= db;
      enc_last  <= last;
    end
  end

endmodule
