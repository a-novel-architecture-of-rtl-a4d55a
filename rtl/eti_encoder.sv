// eti_encoder: the complete ETI transmitter coder, pre-encoder plus phase
// encoder.
//
// The serial input stream is split into WL-bit words. For each word the number
// of transitions Nt is counted; if Nt >= NTH every second bit is inverted, and
// the inversion is signalled not by an extra bit but by moving the data edge
// into the middle of the word's last bit (see phase_encoder). The line carries
// exactly WL bit periods per word.
//
// Latency: a bit presented on `bit_in` in bit period n reaches the line as its
// first half-slot one clock after bit-period edge n + WL + 1. `tx_db` and
// `path` describe the bit the phase encoder is currently sending; `nt` is the
// transition count of the last word to enter. The split into pre-encoder and
// phase encoder follows the block diagram of the scheme.
module eti_encoder
  import eti_pkg::*;
#(
  parameter int unsigned WL  = 8,
  parameter int unsigned NTH = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_en,
  input  logic                  bit_in,
  input  logic                  word_start,
  output logic                  line,
  output logic                  tx_db,
  output phase_path_e           path,
  output logic [$clog2(WL)-1:0] nt
);

  logic enc_bit, enc_last;

  eti_pre_encoder #(.WL(WL), .NTH(NTH)) u_pre (
    .clk, .rst_n, .bit_en, .bit_in, .word_start,
    .enc_bit, .enc_db(tx_db), .enc_last, .nt
  );

  phase_encoder u_phase (
    .clk, .rst_n, .bit_en, .enc_bit, .enc_db(tx_db), .enc_last,
    .line, .path
  );

endmodule
