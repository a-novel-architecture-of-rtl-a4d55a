// eti_link: a complete ETI-coded serial link, M-bit parallel bus in, M-bit
// parallel bus out, one data wire in between.
//
//   par_in -> serializer -> eti_encoder ==line==> eti_decoder -> deserializer -> par_out
//
// The serializer turns each M-bit word into M serial bits. The encoder splits
// them into WL-bit data words; a word with Nt >= NTH transitions has every
// second bit inverted, which leaves at most WL-1-Nt transitions, and instead
// of a TIC-style extra flag bit the inversion is signalled by delaying the
// data edge of the word's last bit by half a bit. The receiver samples the
// line twice per bit, spots the mid-bit edge with an Alexander phase detector,
// undoes the inversion and reassembles the M-bit word. The link carries
// exactly one line bit per data bit.
//
// Clocking: `clk` runs at twice the bit rate (the line needs half-bit
// resolution for the phase shift). A toggle flip-flop makes `bit_en`, high on
// every other clock, which paces all bit-rate logic at both ends; the same
// clock is assumed forwarded to the receiver.
//
// Interface: `load` is high for one clock when `par_in` is taken (one word
// every 2*M clocks, continuously). `par_out` is valid for the one clock in
// which `par_valid` is high. A word taken at clock edge t appears at
// t + 2*(M + 2*WL + 3 + log2(M)). Before the first word arrives the receiver delivers
// all-zero words (the idle line is low). `line`, `tx_path`, `tx_db`, `rx_db`,
// `nt`, `s5s6` and `s6s7` expose the link for observation.
// The chain of blocks follows the published block diagram. The double-rate
// clock, the back-to-back word flow and the receiver's counter-based word
// alignment are this design's choices.
module eti_link
  import eti_pkg::*;
#(
  parameter int unsigned M   = 8,
  parameter int unsigned WL  = 8,
  parameter int unsigned NTH = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M-1:0]          par_in,
  output logic                  load,
  output logic [M-1:0]          par_out,
  output logic                  par_valid,
  output logic                  line,
  output phase_path_e           tx_path,
  output logic                  tx_db,
  output logic                  rx_db,
  output logic [$clog2(WL)-1:0] nt,
  output logic                  s5s6,
  output logic                  s6s7
);

  localparam int unsigned PW = $clog2(M);
  // A serializer bit of period n is seen by the receiver's bit logic at
  // bit-period edge n + WL + 3; the receiver counter starts accordingly.
  localparam int unsigned RX_POS_RESET = (M - ((WL + 3) % M)) % M;

  if (WL < 2 || M % WL != 0) begin : g_size_check
    $error("eti_link: M must be a multiple of WL, and WL at least 2");
  end

  logic          bit_en;
  logic          ser_bit, ser_valid, word_start, dec_bit;
  logic [PW-1:0] ser_pos, dec_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bit_en <= 1'b0;
    else        bit_en <= ~bit_en;
  end

  serializer #(.M(M)) u_ser (
    .clk, .rst_n, .bit_en, .par_in, .load, .ser_bit, .ser_pos, .ser_valid
  );

  assign word_start = ser_valid && (ser_pos == '0);

  eti_encoder #(.WL(WL), .NTH(NTH)) u_enc (
    .clk, .rst_n, .bit_en, .bit_in(ser_bit), .word_start,
    .line, .tx_db, .path(tx_path), .nt
  );

  eti_decoder #(.M(M), .WL(WL), .RX_POS_RESET(RX_POS_RESET)) u_dec (
    .clk, .rst_n, .bit_en, .line, .dec_bit, .dec_pos, .rx_db, .s5s6, .s6s7
  );

  deserializer #(.M(M)) u_deser (
    .clk, .rst_n, .bit_en, .bit_in(dec_bit), .pos(dec_pos), .par_out, .par_valid
  );

endmodule
