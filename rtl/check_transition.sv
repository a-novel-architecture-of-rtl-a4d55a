// check_transition: counts bit transitions in each serial data word and sets
// the decision bit.
//
// A word-length counter marks the first bit of every WL-bit word; that mark
// clears the transition adder and the D flip-flop that holds the previous bit.
// For every other bit, the bit is XORed with the previous one and the adder
// adds the result. At the last bit of the word the count Nt is stored in `nt`
// and the decision bit `db` is set when Nt >= NTH; both hold until the end of
// the next word. With WL = 8 up to 7 transitions can occur inside a word.
//
// `word_start` (high for the bit period that carries the first bit of a frame)
// realigns the word-length counter; between marks it wraps by itself.
// `second` (odd position: second bit of a pair) and `last` describe the bit
// currently on `bit_in`.
// Inputs are sampled on clock edges where `bit_en` is high.
// The counter/adder/flip-flop structure follows the description; NTH = WL/2
// and the realignment input are this design's choices.
module check_transition #(
  parameter int unsigned WL  = 8,
  parameter int unsigned NTH = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_en,
  input  logic                  bit_in,
  input  logic                  word_start,
  output logic                  second,
  output logic                  last,
  output logic [$clog2(WL)-1:0] nt,
  output logic                  db
);

  localparam int unsigned PW = $clog2(WL);
  localparam logic [PW-1:0] LASTPOS = PW'(WL - 1);

  logic [PW-1:0] wl_cnt;   // position of the next bit when no realignment
  logic [PW-1:0] adder;    // transitions so far in the current word
  logic          prev_q;   // previous bit (the D-FF)
  logic [PW-1:0] adder_next;

  logic [PW-1:0] pos;      // position of the bit on bit_in
  logic          first;

  assign pos    = word_start ? '0 : wl_cnt;
  assign first  = (pos == '0);
  assign second = pos[0];
  assign last   = (pos == LASTPOS);

  assign adder_next = first ? '0 : adder + PW'(bit_in ^ prev_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wl_cnt <= '0;
      adder  <= '0;
      prev_q <= 1'b0;
      nt     <= '0;
      db     <= 1'b0;
    end else if (bit_en) begin
      wl_cnt <= last ? '0 : pos + 1'b1;
      adder  <= adder_next;
      prev_q <= bit_in;
      if (last) begin
        nt <= adder_next;
        db <= (int'(adder_next) >= int'(NTH));
      end
    end
  end

endmodule
