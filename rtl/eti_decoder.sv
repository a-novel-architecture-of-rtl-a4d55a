// eti_decoder: the ETI receiver coder.
//
// Two D flip-flops sample the line on every clock (twice per bit), giving the
// first- and second-half value of each bit. The second-half value is the
// encoded bit. The Alexander phase detector and the decision-bit decoder find
// the mid-bit edge of an inverted word's last bit and yield the word's
// decision bit; meanwhile the encoded bits fill a one-word buffer. When the
// word is complete its buffered copy passes through the second-bit inversion
// with that decision bit, which restores the original bits.
//
// The receiver keeps its own frame counter `rx_pos` (bit index 0..M-1 within
// an M-bit frame); both ends share clock and reset, so RX_POS_RESET is chosen
// by the instantiating level to line the counter up with the transmitter's
// latency. `dec_bit` is registered once per bit period with its frame index
// `dec_pos`; `rx_db` is the decision bit of the word now leaving.
// The flip-flop pair, phase detector, decision-bit decoder and inversion
// follow the block diagram; the word buffer and the frame counter are this
// design's way of giving the inversion its decision bit in time.
// An assertion checks the line rule that a mid-bit edge appears only in the
// last bit of a word.
// Latency: `dec_bit` is registered WL bit periods after the bit-period edge
// at which both halves of the bit are held in the sampling flip-flops.
module eti_decoder #(
  parameter int unsigned M            = 8,
  parameter int unsigned WL           = 8,
  parameter int unsigned RX_POS_RESET = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic                 line,
  output logic                 dec_bit,
  output logic [$clog2(M)-1:0] dec_pos,
  output logic                 rx_db,
  output logic                 s5s6,
  output logic                 s6s7
);

  localparam int unsigned PW = $clog2(M);
  localparam logic [PW-1:0] LASTPOS = PW'(M - 1);

  logic          ff1, ff2;     // line samples: second half, first half
  logic [PW-1:0] rx_pos;
  logic          wlast, buf_bit;
  int unsigned   wpos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1 <= 1'b0;
      ff2 <= 1'b0;
    end else begin
      ff1 <= line;
      ff2 <= ff1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rx_pos <= PW'(RX_POS_RESET);
    else if (bit_en) rx_pos <= (rx_pos == LASTPOS) ? '0 : rx_pos + 1'b1;
  end

  assign wpos  = int'(rx_pos) % WL;
  assign wlast = (wpos == WL - 1);

  alexander_pd u_pd (
    .clk, .rst_n, .bit_en, .samp_first(ff2), .samp_second(ff1),
    .s5s6, .s6s7
  );

  decision_decoder u_dbdec (
    .clk, .rst_n, .bit_en, .last(wlast), .s6s7, .db(rx_db)
  );

  word_buffer #(.WL(WL)) u_buffer (
    .clk, .rst_n, .bit_en, .bit_in(ff1), .bit_out(buf_bit)
  );

  b2_inversion u_b2inv (
    .clk, .rst_n, .bit_en, .bit_in(buf_bit), .db(rx_db), .second(wpos[0]),
    .bit_out(dec_bit)
  );

  // Line rule: a mid-bit edge may only appear in the last bit of a word.
  always_ff @(posedge clk) begin
    if (bit_en && !wlast)
      mid_edge_only_in_last_bit: assert (!s6s7)
        else $error("eti_decoder: mid-bit edge outside the last bit of a word");
  end

  // the buffered bit belongs to the word WL bits earlier in the frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dec_pos <= '0;
    else if (bit_en) dec_pos <= PW'((int'(rx_pos) + M - WL % M) % M);
  end

endmodule
