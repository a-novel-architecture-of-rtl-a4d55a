// serializer: parallel-to-serial converter at the transmit end of the link.
//
// An M-bit parallel word is captured in a bank of input flip-flops and sent one
// bit per bit period, most significant bit first, through an M:1 multiplexer
// driven by a select counter (three select lines for M = 8). The word is taken
// in the bit period in which `load` is high; the source must hold `par_in`
// valid while `load` is high. Words follow each other without gaps, so one word
// is taken every M bit periods.
//
// Timing: the design runs on `clk`, which is twice the bit rate; `bit_en` is
// high on every other clock and marks the bit-period edges. `ser_bit`,
// `ser_pos` (index of the bit within the frame, 0 = MSB) and `ser_valid` are
// registered-output functions and stay stable for a whole bit period.
// The select counter resets to M-1 so that the first word is taken at the
// first bit-period edge after reset. MSB-first order and the load handshake
// are this design's choices.
module serializer #(
  parameter int unsigned M = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic [M-1:0]         par_in,
  output logic                 load,
  output logic                 ser_bit,
  output logic [$clog2(M)-1:0] ser_pos,
  output logic                 ser_valid
);

  localparam int unsigned PW = $clog2(M);
  localparam logic [PW-1:0] LAST = PW'(M - 1);

  logic [PW-1:0] sel;
  logic [M-1:0]  word_q;   // the input flip-flops N1..Nm

  assign load = bit_en && (sel == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel       <= LAST;
      word_q    <= '0;
      ser_valid <= 1'b0;
    end else if (bit_en) begin
      if (sel == LAST) begin
        sel       <= '0;
        word_q    <= par_in;
        ser_valid <= 1'b1;
      end else begin
        sel <= sel + 1'b1;
      end
    end
  end

  // M:1 selection, MSB first
  assign ser_bit = word_q[LAST - sel];
  assign ser_pos = sel;

endmodule
