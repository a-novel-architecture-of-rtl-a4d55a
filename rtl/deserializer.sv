// deserializer: serial-to-parallel converter at the receive end of the link,
// built as a tree of 1:2 demultiplexer stages.
//
// Stage k (k = 1 .. log2(M)) works at 1/2^k of the bit rate: it takes words
// of 2^(k-1) bits from the stage before, keeps the first of each pair in a
// hold register and, when the second arrives, passes both on as one word of
// 2^k bits. Each stage thus runs on an enable that is half as frequent as the
// one before it, the single-clock equivalent of halving the clock at every
// level. Which word of a pair is first follows from the frame index `pos`
// carried along with the data, so the tree stays aligned to the frame.
//
// Bits arrive MSB first, one per bit period, with their index `pos` in the
// M-bit frame; M must be a power of two. `par_out` is registered and
// `par_valid` is high for one clock, log2(M) bit periods (2*log2(M) clocks)
// after the bit-period edge that took the frame's last bit. The staged structure
// follows the description; the enables replacing divided clocks are this
// design's choice.
module deserializer #(
  parameter int unsigned M = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_en,
  input  logic                 bit_in,
  input  logic [$clog2(M)-1:0] pos,
  output logic [M-1:0]         par_out,
  output logic                 par_valid
);

  localparam int unsigned L  = $clog2(M);
  localparam int unsigned PW = (L > 0) ? L : 1;

  if (M < 2 || (1 << L) != M) begin : g_size_check
    $error("deserializer: M must be a power of two, at least 2");
  end

  // stage k output: word of 2^k bits, its strobe and the frame index of its
  // last bit; stage 0 is the serial input itself
  logic [M-1:0]  word  [L+1];
  logic          stb   [L+1];
  logic [PW-1:0] wpos  [L+1];

  assign word[0] = M'(bit_in);
  assign stb[0]  = 1'b1;
  assign wpos[0] = pos;

  for (genvar k = 1; k <= L; k++) begin : g_stage
    localparam int unsigned WI = 1 << (k - 1);   // input word width
    logic [WI-1:0] hold;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold    <= '0;
        word[k] <= '0;
        stb[k]  <= 1'b0;
        wpos[k] <= '0;
      end else if (bit_en) begin
        stb[k] <= 1'b0;
        if (stb[k-1]) begin
          // bit k-1 of the frame index tells first (0) or second (1) of a pair
          if (!wpos[k-1][k-1]) begin
            hold <= word[k-1][WI-1:0];
          end else begin
            word[k] <= M'({hold, word[k-1][WI-1:0]});
            stb[k]  <= 1'b1;
            wpos[k] <= wpos[k-1];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_out   <= '0;
      par_valid <= 1'b0;
    end else begin
      par_valid <= 1'b0;
      if (bit_en && stb[L]) begin
        par_out   <= word[L];
        par_valid <= 1'b1;
      end
    end
  end

endmodule
