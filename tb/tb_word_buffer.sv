// tb_word_buffer: random bits enter once per bit period; each bit must come
// out exactly WL bit periods later, and nothing may move on clocks without
// bit_en.
module tb_word_buffer;
  localparam int unsigned WL = 8;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, bit_in = 1'b0, bit_out;
  logic hist[$];
  int checks = 0, failures = 0;

  word_buffer #(.WL(WL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      bit_in = 1'($urandom);
      hist.push_back(bit_in);
      bit_en = 1'b1; @(posedge clk); #1;
      bit_en = 1'b0;
      // after the bit-period edge the output is the bit of WL periods earlier
      checks++;
      if (bit_out != ((n >= WL) ? hist[n - WL + 1] : 1'b0) && n >= WL - 1) begin
        failures++; if (failures < 10) $display("FAIL at bit %0d", n);
      end
      @(posedge clk); #1;
      checks++;
      if (n >= WL - 1 && bit_out != hist[n - WL + 1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
