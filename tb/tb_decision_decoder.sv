// tb_decision_decoder: random mid-bit-edge flags (s6s7) with a last-bit mark
// every 8 bits; db must take the flag seen at each last bit and hold it,
// ignoring the flag on all other bits and on clocks without bit_en.
module tb_decision_decoder;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic last = 1'b0, s6s7 = 1'b0, db;
  int checks = 0, failures = 0;

  decision_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic e;
    e = 1'b0;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      last = (n % 8 == 7);
      s6s7 = 1'($urandom);
      bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
      if (last) e = s6s7;
      s6s7 = ~s6s7; last = 1'b1;    // must be ignored without bit_en
      @(posedge clk); #1;
      checks++;
      if (db != e) begin failures++; if (failures < 10) $display("FAIL at %0d", n); end
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
