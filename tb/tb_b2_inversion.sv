// tb_b2_inversion: feeds 8-bit words serially with their decision bit and
// checks the registered output word. Directed vectors with the decision bit
// set: 0xD5 -> 0x80, 0xEA -> 0xBF, 0x94 -> 0xC1, 0x91 -> 0xC4 and 0x95 -> 0xC0;
// then random words with random decision bits, checked against
// word ^ 0x55 (every second bit from the MSB) when the decision bit is set.
module tb_b2_inversion;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic bit_in = 1'b0, db = 1'b0, second = 1'b0, bit_out;
  int checks = 0, failures = 0;

  b2_inversion dut (.*);
  always #5 clk = ~clk;

  initial begin
    static logic [7:0] vin [5] = '{8'hD5, 8'hEA, 8'h94, 8'h91, 8'h95};
    static logic [7:0] vout[5] = '{8'h80, 8'hBF, 8'hC1, 8'hC4, 8'hC0};
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      logic [7:0] word, got, exp;
      word = (w < 5) ? vin[w] : 8'($urandom);
      db   = (w < 5) ? 1'b1 : 1'($urandom);
      exp  = (w < 5) ? vout[w] : (db ? word ^ 8'h55 : word);
      if (w >= 5) begin
        checks++;
        if (exp != (db ? {word[7], ~word[6], word[5], ~word[4], word[3], ~word[2], word[1], ~word[0]} : word))
          failures++;
      end
      for (int i = 0; i < 8; i++) begin
        bit_in = word[7-i];
        second = (i % 2 == 1);
        bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
        got[7-i] = bit_out;        // registered: available right after the edge
        @(posedge clk); #1;
        checks++;
        if (bit_out != got[7-i]) failures++;   // held while bit_en is low
      end
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL %b db=%b: got %b exp %b", word, db, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
