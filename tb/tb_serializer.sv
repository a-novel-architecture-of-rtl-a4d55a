// tb_serializer: checks the parallel-to-serial converter. Words (the example
// 0xEA first, then random ones) are offered on par_in; the test checks that a
// word is taken exactly every M bit periods (2*M clocks), that the bits leave
// MSB first with their frame index on ser_pos, and that ser_valid rises with
// the first word.
module tb_serializer;
  localparam int unsigned M = 8;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic [M-1:0] par_in;
  logic load, ser_bit, ser_valid;
  logic [$clog2(M)-1:0] ser_pos;
  int checks = 0, failures = 0;

  serializer #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic bit_period();
    bit_en = 1'b1; @(posedge clk); #1;
    bit_en = 1'b0; @(posedge clk); #1;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [M-1:0] word;
    int since_load;
    par_in = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    check(ser_valid == 1'b0, "ser_valid low after reset");
    since_load = -1;
    for (int w = 0; w < 50; w++) begin
      word = (w == 0) ? 8'b1110_1010 : M'($urandom);
      par_in = word;
      // the word is taken in the bit period in which load is high
      bit_en = 1'b1; #0;
      check(load == 1'b1, $sformatf("load at word %0d", w));
      if (since_load >= 0) check(since_load == M, "one word every M bit periods");
      since_load = 0;
      @(posedge clk); #1; bit_en = 1'b0; @(posedge clk); #1;
      par_in = ~word;   // must not matter any more
      for (int i = 0; i < M; i++) begin
        check(ser_valid == 1'b1, "ser_valid");
        check(ser_bit == word[M-1-i], $sformatf("bit %0d of %h", i, word));
        check(ser_pos == i[$clog2(M)-1:0], "ser_pos");
        if (i < M - 1) begin
          bit_en = 1'b1; #0; check(load == 1'b0, "no load mid-word");
          @(posedge clk); #1; bit_en = 1'b0; @(posedge clk); #1;
          since_load++;
        end
      end
      since_load++;
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
