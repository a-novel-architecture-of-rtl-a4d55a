// tb_check_transition: checks transition counting and the decision bit.
// Words are fed serially, MSB first, with word_start on every first bit. After
// each word nt must equal the number of neighbouring bit pairs that differ and
// db must equal (nt >= 4). Directed words: 0xEA (5 transitions), 0x75
// "01110101" (5), 0xB1 "10110001" (4, exactly the threshold), 0xF4 (3), 0x00
// and 0x55 (0 and 7), then random words. The second/last position flags are
// checked for every bit.
module tb_check_transition;
  localparam int unsigned WL = 8, NTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic bit_in = 1'b0, word_start = 1'b0;
  logic second, last, db;
  logic [$clog2(WL)-1:0] nt;
  int checks = 0, failures = 0;
  int n_db1 = 0, n_db0 = 0;

  check_transition #(.WL(WL), .NTH(NTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int count_tr(input logic [WL-1:0] w);
    int c = 0;
    for (int i = 0; i < WL - 1; i++) if (w[i] != w[i+1]) c++;
    return c;
  endfunction

  initial begin
    static logic [WL-1:0] words [6] = '{8'hEA, 8'h75, 8'hB1, 8'hF4, 8'h00, 8'h55};
    static int exp_nt [6] = '{5, 5, 4, 3, 0, 7};
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      logic [WL-1:0] word;
      int e;
      word = (w < 6) ? words[w] : WL'($urandom);
      e = count_tr(word);
      if (w < 6) check(e == exp_nt[w], "reference count of directed word");
      for (int i = 0; i < WL; i++) begin
        bit_in = word[WL-1-i];
        word_start = (i == 0) && (w % 3 == 0);   // realign only now and then
        bit_en = 1'b1; #0;
        check(second == (i % 2 == 1), "second flag");
        check(last == (i == WL - 1), "last flag");
        @(posedge clk); #1; bit_en = 1'b0; @(posedge clk); #1;
      end
      check(int'(nt) == e, $sformatf("nt of %b: got %0d exp %0d", word, nt, e));
      check(db == (e >= NTH), $sformatf("db of %b", word));
      if (db) n_db1++; else n_db0++;
    end
    check(n_db1 > 0 && n_db0 > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
