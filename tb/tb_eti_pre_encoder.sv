// tb_eti_pre_encoder: a continuous stream of 8-bit words (0x95 of the coding
// example, 0x94, 0xB1, 0xF4, then random) is fed one bit per bit period. The
// coded stream must equal each word with every second bit inverted when the
// word has 4 or more transitions, delayed by exactly WL bit periods from the
// bit-period edge that took the bit; enc_db and enc_last must accompany it.
// No coded word may keep more than 3 transitions.
module tb_eti_pre_encoder;
  localparam int unsigned WL = 8, NTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic bit_in = 1'b0, word_start = 1'b0;
  logic enc_bit, enc_db, enc_last;
  logic [$clog2(WL)-1:0] nt;
  int checks = 0, failures = 0;

  eti_pre_encoder #(.WL(WL), .NTH(NTH)) dut (.*);
  always #5 clk = ~clk;

  logic exp_bit[$], exp_db[$], exp_last[$];
  logic [WL-1:0] coded;
  int n_inv = 0;

  function automatic int count_tr(input logic [WL-1:0] w);
    int c = 0;
    for (int i = 0; i < WL - 1; i++) if (w[i] != w[i+1]) c++;
    return c;
  endfunction

  initial begin
    localparam int NW = 200;
    static logic [WL-1:0] words [4] = '{8'h95, 8'h94, 8'hB1, 8'hF4};
    int m;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    m = 0;
    for (int w = 0; w < NW + 2; w++) begin
      logic [WL-1:0] word;
      logic d;
      word = (w < 4) ? words[w] : WL'($urandom);
      d = count_tr(word) >= NTH;
      if (w < NW) begin
        if (d) n_inv++;
        for (int i = 0; i < WL; i++) begin
          exp_bit.push_back(word[WL-1-i] ^ (d && (i % 2 == 1)));
          exp_db.push_back(d);
          exp_last.push_back(i == WL - 1);
        end
      end
      for (int i = 0; i < WL; i++) begin
        bit_in = word[WL-1-i];
        word_start = (i == 0);
        bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
        if (m >= WL && exp_bit.size() > 0) begin
          logic eb, ed, el;
          int k;
          k  = m - WL;
          eb = exp_bit.pop_front(); ed = exp_db.pop_front(); el = exp_last.pop_front();
          coded[WL-1-(k % WL)] = enc_bit;
          checks++;
          if (enc_bit != eb || enc_db != ed || enc_last != el) begin
            failures++;
            if (failures < 10) $display("FAIL coded bit %0d: %b%b%b exp %b%b%b", k, enc_bit, enc_db, enc_last, eb, ed, el);
          end
          if (k % WL == WL - 1) begin
            checks++;
            if (count_tr(coded) > WL - 1 - NTH) failures++;
          end
        end
        m++;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (n_inv == 0 || exp_bit.size() != 0) failures++;
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
