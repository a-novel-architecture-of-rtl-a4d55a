// tb_eti_decoder: drives the line directly with the waveform an ETI encoder
// would send for a stream of 8-bit words (0xC0, the coded form of 0x95,
// first), built here from the coding rules, and checks that the decoder
// returns the original bits with their frame index, WL + 1 bit periods after
// the bit-period edge that put each bit's second half on the line, and the
// right decision bit per word.
// The receiver's frame counter is started at M-2 to match this test's timing.
module tb_eti_decoder;
  localparam int unsigned M = 8, WL = 8, NTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, line = 1'b0;
  logic dec_bit, rx_db, s5s6, s6s7;
  logic [$clog2(M)-1:0] dec_pos;
  int checks = 0, failures = 0;
  int n_inv = 0;

  eti_decoder #(.M(M), .WL(WL), .RX_POS_RESET(M - 2)) dut (.*);
  always #5 clk = ~clk;

  logic orig[$], h1[$], h2[$], dbw[$];

  function automatic int count_tr(input logic [WL-1:0] w);
    int c = 0;
    for (int i = 0; i < WL - 1; i++) if (w[i] != w[i+1]) c++;
    return c;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    localparam int NW = 300;
    static logic [WL-1:0] words [3] = '{8'h95, 8'hD5, 8'h94};
    int nbits;
    for (int w = 0; w < NW + 3; w++) begin
      logic [WL-1:0] word;
      logic d;
      word = (w < 3) ? words[w] : WL'($urandom);
      d = (w < NW) && (count_tr(word) >= NTH);
      if (w >= NW) word = '0;
      if (d) n_inv++;
      dbw.push_back(d);
      for (int i = 0; i < WL; i++) begin
        logic b;
        b = word[WL-1-i] ^ (d && (i % 2 == 1));
        orig.push_back(word[WL-1-i]);
        h2.push_back(b);
        h1.push_back((d && i == WL - 1) ? ~b : b);
      end
    end
    if (h2[7] != 1'b0 || {h2[0], h2[1], h2[2], h2[3]} != 4'b1100) failures++;
    nbits = h2.size();
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int j = 0; j < nbits; j++) begin
      bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
      line = (j == 0) ? 1'b0 : h2[j-1];
      if (j >= WL + 2 && j - 2 - WL < NW * WL) begin
        int k;
        k = j - 2 - WL;
        check(dec_bit == orig[k], $sformatf("decoded bit %0d", k));
        check(int'(dec_pos) == k % M, "frame index");
        if (k % WL == 0) check(rx_db == dbw[k / WL], $sformatf("decision bit of word %0d", k / WL));
      end
      @(posedge clk); #1;
      line = h1[j];
    end
    check(n_inv > 0, "inverted words seen");
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
