// tb_eti_encoder: feeds a continuous stream of 8-bit words (0x95, 0x94, 0xB1,
// 0xF4, then random) and checks every half-bit slot of the line against a
// model of the coding rules: second-bit inversion when Nt >= 4, and a
// complemented first half in the last bit of each inverted word. The line must
// follow the input by exactly WL bit periods (first half) and WL + 1 (second
// half). Checks the transition count of each word on the line and that every
// path is used.
module tb_eti_encoder;
  import eti_pkg::*;
  localparam int unsigned WL = 8, NTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic bit_in = 1'b0, word_start = 1'b0;
  logic line, tx_db;
  phase_path_e path;
  logic [$clog2(WL)-1:0] nt;
  int checks = 0, failures = 0;
  int n_path [3] = '{0, 0, 0};

  eti_encoder #(.WL(WL), .NTH(NTH)) dut (.*);
  always #5 clk = ~clk;

  logic h1_q[$], h2_q[$];
  logic mprev = 1'b0;

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
    static logic [WL-1:0] words [4] = '{8'h95, 8'h94, 8'hB1, 8'hF4};
    int m, k2, tr_word;
    logic lprev;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    m = 0; k2 = 0; tr_word = 0; lprev = 1'b0;
    for (int w = 0; w < NW + 2; w++) begin
      logic [WL-1:0] word;
      logic d;
      word = (w < 4) ? words[w] : WL'($urandom);
      d = count_tr(word) >= NTH;
      for (int i = 0; i < WL; i++) begin
        logic b;
        b = word[WL-1-i] ^ (d && (i % 2 == 1));
        h2_q.push_back(b);
        h1_q.push_back((d && i == WL - 1) ? ~b : b);
        if (d && i == WL - 1) n_path[(b != mprev) ? 1 : 2]++;
        mprev = b;
      end
      for (int i = 0; i < WL; i++) begin
        bit_in = word[WL-1-i];
        word_start = (i == 0);
        bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
        if (m >= WL + 1) begin
          check(line == h2_q.pop_front(), $sformatf("second half of coded bit %0d", m - WL - 1));
          tr_word += (line != lprev) ? 1 : 0; lprev = line;
        end
        @(posedge clk); #1;
        if (m >= WL) begin
          check(line == h1_q.pop_front(), $sformatf("first half of coded bit %0d", m - WL));
          tr_word += (line != lprev) ? 1 : 0; lprev = line;
          k2++;
          if (k2 % WL == 0) begin
            // transitions inside one coded word plus the edge into it
            check(tr_word <= 1 + (WL - 1 - NTH) + 2, "transitions per coded word");
            tr_word = 0;
          end
        end
        m++;
      end
    end
    check(n_path[1] > 0 && n_path[2] > 0, "shift and special paths used");
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
