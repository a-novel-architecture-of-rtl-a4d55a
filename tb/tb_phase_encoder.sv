// tb_phase_encoder: drives coded bits with their decision and last-bit flags
// directly and checks every half-bit slot of the line and the reported path.
// Expected: both halves equal the bit, except for the last bit of an inverted
// word, whose first half is the complement (shift path when the bit differs
// from the bit before it, special path when it is equal). Words are random,
// with a random decision bit; all three paths must occur.
module tb_phase_encoder;
  import eti_pkg::*;
  localparam int unsigned WL = 8;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic enc_bit = 1'b0, enc_db = 1'b0, enc_last = 1'b0;
  logic line;
  phase_path_e path;
  int checks = 0, failures = 0;
  int n_path [3] = '{0, 0, 0};

  phase_encoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic prev, h1;
    phase_path_e ep;
    prev = 1'b0;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      logic d;
      d = 1'($urandom);
      for (int i = 0; i < WL; i++) begin
        // the bit-period edge puts out the second half of the previous bit;
        // the next coded bit arrives right after it, as from the pre-encoder
        bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
        check(line == prev, "second half of previous bit");
        enc_bit  = 1'($urandom);
        enc_db   = d;
        enc_last = (i == WL - 1);
        if (d && enc_last) ep = (enc_bit != prev) ? PATH_SHIFT : PATH_SPECIAL;
        else               ep = PATH_PLAIN;
        h1 = (ep == PATH_PLAIN) ? enc_bit : ~enc_bit;
        #0;
        check(path == ep, "path");
        n_path[int'(ep)]++;
        @(posedge clk); #1;
        check(line == h1, $sformatf("first half, word %0d bit %0d", w, i));
        prev = enc_bit;
      end
    end
    check(n_path[0] > 0 && n_path[1] > 0 && n_path[2] > 0, "all three paths used");
    $display("paths plain=%0d shift=%0d special=%0d", n_path[0], n_path[1], n_path[2]);
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
