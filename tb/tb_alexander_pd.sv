// tb_alexander_pd: random first- and second-half samples are applied once per
// bit period; s5s6 must equal (second-half sample of the previous bit) XOR
// (first-half sample of this bit), and s6s7 the XOR of this bit's two samples.
// The samples change on the clocks between bit-period edges as well.
module tb_alexander_pd;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0;
  logic samp_first = 1'b0, samp_second = 1'b0, s5s6, s6s7;
  int checks = 0, failures = 0;

  alexander_pd dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic s5;
    s5 = 1'b0;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      samp_first  = 1'($urandom);
      samp_second = 1'($urandom);
      bit_en = 1'b1; #1;
      checks++;
      if (s5s6 != (s5 ^ samp_first) || s6s7 != (samp_first ^ samp_second)) begin
        failures++; if (failures < 10) $display("FAIL at %0d", n);
      end
      @(posedge clk); #1; bit_en = 1'b0;
      s5 = samp_second;
      // between bit-period edges the samples move on; S5 must not follow
      samp_first  = 1'($urandom);
      samp_second = 1'($urandom);
      @(posedge clk); #1;
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
