// tb_deserializer: random words are sent MSB first with their frame index,
// back to back. Each word must appear on par_out with par_valid high for
// exactly one clock, log2(M) bit periods after the bit-period edge that took
// its last bit, and par_valid must be low on every other clock. Run for
// M = 8 (three 1:2 stages).
module tb_deserializer;
  localparam int unsigned M = 8;
  localparam int unsigned L = 3;
  logic clk = 1'b0, rst_n = 1'b0, bit_en = 1'b0, bit_in = 1'b0;
  logic [$clog2(M)-1:0] pos = '0;
  logic [M-1:0] par_out;
  logic par_valid;
  int checks = 0, failures = 0;

  deserializer #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  // words whose last bit was taken, and the bit period at which they are due
  logic [M-1:0] due_word[$];
  int           due_at[$];

  initial begin
    int n;
    n = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1'b1;
    for (int w = 0; w < 200 + 2; w++) begin
      logic [M-1:0] word;
      word = M'($urandom);
      for (int i = 0; i < M; i++) begin
        bit_in = word[M-1-i];
        pos = i[$clog2(M)-1:0];
        bit_en = 1'b1; @(posedge clk); #1; bit_en = 1'b0;
        if (i == M - 1) begin
          due_word.push_back(word);
          due_at.push_back(n + L);
        end
        checks++;
        if (due_at.size() > 0 && due_at[0] == n) begin
          logic [M-1:0] e;
          e = due_word.pop_front();
          void'(due_at.pop_front());
          if (!par_valid || par_out != e) begin
            failures++; if (failures < 10) $display("FAIL word %h got %h valid %b", e, par_out, par_valid);
          end
        end else if (par_valid) begin
          failures++; if (failures < 10) $display("FAIL par_valid at bit %0d", n);
        end
        @(posedge clk); #1;
        checks++;
        if (par_valid) begin failures++; $display("FAIL par_valid longer than one clock"); end
        n++;
      end
    end
    checks++;
    // only words still inside the tree when the stimulus stops may remain
    if (due_word.size() != 0 && due_at[0] < n) begin failures++; $display("FAIL %0d words never delivered", due_word.size()); end
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
