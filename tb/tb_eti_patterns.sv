// tb_eti_patterns: switching activity of the default link for several kinds
// of data. For each pattern the link is reset, fed 200 words and drained; the
// transitions on the coded line are counted and compared with the transitions
// the same bits would make sent uncoded (one line bit per data bit, MSB
// first, starting from an idle low line). The words that follow the 200th
// continue the pattern; the few of their bits that reach the line before the
// 200th word is delivered are counted against the coded line only, which
// errs against the coding. Every word must also come back
// unchanged. Expected: fewer transitions than uncoded for random, alternating
// and counting data; the same count for constant data, which is never
// inverted.
module tb_eti_patterns;
  localparam int unsigned M = 8;
  localparam int NW = 200;
  localparam int NPAT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] par_in = '0, par_out;
  logic load, par_valid, line, tx_db, rx_db, s5s6, s6s7;
  eti_pkg::phase_path_e tx_path;
  logic [2:0] nt;
  int checks = 0, failures = 0;

  eti_link dut (.*);
  always #5 clk = ~clk;

  string names [NPAT] = '{"random", "alternating 0x55", "alternating 0xAA",
                          "counting", "constant 0x00", "constant 0xFF"};

  function automatic logic [M-1:0] pattern(input int p, input int k);
    case (p)
      0: return M'($urandom);
      1: return 8'h55;
      2: return 8'hAA;
      3: return M'(k);
      4: return 8'h00;
      default: return 8'hFF;
    endcase
  endfunction

  int coded_tr, raw_tr, sent, got;
  logic line_d, raw_prev, counting;
  logic [M-1:0] q[$];

  always @(posedge clk) begin
    if (counting) begin
      coded_tr += (line != line_d) ? 1 : 0;
      line_d = line;
    end
    if (rst_n && load && sent < NW) begin
      q.push_back(par_in);
      for (int i = M - 1; i >= 0; i--) begin
        raw_tr += (par_in[i] != raw_prev) ? 1 : 0;
        raw_prev = par_in[i];
      end
      sent++;
    end
  end

  initial begin
    for (int p = 0; p < NPAT; p++) begin
      int k;
      rst_n = 1'b0; counting = 1'b0;
      coded_tr = 0; raw_tr = 0; sent = 0; got = 0;
      line_d = 1'b0; raw_prev = 1'b0; q.delete();
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1; counting = 1'b1;
      k = 0;
      par_in = pattern(p, k);
      // offer a new word after each one taken; count returned words
      fork
        begin
          while (sent < NW) begin
            @(posedge clk);
            if (load) begin #1; k++; par_in = pattern(p, k); end
          end
        end
        begin
          // the first 2*(M+2*WL+3+log2 M) clocks carry only the idle start-up words
          repeat (2 * (M + 16 + 3 + 3) + 1) @(posedge clk);
          while (got < NW) begin
            @(posedge clk);
            if (par_valid) begin
              logic [M-1:0] e;
              e = q.pop_front();
              checks++;
              if (par_out != e) begin
                failures++;
                if (failures < 10) $display("%s: got %h exp %h", names[p], par_out, e);
              end
              got++;
            end
          end
        end
      join
      counting = 1'b0;
      $display("%-18s coded line transitions %5d, uncoded %5d", names[p], coded_tr, raw_tr);
      checks++;
      if (p <= 3 && !(coded_tr < raw_tr)) begin
        failures++; $display("  no reduction for %s", names[p]);
      end
      if (p >= 4 && coded_tr != raw_tr) begin
        failures++; $display("  constant data changed activity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPAT * (2 * M * (NW + 10) + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
