// eti_link_env: self-checking environment for the complete ETI link.
//
// Generates clock and reset for an eti_link instantiated next to it and drives
// it with a stream of M-bit words (directed words first, then
// random ones, including runs of constant and alternating words) and checks,
// against a reference model written here from the coding rules:
//   * every half-bit slot on the line (inversion decision, second-bit
//     inversion, and the phase-encoding waveform of each word's last bit);
//   * the decision bit recovered by the receiver for every word;
//   * every parallel word delivered, and the exact clock at which it arrives
//     (2*(M + 2*WL + 3 + log2 M) clocks after it was taken), i.e. one word per 2*M
//     clocks with no gaps;
//   * that the coded line never has more transitions per word than
//     min(Nt, WL-1-Nt) plus the two of a special-path pulse.
// It counts how often each mechanism occurred: inverted and plain words,
// words exactly at the threshold, shift-path and special-path last bits, and
// counts a failure for any that never occurred. A watchdog ends the run with
// a failure. `done` rises when the run is over; the instantiating testbench
// then reports `checks` and `failures`.
module eti_link_env #(
  parameter int unsigned M       = 8,
  parameter int unsigned WL      = 8,
  parameter int unsigned NTH     = WL / 2,
  parameter int unsigned NFRAMES = 400,
  parameter logic [15:0] DIRECTED [8] = '{16'h0095, 16'h00EA, 16'h00D5, 16'h0094,
                                          16'h0091, 16'h0075, 16'h00B1, 16'h00F4}
) (
  output logic         clk,
  output logic         rst_n,
  output logic [M-1:0] par_in,
  input  logic         load,
  input  logic [M-1:0] par_out,
  input  logic         par_valid,
  input  logic         line,
  input  logic         rx_db,
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam int unsigned WPF = M / WL;            // data words per frame
  localparam int unsigned LAT = 2 * (M + 2 * WL + 3 + $clog2(M));

  initial begin
    clk = 1'b0;
    rst_n = 1'b0;
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  always #5 clk = ~clk;

  longint cyc = 0;   // number of rising edges so far
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  logic [M-1:0] sent_q[$];
  longint       sent_t[$];
  logic         half_q[$];     // expected line, one entry per clock
  logic         db_q[$];       // expected decision bit per word
  logic         model_prev = 1'b0;
  int n_inv = 0, n_plain = 0, n_thresh = 0, n_shift = 0, n_special = 0;
  int line_tr_max = 0;         // bound on line transitions from the model
  int raw_tr = 0;              // transitions of the same bits sent uncoded
  logic raw_prev = 1'b0;
  longint first_half_t = -1;

  function automatic int count_tr(input logic [WL-1:0] w);
    int c = 0;
    for (int i = 0; i < WL - 1; i++) c += (w[i] != w[i+1]) ? 1 : 0;
    return c;
  endfunction

  task automatic model_frame(input logic [M-1:0] f);
    for (int w = 0; w < WPF; w++) begin
      logic [WL-1:0] word, enc;
      int t, te;
      logic d;
      word = f[M-1-w*WL -: WL];
      t = count_tr(word);
      d = (t >= NTH);
      if (d) n_inv++; else n_plain++;
      if (t == NTH) n_thresh++;
      db_q.push_back(d);
      // bit index i counts from the first (most significant) bit
      for (int i = 0; i < WL; i++)
        enc[WL-1-i] = word[WL-1-i] ^ (d && (i % 2 == 1));
      te = count_tr(enc);
      for (int i = WL - 1; i >= 0; i--) begin
        raw_tr += (word[i] != raw_prev) ? 1 : 0;
        raw_prev = word[i];
      end
      if (d && te != WL - 1 - t) begin
        failures++; $display("MODEL inversion count mismatch");
      end
      for (int i = 0; i < WL; i++) begin
        logic b, h1;
        b  = enc[WL-1-i];
        h1 = b;
        if (d && i == WL - 1) begin
          h1 = ~b;
          if (model_prev != b) n_shift++; else n_special++;
        end
        half_q.push_back(h1);
        half_q.push_back(b);
        model_prev = b;
      end
      line_tr_max += (t < WL - t - 1 ? t : WL - 1 - t) + 2 + 1;
    end
  endtask

  // ---------------- stimulus ----------------
  int frame_no = 0;
  function automatic logic [M-1:0] next_word(input int k);
    logic [M-1:0] v;
    if (k < 8 && WL == 8 && M == 8) return DIRECTED[k][M-1:0];
    if (k < 8 && M == 16 && WL == 8) return M'({DIRECTED[k][7:0], DIRECTED[(k+2)%8][7:0]});
    case (k % 16)
      3:  v = '0;
      7:  v = '1;
      11: for (int i = 0; i < M; i++) v[i] = i[0];
      default: for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    endcase
    return v;
  endfunction

  localparam int FIRST_HALF_OFS = 2 * (WL + 1) + 1;

  always @(posedge clk) begin
    if (!rst_n) par_in <= next_word(0);
    else if (load) begin
      sent_q.push_back(par_in);
      sent_t.push_back(cyc);
      model_frame(par_in);
      if (first_half_t < 0) first_half_t = cyc + longint'(FIRST_HALF_OFS);
      frame_no++;
      par_in <= next_word(frame_no);
    end
  end

  // ---------------- line check ----------------
  int line_tr = 0;
  logic line_d = 1'b0;
  always @(negedge clk) begin
    if (rst_n) begin
      // cyc has already advanced past the edge that drove the line
      if (first_half_t < 0 || cyc <= first_half_t) begin
        checks++;
        if (line !== 1'b0) begin failures++; $display("line not idle at %0d", cyc); end
      end else if (half_q.size() > 0) begin
        logic e;
        e = half_q.pop_front();
        checks++;
        if (line !== e) begin
          failures++;
          if (failures < 10) $display("line mismatch cyc %0d: got %b exp %b", cyc, line, e);
        end
        line_tr += (line != line_d) ? 1 : 0;
      end
      line_d = line;
    end
  end

  // ---------------- receiver decision bits ----------------
  // rx_db changes at the bit-period edge that ends a word; compare once per word.
  longint rx_word_t = -1;
  always @(posedge clk) begin
    if (rst_n && first_half_t >= 0 && cyc >= first_half_t + longint'(2 * WL + 2) &&
        ((cyc - (first_half_t + longint'(2 * WL + 2))) % (2 * WL)) == 0 && db_q.size() > 0) begin
      logic e;
      e = db_q.pop_front();
      checks++;
      if (rx_db !== e) begin
        failures++;
        if (failures < 10) $display("rx_db mismatch cyc %0d: got %b exp %b", cyc, rx_db, e);
      end
    end
  end

  // ---------------- parallel output ----------------
  int received = 0;
  always @(posedge clk) begin
    if (rst_n && par_valid) begin
      checks++;
      if (sent_t.size() == 0 || cyc < sent_t[0] + longint'(LAT) + 1) begin
        // words delivered before the first real one carry the idle line
        if (par_out !== '0) begin failures++; $display("early non-zero word %h", par_out); end
      end else begin
        logic [M-1:0] e;
        longint t;
        e = sent_q.pop_front();
        t = sent_t.pop_front();
        received++;
        if (par_out !== e || cyc != t + longint'(LAT) + 1) begin
          failures++;
          if (failures < 10)
            $display("word mismatch: got %h exp %h at %0d (exp %0d)", par_out, e, cyc, t + longint'(LAT) + 1);
        end
      end
    end
  end

  // ---------------- control ----------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (received == NFRAMES);
    repeat (4) @(posedge clk);
    $display("words: inverted=%0d plain=%0d at_threshold=%0d shift_path=%0d special_path=%0d",
             n_inv, n_plain, n_thresh, n_shift, n_special);
    $display("line transitions=%0d (bound %0d), same bits uncoded=%0d",
             line_tr, line_tr_max, raw_tr);
    checks++; if (n_inv == 0)     begin failures++; $display("no inverted word"); end
    checks++; if (n_plain == 0)   begin failures++; $display("no plain word"); end
    checks++; if (n_thresh == 0)  begin failures++; $display("no word at threshold"); end
    checks++; if (n_shift == 0)   begin failures++; $display("shift path never used"); end
    checks++; if (n_special == 0) begin failures++; $display("special path never used"); end
    checks++; if (line_tr > line_tr_max) begin failures++; $display("too many line transitions"); end
    done = 1'b1;
  end

  initial begin
    repeat (2 * M * (NFRAMES + 8) + 400) @(posedge clk);
    failures++;
    $display("watchdog expired, received %0d words", received);
    done = 1'b1;
  end

endmodule
