// tb_eti_link_m16: the link serializing a 16-bit bus as two 8-bit data words
// per frame, each with its own decision bit. The first frame is 0x95D5, whose
// two words both exceed the threshold and are coded as 0xC0 and 0x80; random
// traffic follows. All checks are in eti_link_env.
module tb_eti_link_m16;
  localparam int unsigned M = 16, WL = 8;
  logic done;
  int checks, failures;
  logic clk, rst_n, load, par_valid, line, tx_db, rx_db, s5s6, s6s7;
  logic [M-1:0] par_in, par_out;
  eti_pkg::phase_path_e tx_path;
  logic [$clog2(WL)-1:0] nt;

  eti_link #(.M(M), .WL(WL)) dut (.*);
  eti_link_env #(.M(M), .WL(WL), .NFRAMES(300)) env (
    .clk, .rst_n, .par_in, .load, .par_out, .par_valid, .line, .rx_db,
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
