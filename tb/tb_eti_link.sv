// tb_eti_link: end-to-end test of eti_link with every parameter at its
// default (8-bit bus, 8-bit data words, threshold 4). Starts with the example
// words of the coding description (0x95, 0xEA, 0xD5, 0x94, 0x91, 0x75, 0xB1,
// 0xF4), then random traffic; all checks are in eti_link_env.
module tb_eti_link;
  localparam int unsigned M = 8, WL = 8;
  logic done;
  int checks, failures;
  logic clk, rst_n, load, par_valid, line, tx_db, rx_db, s5s6, s6s7;
  logic [M-1:0] par_in, par_out;
  eti_pkg::phase_path_e tx_path;
  logic [$clog2(WL)-1:0] nt;

  eti_link dut (.*);
  eti_link_env #(.M(M), .WL(WL), .NFRAMES(400)) env (
    .clk, .rst_n, .par_in, .load, .par_out, .par_valid, .line, .rx_db,
    .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
