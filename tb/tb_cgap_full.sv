// tb_cgap_full: end-to-end test of cgap_top at its default size, the 5 x 5
// array with 60 spMEMs, on a random instance of the largest size the array
// is built for, 32 users and 32 channels, with 3 solutions per spMEM (a
// population of 180). The test itself is in cgap_tb_body.svh.
module tb_cgap_full;
  import cgap_pkg::*;
  localparam int ROWS = 5, COLS = 5, NU = 32, NC = 32, SOLS = 3, TARGET = 2000;

  cgap_top dut (.clk, .rst_n, .hs_wr, .hs_addr, .hs_wdata, .hs_rdata, .lock_refusals);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "cgap_tb_body.svh"
endmodule
