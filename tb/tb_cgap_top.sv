// tb_cgap_top: end-to-end test of the array at 2 x 2 PEs (12 spMEMs) on a
// random 5-user, 6-channel instance with 2 solutions per spMEM. The test
// itself is in cgap_tb_body.svh.
module tb_cgap_top;
  import cgap_pkg::*;
  localparam int ROWS = 2, COLS = 2, NU = 5, NC = 6, SOLS = 2, TARGET = 2000;

  cgap_top #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rst_n, .hs_wr, .hs_addr,
                                            .hs_wdata, .hs_rdata, .lock_refusals);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "cgap_tb_body.svh"
endmodule
