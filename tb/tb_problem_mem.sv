// tb_problem_mem: loads random L, C and B tables word by word, as the
// command network does, then reads every user's rows back and compares them
// with the tables kept by the testbench. Read latency is one cycle.
module tb_problem_mem;
  import cgap_pkg::*;
  localparam int CW = MMAX * NMAX / DW, BWD = MMAX * BW / DW;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [1:0] wr_table = 0;
  logic [NIW-1:0] wr_n = 0, rd_n = 0;
  logic [7:0] wr_word = 0;
  logic [DW-1:0] wr_data = 0;
  logic [MMAX-1:0] l_row;
  logic [MMAX*NMAX-1:0] c_row;
  logic [MMAX*BW-1:0] b_row;
  logic [MMAX-1:0] lm [NMAX];
  logic [DW-1:0] cm [NMAX][CW];
  logic [DW-1:0] bm [NMAX][BWD];
  int checks = 0, failures = 0;

  problem_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(logic [1:0] t, int n, int w, logic [DW-1:0] d);
    wr_en = 1; wr_table = t; wr_n = NIW'(n); wr_word = 8'(w); wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd_n = 7; @(posedge clk); #1;
    check(l_row == '0 && c_row == '0 && b_row == '0, "cleared at reset");
    for (int n = 0; n < NMAX; n++) begin
      lm[n] = $urandom; wr(REG_L, n, 0, DW'(lm[n]));
      for (int w = 0; w < CW; w++) begin cm[n][w] = $urandom; wr(REG_C, n, w, cm[n][w]); end
      for (int w = 0; w < BWD; w++) begin bm[n][w] = $urandom; wr(REG_B, n, w, bm[n][w]); end
    end
    for (int n = NMAX - 1; n >= 0; n--) begin
      rd_n = NIW'(n);
      @(posedge clk); #1;
      check(l_row == lm[n], "L row");
      for (int w = 0; w < CW; w++) check(c_row[w*DW +: DW] == cm[n][w], "C word");
      for (int w = 0; w < BWD; w++) check(b_row[w*DW +: DW] == bm[n][w], "B word");
      // field layout: conflict vector of channel m, reward of channel m
      check(c_row[3*NMAX +: NMAX] == NMAX'(cm[n][3*NMAX/DW] >> ((3*NMAX) % DW)), "C field 3");
      check(b_row[5*BW +: BW] == BW'(bm[n][5*BW/DW] >> ((5*BW) % DW)), "B field 5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
