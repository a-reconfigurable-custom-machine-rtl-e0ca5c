// tb_spmem: subpopulation memory with its locks. Each port in turn locks a
// random slot, writes random rows and a fitness, and the other port reads
// them back; the expected contents come from a plain array kept by the
// testbench. Also checked: one-cycle read latency, a read request waits for
// the lock (no data while another port holds the slot), reset clears all.
module tb_spmem;
  import cgap_pkg::*;
  logic clk = 0, rst_n = 0;
  spmem_req_t req_a, req_b;
  spmem_rsp_t rsp_a, rsp_b;
  logic collision;
  int checks = 0, failures = 0;
  logic [MMAX-1:0] model_rows [SOLS_MAX][NMAX];
  logic [FW-1:0]   model_fit  [SOLS_MAX];

  spmem dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lock `slot` on port `p` (0 = A, 1 = B), wait for the grant
  task automatic lock(int p, logic [SW-1:0] slot);
    if (p == 0) begin req_a.lock = 1; req_a.slot = slot; end
    else        begin req_b.lock = 1; req_b.slot = slot; end
    do step(); while (!(p == 0 ? rsp_a.gnt : rsp_b.gnt));
  endtask

  task automatic unlock(int p);
    if (p == 0) req_a = SPMEM_REQ_IDLE; else req_b = SPMEM_REQ_IDLE;
    step();
  endtask

  task automatic write_sol(int p, logic [SW-1:0] slot);
    spmem_req_t r;
    lock(p, slot);
    r = (p == 0) ? req_a : req_b;
    for (int n = 0; n < NMAX; n++) begin
      r.we_row = 1; r.row = NIW'(n); r.wrow = $urandom;
      r.we_fit = (n == NMAX - 1); r.wfit = $urandom;
      model_rows[slot][n] = r.wrow;
      if (r.we_fit) model_fit[slot] = r.wfit;
      if (p == 0) req_a = r; else req_b = r;
      step();
    end
    unlock(p);
  endtask

  task automatic read_check(int p, logic [SW-1:0] slot);
    spmem_req_t r;
    spmem_rsp_t s;
    lock(p, slot);
    r = (p == 0) ? req_a : req_b;
    for (int n = 0; n < NMAX; n++) begin
      r.rd = 1; r.row = NIW'(n);
      if (p == 0) req_a = r; else req_b = r;
      step();
      s = (p == 0) ? rsp_a : rsp_b;
      check(s.rrow == model_rows[slot][n], $sformatf("row %0d of slot %0d", n, slot));
      check(s.rfit == model_fit[slot], "fitness");
    end
    unlock(p);
  endtask

  initial begin
    req_a = SPMEM_REQ_IDLE; req_b = SPMEM_REQ_IDLE;
    for (int s = 0; s < SOLS_MAX; s++) begin
      model_fit[s] = '0;
      for (int n = 0; n < NMAX; n++) model_rows[s][n] = '0;
    end
    repeat (2) step();
    rst_n = 1;
    step();
    read_check(1, 2);                     // cleared by reset
    for (int i = 0; i < 40; i++) begin
      int p;
      logic [SW-1:0] s;
      p = $urandom_range(0, 1);
      s = SW'($urandom);
      write_sol(p, s);
      read_check(1 - p, s);
    end

    // a read request on a slot held by the other port waits for the lock
    lock(0, 1);
    req_b.lock = 1; req_b.slot = 1; req_b.rd = 1; req_b.row = 3;
    for (int i = 0; i < 5; i++) begin
      step();
      check(!rsp_b.gnt && collision, "B waits while A holds the slot");
    end
    // A changes row 3 while B waits
    req_a.we_row = 1; req_a.row = 3; req_a.wrow = 32'h1234_5678;
    model_rows[1][3] = 32'h1234_5678;
    step();
    req_a = SPMEM_REQ_IDLE;               // release
    step();                               // B is granted and reads
    check(rsp_b.gnt, "B granted after release");
    step();
    check(rsp_b.rrow == 32'h1234_5678, "B reads the completed update");
    unlock(1);

    // both ports active on different slots in the same cycles
    lock(0, 0); lock(1, 3);
    req_a.we_row = 1; req_a.row = 5; req_a.wrow = 32'hAAAA_0001;
    req_b.we_row = 1; req_b.row = 5; req_b.wrow = 32'hBBBB_0002;
    step();
    req_a.we_row = 0; req_b.we_row = 0; req_a.rd = 1; req_b.rd = 1;
    step();
    check(rsp_a.rrow == 32'hAAAA_0001 && rsp_b.rrow == 32'hBBBB_0002,
          "simultaneous writes on two slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
