// tb_pe: one processing element with its four subpopulation memories and a
// random generator, on a random spectrum-allocation instance of N users and
// M channels. The testbench holds its own copy of the instance and checks,
// independently of the PE:
//   - after INIT every slot of all four memories holds a feasible solution
//     (eq. 1 and eq. 2) whose stored fitness is its reward sum (eq. 3);
//   - during RUN no slot's fitness ever falls (replace only if better), and
//     after STOP every slot is again feasible with a correct fitness;
//   - the best solution the PE reports is feasible, has the reported
//     fitness, and equals the best fitness in its memories;
//   - each generated solution takes 3N+20..3N+21 cycles, plus N when it
//     replaces a memory solution (no lock collisions with a single PE);
//   - the configuration registers read back and the counters agree.
module tb_pe;
  import cgap_pkg::*;
  localparam int N = 5, M = 6, SOLS = 3;
  logic clk = 0, rst_n = 0;
  logic [RW-1:0] rnd;
  spmem_req_t mem_req [4];
  spmem_rsp_t mem_rsp [4];
  logic cmd_valid = 0;
  cmd_op_e cmd_op = OP_NOP;
  logic [15:0] cmd_addr = 0;
  logic [DW-1:0] cmd_data = 0, rsp_data;
  int checks = 0, failures = 0;

  // the instance
  bit          L [NMAX][MMAX];
  bit          C [NMAX][NMAX][MMAX];
  int unsigned B [NMAX][MMAX];

  ca_rng #(.W(RW)) u_rng (.clk, .rst_n, .rnd);
  pe dut (.*);
  for (genvar p = 0; p < 4; p++) begin : g_mem
    spmem_rsp_t unused;
    logic coll;
    spmem u (.clk, .rst_n, .req_a(mem_req[p]), .req_b(SPMEM_REQ_IDLE),
             .rsp_a(mem_rsp[p]), .rsp_b(unused), .collision(coll));
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic cmd(cmd_op_e op, logic [15:0] a, logic [DW-1:0] d,
                     output logic [DW-1:0] r);
    cmd_valid = 1; cmd_op = op; cmd_addr = a; cmd_data = d;
    #1 r = rsp_data;
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  function automatic logic [15:0] cfg(logic [3:0] r);
    return pe_addr(REG_CFG, 6'd0, {4'd0, r});
  endfunction

  // slot contents, read straight from the memory arrays
  function automatic logic [MMAX-1:0] row_of(int p, int s, int n);
    case (p)
      0: return g_mem[0].u.rows[s*NMAX + n];
      1: return g_mem[1].u.rows[s*NMAX + n];
      2: return g_mem[2].u.rows[s*NMAX + n];
      default: return g_mem[3].u.rows[s*NMAX + n];
    endcase
  endfunction
  function automatic logic [FW-1:0] fit_of(int p, int s);
    case (p)
      0: return g_mem[0].u.fit[s];
      1: return g_mem[1].u.fit[s];
      2: return g_mem[2].u.fit[s];
      default: return g_mem[3].u.fit[s];
    endcase
  endfunction

  // feasibility and reward sum of a solution given as rows
  function automatic bit feasible(logic [MMAX-1:0] a [NMAX]);
    for (int n = 0; n < NMAX; n++)
      for (int m = 0; m < MMAX; m++)
        if (a[n][m]) begin
          if (n >= N || m >= M || !L[n][m]) return 0;
          for (int k = 0; k < N; k++) if (k != n && a[k][m] && C[n][k][m]) return 0;
        end
    return 1;
  endfunction
  function automatic int unsigned utility(logic [MMAX-1:0] a [NMAX]);
    int unsigned u = 0;
    for (int n = 0; n < N; n++)
      for (int m = 0; m < M; m++) if (a[n][m]) u += B[n][m];
    return u;
  endfunction

  logic [FW-1:0] last_fit [4][SOLS];
  int bad_fall = 0;

  task automatic check_memories(string phase, output int unsigned best);
    logic [MMAX-1:0] a [NMAX];
    best = 0;
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < SOLS; s++) begin
        for (int n = 0; n < NMAX; n++) a[n] = row_of(p, s, n);
        check(feasible(a), $sformatf("%s: side %0d slot %0d feasible", phase, p, s));
        check(utility(a) == fit_of(p, s), $sformatf("%s: side %0d slot %0d fitness", phase, p, s));
        if (fit_of(p, s) > best) best = fit_of(p, s);
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // generation timing monitor
  int last_gen_cycle = -1, cyc = 0, gens_seen = 0, repl_seen = 0, bad_time = 0;
  logic [DW-1:0] prev_repls = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.state == dut.S_DONE && dut.mode_run) begin
      int d;
      bit wrote;
      d = cyc - last_gen_cycle;
      wrote = dut.repls != prev_repls;
      prev_repls = dut.repls;
      if (last_gen_cycle >= 0) begin
        gens_seen++;
        if (wrote) repl_seen++;
        if (!(d == 3*N + 20 + (wrote ? N : 0) || d == 3*N + 21 + (wrote ? N : 0))) begin
          bad_time++;
          $display("generation took %0d cycles (replaced %0d)", d, wrote);
        end
      end
      last_gen_cycle = cyc;
    end
  end

  // replace-if-better: no slot's fitness may ever fall during RUN
  bit watch_fall = 0;
  always @(posedge clk) if (watch_fall) begin
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < SOLS; s++) begin
        if (fit_of(p, s) < last_fit[p][s]) bad_fall++;
        last_fit[p][s] = fit_of(p, s);
      end
  end

  initial begin
    logic [DW-1:0] r;
    int unsigned best_mem;
    logic [MMAX-1:0] a [NMAX];
    // random instance: symmetric conflicts, no self-conflict
    for (int n = 0; n < NMAX; n++)
      for (int m = 0; m < MMAX; m++) begin
        L[n][m] = (n < N && m < M) ? ($urandom_range(0, 9) < 7) : 0;
        B[n][m] = (n < N && m < M) ? $urandom_range(1, 255) : 0;
        for (int k = 0; k < NMAX; k++) C[n][k][m] = 0;
      end
    for (int n = 0; n < N; n++)
      for (int k = n + 1; k < N; k++)
        for (int m = 0; m < M; m++)
          if ($urandom_range(0, 9) < 4) begin C[n][k][m] = 1; C[k][n][m] = 1; end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    cmd(OP_WR, cfg(R_NUSERS), N, r);
    cmd(OP_WR, cfg(R_NCHAN), M, r);
    cmd(OP_WR, cfg(R_NSOLS), SOLS, r);
    cmd(OP_RD, cfg(R_NUSERS), 0, r); check(r == N, "N reads back");
    cmd(OP_RD, cfg(R_NCHAN), 0, r);  check(r == M, "M reads back");
    cmd(OP_RD, cfg(R_NSOLS), 0, r);  check(r == SOLS, "solutions per memory read back");
    for (int n = 0; n < N; n++) begin
      logic [DW-1:0] w;
      for (int m = 0; m < MMAX; m++) w[m] = L[n][m];
      cmd(OP_WR, pe_addr(REG_L, 6'(n), 0), w, r);
      for (int m = 0; m < MMAX; m++) begin
        for (int k = 0; k < NMAX; k++) w[k] = C[n][k][m];
        cmd(OP_WR, pe_addr(REG_C, 6'(n), 8'(m)), w, r);
      end
      for (int q = 0; q < MMAX / 4; q++) begin
        w = {8'(B[n][4*q+3]), 8'(B[n][4*q+2]), 8'(B[n][4*q+1]), 8'(B[n][4*q])};
        cmd(OP_WR, pe_addr(REG_B, 6'(n), 8'(q)), w, r);
      end
    end

    // INIT: fill the four memories
    cmd(OP_WR, cfg(R_CTRL), CTRL_INIT, r);
    cmd(OP_RD, cfg(R_STATUS), 0, r); check(r[0], "busy during INIT");
    do cmd(OP_RD, cfg(R_STATUS), 0, r); while (r[0]);
    check_memories("init", best_mem);
    cmd(OP_RD, cfg(R_BEST), 0, r);
    check(r == best_mem, "best after INIT is the best stored solution");
    cmd(OP_RD, cfg(R_GENS), 0, r); check(r == 0, "no generations counted in INIT");

    // RUN for a while
    for (int p = 0; p < 4; p++) for (int s = 0; s < SOLS; s++) last_fit[p][s] = fit_of(p, s);
    watch_fall = 1;
    cmd(OP_WR, cfg(R_CTRL), CTRL_RUN, r);
    repeat (20000) @(posedge clk);
    #1 cmd(OP_RD, cfg(R_STATUS), 0, r); check(r[0] && r[1], "running");
    cmd(OP_WR, cfg(R_CTRL), CTRL_STOP, r);
    do cmd(OP_RD, cfg(R_STATUS), 0, r); while (r[0]);
    watch_fall = 0;
    check(bad_fall == 0, "no slot fitness ever fell");
    check_memories("run", best_mem);
    cmd(OP_RD, cfg(R_BEST), 0, r);
    check(r == best_mem, "reported best equals best stored fitness");
    for (int n = 0; n < NMAX; n++) begin
      logic [DW-1:0] q;
      cmd(OP_RD, pe_addr(REG_L, 6'(n), 0), 0, q);
      a[n] = MMAX'(q);
    end
    check(feasible(a), "best solution feasible");
    check(utility(a) == best_mem, "best solution has the reported fitness");
    cmd(OP_RD, cfg(R_GENS), 0, r);
    check(r == DW'(gens_seen + 1), "generation counter");
    check(r > 50, "enough generations");
    cmd(OP_RD, cfg(R_REPL), 0, r);
    check(r > 0 && r < gens_seen + 1, "some, not all, children replace a solution");
    cmd(OP_RD, cfg(R_COLL), 0, r);  check(r == 0, "no lock waits with one PE");
    check(bad_time == 0, "cycles per generation");
    $display("generations %0d, replaced %0d, best %0d", gens_seen + 1, repl_seen, best_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
