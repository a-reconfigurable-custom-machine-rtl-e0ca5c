// Shared body of the end-to-end testbenches of cgap_top. The including
// module defines ROWS, COLS (the array it instantiates), NU, NC (instance
// size), SOLS (solutions per spMEM), TARGET (generations to run) and the
// instance `dut`. The body drives the host port only, like software on the
// host processor would:
//   1. loads a random instance into every PE by broadcast packets;
//   2. runs START to completion (INIT, RUN, global stop at TARGET, STOP);
//   3. checks every solution in every spMEM for feasibility (eq. 1, 2) and
//      for a stored fitness equal to its reward sum (eq. 3);
//   4. reads every PE's counters and best fitness, checks the controller's
//      best PE and fitness, and reads back the best solution row by row;
//   5. runs again with ABORT.
// Mechanisms counted, each must happen at least once: INIT, RUN, global
// stop, ABORT, broadcast, addressed read, lock refusal, lock wait inside a
// PE, replacement accepted, replacement refused, best-solution retrieval.

  localparam int NPE = ROWS * COLS;
  localparam int NH  = ROWS * (COLS + 1);
  localparam int NV  = (ROWS + 1) * COLS;

  logic clk = 0, rst_n = 0;
  logic hs_wr = 0;
  logic [7:0] hs_addr = 0;
  logic [DW-1:0] hs_wdata = 0, hs_rdata, lock_refusals;
  int checks = 0, failures = 0;
  longint cyc = 0;

  bit          L [NMAX][MMAX];
  bit          C [NMAX][NMAX][MMAX];
  int unsigned B [NMAX][MMAX];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // loop bounds held in variables, so that the simulator keeps these checks
  // as loops instead of unrolling them
  int lim_n = NMAX, lim_m = MMAX;

  function automatic bit feasible(logic [MMAX-1:0] a [NMAX]);
    for (int n = 0; n < lim_n; n++)
      for (int m = 0; m < lim_m; m++)
        if (a[n][m]) begin
          if (n >= NU || m >= NC || !L[n][m]) return 0;
          for (int k = 0; k < lim_n; k++) if (k != n && a[k][m] && C[n][k][m]) return 0;
        end
    return 1;
  endfunction
  function automatic int unsigned utility(logic [MMAX-1:0] a [NMAX]);
    int unsigned u = 0;
    for (int n = 0; n < lim_n; n++)
      for (int m = 0; m < lim_m; m++) if (a[n][m] && n < NU && m < NC) u += B[n][m];
    return u;
  endfunction

  // ---- host access ---------------------------------------------------------
  task automatic hw(int a, logic [DW-1:0] d);
    hs_wr = 1; hs_addr = 8'(a * 4); hs_wdata = d;
    @(posedge clk); #1;
    hs_wr = 0;
  endtask
  task automatic hr(int a, output logic [DW-1:0] d);
    hs_addr = 8'(a * 4);
    #1 d = hs_rdata;
  endtask
  task automatic wait_idle();
    logic [DW-1:0] s;
    do begin @(posedge clk); #1; hr(7, s); end while (s[0]);
  endtask
  task automatic host_cmd(int dest, cmd_op_e op, logic [15:0] a, logic [DW-1:0] d,
                          output logic [DW-1:0] rd);
    hw(1, DW'(dest)); hw(2, DW'(a)); hw(3, d); hw(0, DW'(op));
    wait_idle();
    hr(4, rd);
  endtask
  function automatic logic [15:0] cfg(logic [3:0] r);
    return pe_addr(REG_CFG, 6'd0, {4'd0, r});
  endfunction

  // ---- memory sweep: every slot of every spMEM ------------------------------
  event sweep;
  int swept = 0, infeasible = 0, wrong_fit = 0;
  logic [MMAX-1:0] snap    [NH+NV][SOLS_MAX][NMAX];
  logic [FW-1:0]   snap_fit[NH+NV][SOLS_MAX];
  for (genvar r = 0; r < ROWS; r++) begin : g_hchk
    for (genvar c = 0; c <= COLS; c++) begin : g_c
      always @(sweep)
        for (int s = 0; s < SOLS_MAX; s++) begin
          snap_fit[r*(COLS+1) + c][s] = dut.g_hrow[r].g_hcol[c].u_mem.fit[s];
          for (int n = 0; n < NMAX; n++)
            snap[r*(COLS+1) + c][s][n] = dut.g_hrow[r].g_hcol[c].u_mem.rows[s*NMAX + n];
        end
    end
  end
  for (genvar r = 0; r <= ROWS; r++) begin : g_vchk
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(sweep)
        for (int s = 0; s < SOLS_MAX; s++) begin
          snap_fit[NH + r*COLS + c][s] = dut.g_vrow[r].g_vcol[c].u_mem.fit[s];
          for (int n = 0; n < NMAX; n++)
            snap[NH + r*COLS + c][s][n] = dut.g_vrow[r].g_vcol[c].u_mem.rows[s*NMAX + n];
        end
    end
  end

  task automatic check_snapshot();
    logic [MMAX-1:0] a [NMAX];
    for (int i = 0; i < NH + NV; i++)
      for (int s = 0; s < SOLS; s++) begin
        a = snap[i][s];
        swept++;
        if (!feasible(a)) infeasible++;
        if (utility(a) != snap_fit[i][s]) wrong_fit++;
      end
  endtask

  // ---- the run ---------------------------------------------------------------
  int n_init = 0, n_run = 0, n_gstop = 0, n_abort = 0, n_bcast = 0, n_read = 0,
      n_refuse = 0, n_wait = 0, n_repl = 0, n_reject = 0, n_best = 0;

  initial begin
    logic [DW-1:0] r, s, total, best_fit, best_pe, pe_best, gsum, rsum, csum;
    logic [MMAX-1:0] a [NMAX];
    longint t0, t_run;

    for (int n = 0; n < NMAX; n++)
      for (int m = 0; m < MMAX; m++) begin
        L[n][m] = (n < NU && m < NC) ? ($urandom_range(0, 9) < 7) : 0;
        B[n][m] = (n < NU && m < NC) ? $urandom_range(1, 255) : 0;
        for (int k = 0; k < NMAX; k++) C[n][k][m] = 0;
      end
    for (int n = 0; n < NU; n++)
      for (int k = n + 1; k < NU; k++)
        for (int m = 0; m < NC; m++)
          if ($urandom_range(0, 9) < 3) begin C[n][k][m] = 1; C[k][n][m] = 1; end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1. set-up by broadcast
    host_cmd(DEST_ALL, OP_WR, cfg(R_NUSERS), NU, r);
    host_cmd(DEST_ALL, OP_WR, cfg(R_NCHAN), NC, r);
    host_cmd(DEST_ALL, OP_WR, cfg(R_NSOLS), SOLS, r);
    n_bcast += 3;
    for (int n = 0; n < NU; n++) begin
      logic [DW-1:0] w;
      for (int m = 0; m < MMAX; m++) w[m] = L[n][m];
      host_cmd(DEST_ALL, OP_WR, pe_addr(REG_L, 6'(n), 0), w, r);
      for (int m = 0; m < NC; m++) begin
        for (int k = 0; k < NMAX; k++) w[k] = C[n][k][m];
        host_cmd(DEST_ALL, OP_WR, pe_addr(REG_C, 6'(n), 8'(m)), w, r);
      end
      for (int q = 0; q < (NC + 3) / 4; q++) begin
        w = {8'(B[n][4*q+3]), 8'(B[n][4*q+2]), 8'(B[n][4*q+1]), 8'(B[n][4*q])};
        host_cmd(DEST_ALL, OP_WR, pe_addr(REG_B, 6'(n), 8'(q)), w, r);
      end
    end
    for (int i = 0; i < NPE; i++) begin
      host_cmd(i, OP_RD, cfg(R_NCHAN), 0, r);
      n_read++;
      check(r == NC, "every PE got the instance size");
    end
    $display("set-up done at cycle %0d", cyc);

    // 2. START to completion
    hw(5, TARGET);
    t0 = cyc;
    hw(6, 1);
    n_init++;
    do begin @(posedge clk); #1; hr(7, s); end while (s[11:8] != 4'd5 && s[0]); // P_POLL_GEN
    n_run++;
    t_run = cyc;
    wait_idle();
    hr(7, s); check(s[1], "run done");
    hr(10, total);
    check(total >= TARGET, "global stop after the target");
    n_gstop++;
    $display("run: %0d solutions generated in %0d cycles (%0d from RUN)",
             total, cyc - t0, cyc - t_run);

    // 3. every stored solution
    ->sweep;
    #1;
    check_snapshot();
    check(swept == (NH + NV) * SOLS, "swept every slot");
    check(infeasible == 0, "all stored solutions feasible");
    check(wrong_fit == 0, "all stored fitness values correct");

    // 4. per-PE counters, best solution
    gsum = 0; rsum = 0; csum = 0; pe_best = 0;
    for (int i = 0; i < NPE; i++) begin
      logic [DW-1:0] g, rp, cl, b;
      host_cmd(i, OP_RD, cfg(R_GENS), 0, g);
      host_cmd(i, OP_RD, cfg(R_REPL), 0, rp);
      host_cmd(i, OP_RD, cfg(R_COLL), 0, cl);
      host_cmd(i, OP_RD, cfg(R_BEST), 0, b);
      n_read += 4;
      check(g > 0, "every PE generated solutions");
      gsum += g; rsum += rp; csum += cl;
      if (b > pe_best) pe_best = b;
    end
    check(gsum == total, "TOTAL_GEN is the sum of the PEs' counters");
    n_repl = rsum; n_reject = gsum - rsum; n_wait = csum; n_refuse = lock_refusals;
    $display("replacements %0d of %0d, lock waits %0d cycles, refusals %0d",
             rsum, gsum, csum, lock_refusals);
    // throughput: cycles lost waiting for locks, as a share of the PEs' time
    $display("lock-wait share of PE time: %0d ppm",
             longint'(csum) * 1000000 / (longint'(cyc - t_run) * NPE));
    check(longint'(csum) * 20 < longint'(cyc - t_run) * NPE, "lock waits below 5% of PE time");
    hr(8, best_fit); hr(9, best_pe);
    check(best_fit == pe_best, "controller found the best PE's fitness");
    for (int n = 0; n < NMAX; n++) begin
      host_cmd(best_pe, OP_RD, pe_addr(REG_L, 6'(n), 0), 0, r);
      a[n] = MMAX'(r);
    end
    n_best++;
    check(feasible(a), "best solution feasible");
    check(utility(a) == best_fit, "best solution has the reported fitness");
    $display("best fitness %0d on PE %0d", best_fit, best_pe);

    // 5. ABORT
    hw(5, 32'hFFFF_FFF0);
    hw(6, 1);
    repeat (3000) @(posedge clk);
    #1 hr(7, s); check(s[0], "running before ABORT");
    hw(11, 1);
    n_abort++;
    wait_idle();
    hr(7, s); check(s[1], "done after ABORT");
    for (int i = 0; i < NPE; i++) begin
      host_cmd(i, OP_RD, cfg(R_STATUS), 0, r);
      check(!r[0], "PE idle after ABORT");
    end

    check(n_init > 0, "INIT happened");       check(n_run > 0, "RUN happened");
    check(n_gstop > 0, "global stop happened"); check(n_abort > 0, "ABORT happened");
    check(n_bcast > 0, "broadcast happened");  check(n_read > 0, "addressed read happened");
    check(n_refuse > 0, "lock refusal happened");
    check(n_wait > 0, "PE lock wait happened");
    check(n_repl > 0, "replacement accepted happened");
    check(n_reject > 0, "replacement refused happened");
    check(n_best > 0, "best retrieval happened");
    $display("mechanisms: init %0d run %0d gstop %0d abort %0d bcast %0d read %0d refuse %0d wait %0d repl %0d reject %0d best %0d",
             n_init, n_run, n_gstop, n_abort, n_bcast, n_read, n_refuse, n_wait, n_repl, n_reject, n_best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
