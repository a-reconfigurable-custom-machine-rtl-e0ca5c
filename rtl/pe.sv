// pe: processing element of the cellular GA array, built for the spectrum
// allocation (SA) problem.
//
// A PE evolves the solutions held in its four neighbouring subpopulation
// memories (port 0 north, 1 east, 2 south, 3 west). Each pass through its
// loop produces one new solution:
//   1. selection   - two binary tournaments; each reads the fitness of two
//                    random solutions of the neighbourhood and keeps the
//                    better one, giving parents p1 and p2;
//   2. crossover   - uniform: p1 is copied into the child buffer, then every
//                    bit of p2 replaces the child's bit where a random mask
//                    bit is 0;
//   3. mutation    - every bit flips with probability 2^-MUT_K (the AND of
//                    MUT_K random bits), 3.1% by default;
//   4. repair and  - row n (user n) is masked by L row n (eq. 1: only free
//      evaluation    channels), then loses every channel already held by an
//                    earlier user k < n that interferes with n on it (eq. 2),
//                    and its rewards are summed into the fitness (eq. 3);
//   5. replacement - a random neighbourhood solution is read and overwritten
//                    by the child only if the child's fitness is higher.
// Every spMEM access holds that solution's lock (spmem_arbiter); a PE holds
// at most one lock at a time, so the array cannot deadlock. The PE also keeps
// a copy of the best solution it has produced.
//
// Commands arrive from the command ring (comm_node): writes load the
// instance size (N users, M channels, solutions used per spMEM) and the
// problem tables, and CTRL starts INIT (fill all four neighbour memories with
// random feasible solutions), RUN (evolve until STOP) or STOP (halt after the
// current solution). Reads return status, counters and best-solution rows on
// rsp_data in the same cycle.
//
// Timing without lock collisions, for N users: 3N+21 cycles per generated
// solution when it is not accepted, 4N+21 when it replaces a worse one.
//
// The document gives the operators (Table 2), the constraints and the
// objective; it specifies the PE in C++ for high-level synthesis and gives no
// insides. This state machine, its one-row-per-cycle repair (which keeps the
// channels of lower-numbered users first), the random-number use and the
// command map are this design's own.
module pe
  import cgap_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] rnd,
  // the four neighbour spMEMs: 0 north, 1 east, 2 south, 3 west
  output spmem_req_t    mem_req [4],
  input  spmem_rsp_t    mem_rsp [4],
  // command port from the ring
  input  logic          cmd_valid,
  input  cmd_op_e       cmd_op,
  input  logic [15:0]   cmd_addr,
  input  logic [DW-1:0] cmd_data,
  output logic [DW-1:0] rsp_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT_GEN, S_TLOCK, S_TFIT, S_RLOCK, S_RROWS, S_EVAL0, S_EVAL,
    S_PLOCK, S_PFIT, S_WLOCK, S_WROWS, S_DONE
  } state_e;

  typedef struct packed {
    logic [1:0]    port;
    logic [SW-1:0] slot;
  } loc_t;

  state_e          state;
  logic            mode_run;          // 0: INIT fill, 1: evolution
  logic            stop_req;
  logic            copy_phase;        // S_RROWS: 1 copy p1, 0 merge p2
  logic            t_second;          // second candidate of a tournament
  logic            t_idx;             // tournament 0 -> p1, 1 -> p2

  logic [NIW:0]    cfg_n;             // users of the instance, 1..NMAX
  logic [MIW-1:0]  cfg_m;             // channels, 1..MMAX
  logic [SW:0]     cfg_sols;          // solutions per spMEM, 1..SOLS_MAX

  logic [MMAX-1:0] child [NMAX];
  logic [FW-1:0]   child_fit, fit_acc;
  logic [MMAX-1:0] best  [NMAX];
  logic [FW-1:0]   best_fit;
  logic [FW-1:0]   cand_fit;
  loc_t            acc, cand, p1, p2;
  logic [NIW:0]    rd_i, cap_i, ev_i;
  logic [1:0]      init_port;
  logic [SW:0]     init_slot;
  logic [DW-1:0]   gens, colls, repls;
  logic            waited;            // lock asked for more than one cycle

  // ---------------- helpers ------------------------------------------------
  function automatic loc_t pick(logic [RW-1:0] r, logic [SW:0] nsols);
    loc_t l;
    l.port = r[1:0];
    l.slot = SW'(r[15:8] % 8'(nsols));
    return l;
  endfunction

  function automatic logic [FW-1:0] reward(logic [MMAX-1:0] row,
                                           logic [MMAX*BW-1:0] b);
    logic [FW-1:0] s;
    s = '0;
    for (int m = 0; m < MMAX; m++)
      if (row[m]) s += FW'(b[m*BW +: BW]);
    return s;
  endfunction

  // ---------------- problem tables -------------------------------------------
  logic                 pm_we;
  logic [NIW-1:0]       pm_rd_n;
  logic [MMAX-1:0]      l_row;
  logic [MMAX*NMAX-1:0] c_row;
  logic [MMAX*BW-1:0]   b_row;

  assign pm_we   = cmd_valid && cmd_op == OP_WR && cmd_addr[15:14] != REG_CFG;
  assign pm_rd_n = (state == S_EVAL) ? NIW'(ev_i + 1'b1) : '0;

  problem_mem u_pm (
    .clk, .rst_n,
    .wr_en(pm_we), .wr_table(cmd_addr[15:14]), .wr_n(cmd_addr[8 +: NIW]),
    .wr_word(cmd_addr[7:0]), .wr_data(cmd_data),
    .rd_n(pm_rd_n), .l_row, .c_row, .b_row
  );

  // ---------------- one row of repair and evaluation -------------------------
  logic [MMAX-1:0] chan_mask, mut_mask, cand_row, forbid, new_row;
  logic [NMAX-1:0] done_mask;
  logic [FW-1:0]   row_reward;

  always_comb begin
    for (int m = 0; m < MMAX; m++) chan_mask[m] = (m < int'(cfg_m));
    for (int k = 0; k < NMAX; k++) done_mask[k] = (k < int'(ev_i));
    mut_mask = '1;
    for (int j = 0; j < MUT_K; j++) mut_mask &= rnd[j*MMAX +: MMAX];
    cand_row = child[ev_i[NIW-1:0]];
    if (mode_run) cand_row ^= mut_mask;
    cand_row &= l_row & chan_mask;
    for (int m = 0; m < MMAX; m++) begin
      logic [NMAX-1:0] holders;        // earlier users holding channel m
      for (int k = 0; k < NMAX; k++) holders[k] = child[k][m];
      forbid[m] = |(c_row[m*NMAX +: NMAX] & holders & done_mask);
    end
    new_row    = cand_row & ~forbid;
    row_reward = reward(new_row, b_row);
  end

  // ---------------- spMEM port drive -----------------------------------------
  logic            acc_lock, acc_rd, acc_we_row, acc_we_fit, acc_gnt;
  logic [NIW-1:0]  acc_row;
  spmem_rsp_t      rsp;

  assign rsp     = mem_rsp[acc.port];
  assign acc_gnt = rsp.gnt;

  always_comb begin
    acc_lock   = 1'b0;
    acc_rd     = 1'b0;
    acc_we_row = 1'b0;
    acc_we_fit = 1'b0;
    acc_row    = '0;
    unique case (state)
      // ask for the lock and for row 0 / the fitness; the spMEM performs
      // the read in the first cycle the lock is granted
      S_TLOCK, S_PLOCK, S_RLOCK: begin
        acc_lock = 1'b1;
        acc_rd   = 1'b1;
      end
      S_RROWS: begin
        acc_lock = 1'b1;
        acc_rd   = (rd_i < cfg_n);
        acc_row  = rd_i[NIW-1:0];
      end
      S_PFIT:  acc_lock = 1'b1;             // kept in case the child wins
      S_WLOCK: acc_lock = 1'b1;
      S_WROWS: begin
        acc_lock   = 1'b1;
        acc_we_row = 1'b1;
        acc_row    = rd_i[NIW-1:0];
        acc_we_fit = (rd_i == cfg_n - 1'b1);
      end
      default: ;
    endcase
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      mem_req[p] = SPMEM_REQ_IDLE;
      if (acc.port == 2'(p)) begin
        mem_req[p].lock   = acc_lock;
        mem_req[p].slot   = acc.slot;
        mem_req[p].rd     = acc_rd;
        mem_req[p].we_row = acc_we_row;
        mem_req[p].we_fit = acc_we_fit;
        mem_req[p].row    = acc_row;
        mem_req[p].wrow   = child[acc_row];
        mem_req[p].wfit   = child_fit;
      end
    end
  end

  // ---------------- command register reads -----------------------------------
  always_comb begin
    rsp_data = '0;
    if (cmd_addr[15:14] == REG_L) begin
      rsp_data = DW'(best[cmd_addr[8 +: NIW]]);
    end else if (cmd_addr[15:14] == REG_CFG) begin
      unique case (cmd_addr[3:0])
        R_NUSERS: rsp_data = DW'(cfg_n);
        R_NCHAN:  rsp_data = DW'(cfg_m);
        R_NSOLS:  rsp_data = DW'(cfg_sols);
        R_STATUS: rsp_data = DW'({stop_req, mode_run, state != S_IDLE});
        R_GENS:   rsp_data = gens;
        R_BEST:   rsp_data = DW'(best_fit);
        R_COLL:   rsp_data = colls;
        R_REPL:   rsp_data = repls;
        default:  rsp_data = '0;
      endcase
    end
  end

  logic cfg_wr, ctrl_wr;
  assign cfg_wr  = cmd_valid && cmd_op == OP_WR && cmd_addr[15:14] == REG_CFG;
  assign ctrl_wr = cfg_wr && cmd_addr[3:0] == R_CTRL;

  // ---------------- main state machine ---------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_run   <= 1'b0;
      stop_req   <= 1'b0;
      copy_phase <= 1'b0;
      t_second   <= 1'b0;
      t_idx      <= 1'b0;
      cfg_n      <= (NIW+1)'(NMAX);
      cfg_m      <= MIW'(MMAX);
      cfg_sols   <= (SW+1)'(SOLS_MAX);
      for (int i = 0; i < NMAX; i++) begin
        child[i] <= '0;
        best[i]  <= '0;
      end
      child_fit  <= '0;
      fit_acc    <= '0;
      best_fit   <= '0;
      cand_fit   <= '0;
      acc        <= '0;
      cand       <= '0;
      p1         <= '0;
      p2         <= '0;
      rd_i       <= '0;
      cap_i      <= '0;
      ev_i       <= '0;
      init_port  <= '0;
      init_slot  <= '0;
      gens       <= '0;
      colls      <= '0;
      repls      <= '0;
      waited     <= 1'b0;
    end else begin
      // configuration registers
      if (cfg_wr) begin
        unique case (cmd_addr[3:0])
          R_NUSERS: cfg_n    <= (NIW+1)'(cmd_data);
          R_NCHAN:  cfg_m    <= MIW'(cmd_data);
          R_NSOLS:  cfg_sols <= (SW+1)'(cmd_data);
          default: ;
        endcase
      end
      if (ctrl_wr && cmd_data == CTRL_STOP && state != S_IDLE) stop_req <= 1'b1;

      // lock waiting: count every cycle beyond the first one
      if (acc_lock && !acc_gnt &&
          (state == S_TLOCK || state == S_RLOCK || state == S_PLOCK || state == S_WLOCK)) begin
        if (waited) colls <= colls + 1'b1;
        waited <= 1'b1;
      end else begin
        waited <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          stop_req <= 1'b0;
          if (ctrl_wr && cmd_data == CTRL_INIT) begin
            mode_run  <= 1'b0;
            init_port <= '0;
            init_slot <= '0;
            rd_i      <= '0;
            gens      <= '0;
            colls     <= '0;
            repls     <= '0;
            best_fit  <= '0;
            state     <= S_INIT_GEN;
          end else if (ctrl_wr && cmd_data == CTRL_RUN) begin
            mode_run <= 1'b1;
            t_idx    <= 1'b0;
            t_second <= 1'b0;
            acc      <= pick(rnd, cfg_sols);
            state    <= S_TLOCK;
          end
        end

        // random rows for an initial solution
        S_INIT_GEN: begin
          child[rd_i[NIW-1:0]] <= rnd[MMAX-1:0];
          rd_i <= rd_i + 1'b1;
          if (rd_i == cfg_n - 1'b1) state <= S_EVAL0;
        end

        // tournament: read the fitness of candidate `acc`
        S_TLOCK: if (acc_gnt) state <= S_TFIT;
        S_TFIT: begin
          if (!t_second) begin
            cand     <= acc;
            cand_fit <= rsp.rfit;
            t_second <= 1'b1;
            acc      <= pick(rnd, cfg_sols);
            state    <= S_TLOCK;
          end else begin
            loc_t win;
            win = (rsp.rfit > cand_fit) ? acc : cand;
            t_second <= 1'b0;
            if (!t_idx) begin
              p1    <= win;
              t_idx <= 1'b1;
              acc   <= pick(rnd, cfg_sols);
              state <= S_TLOCK;
            end else begin
              p2         <= win;
              t_idx      <= 1'b0;
              acc        <= p1;
              copy_phase <= 1'b1;
              state      <= S_RLOCK;
            end
          end
        end

        // stream the rows of a parent (copy p1, then merge p2)
        S_RLOCK: if (acc_gnt) begin
          rd_i  <= 1;
          cap_i <= '0;
          state <= S_RROWS;
        end
        S_RROWS: begin
          if (rd_i < cfg_n) rd_i <= rd_i + 1'b1;
          if (copy_phase)
            child[cap_i[NIW-1:0]] <= rsp.rrow;
          else
            child[cap_i[NIW-1:0]] <= (child[cap_i[NIW-1:0]] & rnd[MMAX-1:0]) |
                                     (rsp.rrow & ~rnd[MMAX-1:0]);
          cap_i <= cap_i + 1'b1;
          if (cap_i == cfg_n - 1'b1) begin
            if (copy_phase) begin
              copy_phase <= 1'b0;
              acc        <= p2;
              state      <= S_RLOCK;
            end else begin
              state <= S_EVAL0;
            end
          end
        end

        // mutation, repair and fitness, one user per cycle
        S_EVAL0: begin
          ev_i    <= '0;
          fit_acc <= '0;
          state   <= S_EVAL;
        end
        S_EVAL: begin
          child[ev_i[NIW-1:0]] <= new_row;
          fit_acc <= fit_acc + row_reward;
          ev_i    <= ev_i + 1'b1;
          if (ev_i == cfg_n - 1'b1) begin
            child_fit <= fit_acc + row_reward;
            rd_i      <= '0;
            if (mode_run) begin
              acc   <= pick(rnd, cfg_sols);
              state <= S_PLOCK;
            end else begin
              acc   <= '{port: init_port, slot: init_slot[SW-1:0]};
              state <= S_WLOCK;
            end
          end
        end

        // replacement: write the child only over a worse solution
        S_PLOCK: if (acc_gnt) state <= S_PFIT;
        S_PFIT: begin
          if (child_fit > rsp.rfit) begin
            repls <= repls + 1'b1;
            state <= S_WROWS;
          end else begin
            state <= S_DONE;
          end
        end
        S_WLOCK: if (acc_gnt) state <= S_WROWS;
        S_WROWS: begin
          rd_i <= rd_i + 1'b1;
          if (rd_i == cfg_n - 1'b1) state <= S_DONE;
        end

        S_DONE: begin
          rd_i <= '0;
          if (child_fit > best_fit) begin
            best_fit <= child_fit;
            for (int i = 0; i < NMAX; i++) best[i] <= child[i];
          end
          if (mode_run) begin
            gens <= gens + 1'b1;
            if (stop_req || (ctrl_wr && cmd_data == CTRL_STOP)) begin
              state <= S_IDLE;
            end else begin
              acc   <= pick(rnd, cfg_sols);
              state <= S_TLOCK;
            end
          end else begin
            // next slot of the initial fill: all slots of all four sides
            if (init_slot == cfg_sols - 1'b1) begin
              init_slot <= '0;
              init_port <= init_port + 1'b1;
              if (init_port == 2'd3 || stop_req) state <= S_IDLE;
              else                               state <= S_INIT_GEN;
            end else begin
              init_slot <= init_slot + 1'b1;
              state     <= S_INIT_GEN;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
