// spmem: subpopulation memory shared by two neighbouring PEs.
//
// Holds SOLS_MAX solutions, each NMAX rows of MMAX bits (the channel
// assignment of each user) and a fitness word. It is a true dual-port
// memory, as the block RAMs of an FPGA are: port A serves the PE on the
// west/north side, port B the PE on the east/south side. Every access goes
// through spmem_arbiter: a port may read or write only the slot whose lock it
// holds (rsp.gnt high), so one PE never sees a solution the other PE is half
// way through rewriting. A read request (rd) is served in the first cycle the
// port's lock is granted; rrow/rfit appear in the cycle after. Writes must
// only be issued while the lock is held. Writes take effect at the clock edge. Rows and fitness are
// cleared at reset so that nothing reads undefined data. The storage
// organisation (row per user, separate fitness word) is this design's choice.
module spmem
  import cgap_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  spmem_req_t req_a,
  input  spmem_req_t req_b,
  output spmem_rsp_t rsp_a,
  output spmem_rsp_t rsp_b,
  output logic       collision
);

  localparam int DEPTH = SOLS_MAX * NMAX;

  logic [MMAX-1:0] rows [DEPTH];
  logic [FW-1:0]   fit  [SOLS_MAX];
  logic            gnt_a, gnt_b;
  logic [MMAX-1:0] rrow_a, rrow_b;
  logic [FW-1:0]   rfit_a, rfit_b;

  spmem_arbiter #(.SW(SW)) u_arb (
    .clk, .rst_n,
    .req_a(req_a.lock), .slot_a(req_a.slot),
    .req_b(req_b.lock), .slot_b(req_b.slot),
    .gnt_a, .gnt_b, .collision
  );

  function automatic int unsigned row_addr(logic [SW-1:0] s, logic [NIW-1:0] r);
    return int'(s) * NMAX + int'(r);
  endfunction

  // both write ports in one process; the locks keep their slots apart
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) rows[i] <= '0;
      for (int i = 0; i < SOLS_MAX; i++) fit[i] <= '0;
    end else begin
      if (gnt_a && req_a.lock && req_a.we_row) rows[row_addr(req_a.slot, req_a.row)] <= req_a.wrow;
      if (gnt_a && req_a.lock && req_a.we_fit) fit[req_a.slot] <= req_a.wfit;
      if (gnt_b && req_b.lock && req_b.we_row) rows[row_addr(req_b.slot, req_b.row)] <= req_b.wrow;
      if (gnt_b && req_b.lock && req_b.we_fit) fit[req_b.slot] <= req_b.wfit;
    end
  end

  always_ff @(posedge clk) begin
    if (gnt_a && req_a.lock && req_a.rd) begin
      rrow_a <= rows[row_addr(req_a.slot, req_a.row)];
      rfit_a <= fit[req_a.slot];
    end
    if (gnt_b && req_b.lock && req_b.rd) begin
      rrow_b <= rows[row_addr(req_b.slot, req_b.row)];
      rfit_b <= fit[req_b.slot];
    end
  end

  assign rsp_a = '{gnt: gnt_a, rrow: rrow_a, rfit: rfit_a};
  assign rsp_b = '{gnt: gnt_b, rrow: rrow_b, rfit: rfit_b};

  a_no_write_without_lock: assert property (@(posedge clk) disable iff (!rst_n)
      (req_a.we_row || req_a.we_fit) |-> (req_a.lock && gnt_a))
    else $error("spmem: port A accessed slot %0d without its lock", req_a.slot);
  b_no_write_without_lock: assert property (@(posedge clk) disable iff (!rst_n)
      (req_b.we_row || req_b.we_fit) |-> (req_b.lock && gnt_b))
    else $error("spmem: port B accessed slot %0d without its lock", req_b.slot);

endmodule
