// tb_cgac: the controller on a ring of four comm_node stops whose PEs are
// simple models: INIT keeps a PE busy for a while, RUN makes it count one
// generation every few cycles until STOP, and each reports a fixed best
// fitness. Checked: host pass-through writes and reads (addressed and
// broadcast), the START sequence (INIT, wait, RUN, global stop when the
// generation total reaches TARGET_GEN, STOP, best-PE scan), that no PE runs
// after the sequence ends, and ABORT.
module tb_cgac;
  import cgap_pkg::*;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  logic hs_wr = 0;
  logic [7:0] hs_addr = 0;
  logic [DW-1:0] hs_wdata = 0, hs_rdata;
  ring_pkt_t ring [NPE+1];
  int checks = 0, failures = 0;
  int unsigned best_of [NPE] = '{1500, 2700, 900, 2600};

  cgac #(.NUM_PE(NPE)) dut (.clk, .rst_n, .hs_wr, .hs_addr, .hs_wdata, .hs_rdata,
                            .ring_out(ring[0]), .ring_in(ring[NPE]));

  // PE models
  logic          cv [NPE];
  cmd_op_e       cop [NPE];
  logic [15:0]   cad [NPE];
  logic [DW-1:0] cdt [NPE], rsp [NPE], gens [NPE], scratch [NPE];
  int            busy [NPE];
  bit            running [NPE], stopping [NPE];
  for (genvar i = 0; i < NPE; i++) begin : g
    comm_node #(.ID(8'(i))) u (.clk, .rst_n, .pkt_in(ring[i]), .pkt_out(ring[i+1]),
      .cmd_valid(cv[i]), .cmd_op(cop[i]), .cmd_addr(cad[i]), .cmd_data(cdt[i]),
      .rsp_data(rsp[i]));
    always_comb
      case (cad[i][3:0])
        R_STATUS: rsp[i] = DW'({running[i], busy[i] > 0 || running[i]});
        R_GENS:   rsp[i] = gens[i];
        R_BEST:   rsp[i] = best_of[i];
        R_NUSERS: rsp[i] = scratch[i];
        default:  rsp[i] = '0;
      endcase
    always @(posedge clk) begin
      if (!rst_n) begin
        busy[i] = 0; running[i] = 0; gens[i] = 0; scratch[i] = 0; stopping[i] = 0;
      end else begin
        if (busy[i] > 0) busy[i]--;
        if (running[i] && ($urandom_range(0, 4) == 0)) begin
          gens[i]++;
          if (stopping[i]) begin running[i] = 0; stopping[i] = 0; end
        end
        if (cv[i] && cop[i] == OP_WR && cad[i][3:0] == R_CTRL) begin
          if (cdt[i] == CTRL_INIT) begin busy[i] = 30 + 10 * i; gens[i] = 0; end
          if (cdt[i] == CTRL_RUN)  running[i] = 1;
          if (cdt[i] == CTRL_STOP && running[i]) stopping[i] = 1;
        end
        if (cv[i] && cop[i] == OP_WR && cad[i][3:0] == R_NUSERS) scratch[i] = cdt[i];
      end
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic hw(int a, logic [DW-1:0] d);
    hs_wr = 1; hs_addr = 8'(a * 4); hs_wdata = d;
    @(posedge clk); #1;
    hs_wr = 0;
  endtask
  task automatic hr(int a, output logic [DW-1:0] d);
    hs_addr = 8'(a * 4);
    #1 d = hs_rdata;
  endtask
  task automatic wait_idle(output int cycles);
    logic [DW-1:0] s;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; hr(7, s); end while (s[0] && cycles < 100000);
  endtask
  task automatic host_cmd(int dest, cmd_op_e op, logic [15:0] a, logic [DW-1:0] d,
                          output logic [DW-1:0] rd, output int lat);
    hw(1, DW'(dest)); hw(2, DW'(a)); hw(3, d); hw(0, DW'(op));
    wait_idle(lat);
    hr(4, rd);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] r, s;
    int lat, total;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // pass-through: addressed write then read of each PE, then broadcast
    for (int i = 0; i < NPE; i++) begin
      host_cmd(i, OP_WR, {12'd0, R_NUSERS}, 32'h50 + i, r, lat);
      hr(7, s); check(s[2], "write acknowledged");
      check(lat <= NPE + 3, "packet round trip of one cycle per node");
    end
    for (int i = 0; i < NPE; i++) begin
      host_cmd(i, OP_RD, {12'd0, R_NUSERS}, 0, r, lat);
      check(r == 32'h50 + i, "read returns the addressed PE's register");
    end
    host_cmd(DEST_ALL, OP_WR, {12'd0, R_NUSERS}, 32'h77, r, lat);
    for (int i = 0; i < NPE; i++) check(scratch[i] == 32'h77, "broadcast write");
    host_cmd(9, OP_RD, {12'd0, R_NUSERS}, 0, r, lat);
    hr(7, s); check(!s[2], "packet to a missing PE is not acknowledged");

    // the full START sequence
    hw(5, 400);
    hr(5, r); check(r == 400, "target reads back");
    hw(6, 1);
    @(posedge clk); #1;
    hr(7, s); check(s[0] && !s[1], "busy after START");
    wait_idle(lat);
    hr(7, s); check(s[1], "done");
    total = 0;
    for (int i = 0; i < NPE; i++) total += gens[i];
    hr(10, r); check(r == DW'(total), "TOTAL_GEN is the PEs' final sum");
    check(total >= 400, "stopped only after the target");
    check(total < 400 + 600, "stopped soon after the target");
    for (int i = 0; i < NPE; i++) check(!running[i], "every PE stopped");
    hr(8, r); check(r == 2700, "best fitness");
    hr(9, r); check(r == 1, "best PE");

    // ABORT: huge target, abort after a while
    hw(5, 32'hFFFF_FFF0);
    hw(6, 1);
    repeat (2000) @(posedge clk);
    #1 hr(7, s); check(s[0], "still running before ABORT");
    hw(11, 1);
    wait_idle(lat);
    hr(7, s); check(s[1], "done after ABORT");
    for (int i = 0; i < NPE; i++) check(!running[i], "every PE stopped after ABORT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
