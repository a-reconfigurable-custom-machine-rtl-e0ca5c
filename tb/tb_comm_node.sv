// tb_comm_node: a ring segment of three nodes (IDs 0..2), each with a small
// register standing in for its PE. Checks: a write reaches only its PE, a
// broadcast reaches all three, a read returns the addressed PE's answer, an
// unaddressed packet comes back unacknowledged, and a packet takes one cycle
// per node.
module tb_comm_node;
  import cgap_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  ring_pkt_t ring [N+1];
  logic          cv [N];
  cmd_op_e       cop [N];
  logic [15:0]   cad [N];
  logic [DW-1:0] cdt [N], rsp [N], regs [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g
    comm_node #(.ID(8'(i))) u (.clk, .rst_n, .pkt_in(ring[i]), .pkt_out(ring[i+1]),
      .cmd_valid(cv[i]), .cmd_op(cop[i]), .cmd_addr(cad[i]), .cmd_data(cdt[i]),
      .rsp_data(rsp[i]));
    assign rsp[i] = regs[i] + DW'(cad[i]);
    always_ff @(posedge clk)
      if (!rst_n) regs[i] <= 32'h100 * i;
      else if (cv[i] && cop[i] == OP_WR) regs[i] <= cdt[i];
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // send one packet, return what comes out of the last node and the latency
  task automatic send(input logic [7:0] dest, input cmd_op_e op, input logic [15:0] addr,
                      input logic [DW-1:0] data, output ring_pkt_t back, output int lat);
    ring[0] = '{valid: 1, ack: 0, dest: dest, op: op, addr: addr, data: data};
    @(posedge clk); #1;
    ring[0] = '0;
    lat = 1;
    while (!ring[N].valid && lat < 50) begin @(posedge clk); #1; lat++; end
    back = ring[N];
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ring_pkt_t b;
    int lat;
    logic [DW-1:0] d;
    ring[0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(ring[N] == '0, "reset clears the ring");
    for (int k = 0; k < 30; k++) begin
      int t;
      logic [DW-1:0] prev_regs [N];
      t = $urandom_range(0, N - 1);
      d = $urandom;
      prev_regs = regs;
      send(8'(t), OP_WR, 16'h0003, d, b, lat);
      check(lat == N, "one cycle per node");
      check(b.valid && b.ack, "write acknowledged");
      for (int i = 0; i < N; i++)
        check(regs[i] == ((i == t) ? d : prev_regs[i]), "write reaches only its PE");
      send(8'(t), OP_RD, 16'h0005, 32'hDEAD, b, lat);
      check(b.ack && b.data == d + 5, "read returns the PE's answer");
    end
    d = 32'hCAFE_0001;
    send(DEST_ALL, OP_WR, 16'h0003, d, b, lat);
    check(b.ack, "broadcast acknowledged");
    for (int i = 0; i < N; i++) check(regs[i] == d, "broadcast reaches every PE");
    send(8'd9, OP_RD, 16'h0001, 32'h1111, b, lat);
    check(b.valid && !b.ack && b.data == 32'h1111, "unaddressed packet passes unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
