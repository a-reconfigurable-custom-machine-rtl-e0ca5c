// comm_node: one stop of the command ring between the cGAC and the PEs.
//
// The cGA controller talks to every PE over a ring of these nodes: a packet
// (ring_pkt_t) enters at node 0, moves one node per cycle and returns to the
// controller after NUM_PE cycles. A node whose ID equals the packet's dest,
// or any node when dest is DEST_ALL, hands the command to its PE for one
// cycle (cmd_valid) and marks the packet acknowledged. For a read addressed
// to this node the PE answers in the same cycle on rsp_data, combinationally
// from its registers, and the node carries the answer on in the packet's
// data field. Other packets pass unchanged. The document only says that a
// dedicated network links the controller with all PEs; the ring, the packet
// format and the one-cycle hand-over are this design's choices.
module comm_node
  import cgap_pkg::*;
#(
  parameter logic [7:0] ID = 8'd0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ring_pkt_t     pkt_in,
  output ring_pkt_t     pkt_out,
  // towards the PE
  output logic          cmd_valid,
  output cmd_op_e       cmd_op,
  output logic [15:0]   cmd_addr,
  output logic [DW-1:0] cmd_data,
  input  logic [DW-1:0] rsp_data
);

  logic      mine, to_me;
  ring_pkt_t nxt;

  assign to_me     = (pkt_in.dest == ID);
  assign mine      = pkt_in.valid && (to_me || pkt_in.dest == DEST_ALL);
  assign cmd_valid = mine;
  assign cmd_op    = pkt_in.op;
  assign cmd_addr  = pkt_in.addr;
  assign cmd_data  = pkt_in.data;

  always_comb begin
    nxt = pkt_in;
    if (mine) begin
      nxt.ack = 1'b1;
      if (to_me && pkt_in.op == OP_RD) nxt.data = rsp_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pkt_out <= '0;
    else        pkt_out <= nxt;
  end

endmodule
