// spmem_arbiter: solution-level lock between the two ports of a spMEM.
//
// Two PEs share every subpopulation memory and may both want the same
// solution. A PE raises req with the slot it wants and keeps req high, with
// the same slot, for as long as it works on that solution; it lets go by
// dropping req. A port is granted (gnt, registered) unless the other port
// already holds the same slot, or asks for it in the same cycle and has
// priority. Priority passes to the losing port after every tie, so neither
// port can be starved. Requests for different slots never interfere.
// A grant belongs to the slot it was given for: gnt is high only while req is
// high and slot equals the slot the grant was won for, so a port that moves
// to another slot sees gnt fall at once and has to win the new slot afresh.
// Timing: a free slot is granted in the cycle after req rises.
// `collision` pulses in each cycle a request is refused because of the other
// port. Reset: no grants, port A has priority. The document asks only that a
// PE never accesses a solution the other PE is updating; the lock protocol,
// the one-cycle grant and the alternating priority are this design's choices.
module spmem_arbiter #(
  parameter int SW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_a,
  input  logic [SW-1:0] slot_a,
  input  logic          req_b,
  input  logic [SW-1:0] slot_b,
  output logic          gnt_a,
  output logic          gnt_b,
  output logic          collision
);

  logic          g_a, g_b;      // registered grants
  logic          prio_b;        // 1: port B wins a tie
  logic [SW-1:0] held_a, held_b; // slot each grant refers to
  logic          keep_a, keep_b; // the port still asks for its held slot
  logic          same, nxt_a, nxt_b, tie;

  assign keep_a = g_a && req_a && (slot_a == held_a);
  assign keep_b = g_b && req_b && (slot_b == held_b);
  assign gnt_a  = keep_a;
  assign gnt_b  = keep_b;

  assign same  = (slot_a == slot_b);
  // a tie: both ask for the same slot and neither holds it yet
  assign tie   = req_a && req_b && same && !keep_a && !keep_b;
  assign nxt_a = req_a && (keep_a || !(same && (keep_b || (req_b && prio_b))));
  assign nxt_b = req_b && (keep_b || !(same && (keep_a || (req_a && !prio_b))));

  assign collision = (req_a && !nxt_a) || (req_b && !nxt_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_a    <= 1'b0;
      g_b    <= 1'b0;
      prio_b <= 1'b0;
      held_a <= '0;
      held_b <= '0;
    end else begin
      g_a    <= nxt_a;
      g_b    <= nxt_b;
      held_a <= slot_a;
      held_b <= slot_b;
      if (tie) prio_b <= !prio_b;
    end
  end

  // the lock is exclusive per slot
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                !(g_a && g_b && held_a == held_b))
    else $error("spmem_arbiter: both ports hold slot %0d", held_a);

endmodule
