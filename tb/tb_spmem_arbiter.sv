// tb_spmem_arbiter: directed and random test of the per-solution lock.
// Directed: single request, blocking by the holder, release and hand-over,
// independent slots, and ties resolved alternately. Random: the lock is
// never held twice, a free slot is granted the next cycle, a held grant
// persists while its request stays, and refusals are flagged.
module tb_spmem_arbiter;
  localparam int SW = 2;
  logic clk = 0, rst_n = 0;
  logic req_a = 0, req_b = 0;
  logic [SW-1:0] slot_a = 0, slot_b = 0;
  logic gnt_a, gnt_b, collision;
  int checks = 0, failures = 0;

  spmem_arbiter #(.SW(SW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random-phase reference: who owns what, built from the grant history
  bit prev_req_a, prev_req_b, prev_ga, prev_gb;
  logic [SW-1:0] prev_sa, prev_sb;

  initial begin
    repeat (2) step();
    rst_n = 1;
    step();
    // 1. single request
    req_a = 1; slot_a = 1;
    #1 check(!gnt_a, "no grant in the request cycle");
    step();
    check(gnt_a && !gnt_b, "A granted one cycle after request");
    // 2. B wants the same slot: refused while A holds it
    req_b = 1; slot_b = 1;
    #1 check(collision, "collision flagged");
    step(); check(gnt_a && !gnt_b, "B blocked while A holds");
    step(); check(gnt_a && !gnt_b, "B still blocked");
    req_a = 0;
    #1 check(!gnt_a && !gnt_b, "released grant falls at once");
    step(); check(!gnt_a && gnt_b, "B gets the slot at the next edge");
    // 3. different slots do not interfere
    req_a = 1; slot_a = 2;
    step(); check(gnt_a && gnt_b, "two slots held at once");
    // moving to another slot without release drops the grant at once
    slot_a = 1;
    #1 check(!gnt_a, "grant belongs to its slot");
    step(); check(!gnt_a && gnt_b, "A cannot take B's slot by moving");
    req_a = 0; req_b = 0;
    step(); step();
    // 4. ties alternate
    req_a = 1; req_b = 1; slot_a = 3; slot_b = 3;
    step(); check(gnt_a && !gnt_b, "first tie: A wins");
    req_a = 0; req_b = 0; step(); step();
    req_a = 1; req_b = 1;
    step(); check(!gnt_a && gnt_b, "second tie: B wins");
    req_a = 0; req_b = 0; step(); step();
    req_a = 1; req_b = 1;
    step(); check(gnt_a && !gnt_b, "third tie: A wins");
    req_a = 0; req_b = 0; step(); step();

    // 5. random traffic against the rules
    prev_req_a = 0; prev_req_b = 0; prev_ga = 0; prev_gb = 0;
    for (int i = 0; i < 3000; i++) begin
      // keep the slot while holding a request most of the time
      if (!req_a || $urandom_range(0, 7) == 0) begin
        req_a = $urandom_range(0, 1); slot_a = SW'($urandom);
      end
      if (!req_b || $urandom_range(0, 7) == 0) begin
        req_b = $urandom_range(0, 1); slot_b = SW'($urandom);
      end
      #1;
      prev_req_a = req_a; prev_req_b = req_b; prev_sa = slot_a; prev_sb = slot_b;
      prev_ga = gnt_a; prev_gb = gnt_b;
      step();
      check(!(gnt_a && gnt_b && slot_a == slot_b), "exclusive");
      // a request for a slot the other side neither held nor asked for
      if (prev_req_a && (!prev_req_b || prev_sb != prev_sa) && req_a && slot_a == prev_sa)
        check(gnt_a, "free slot granted to A");
      if (prev_req_b && (!prev_req_a || prev_sa != prev_sb) && req_b && slot_b == prev_sb)
        check(gnt_b, "free slot granted to B");
      if (prev_ga && req_a && slot_a == prev_sa) check(gnt_a, "A keeps its grant");
      if (prev_gb && req_b && slot_b == prev_sb) check(gnt_b, "B keeps its grant");
      if (!req_a) check(!gnt_a, "no grant without request A");
      if (!req_b) check(!gnt_b, "no grant without request B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
