// tb_rng_link: a chain of three links must deliver the input stream delayed
// by exactly one cycle per link, and reset must clear every stage.
module tb_rng_link;
  localparam int W = 160;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] s0, s1, s2, s3;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  rng_link #(.W(W)) l1 (.clk, .rst_n, .rnd_in(s0), .rnd_out(s1));
  rng_link #(.W(W)) l2 (.clk, .rst_n, .rnd_in(s1), .rnd_out(s2));
  rng_link #(.W(W)) l3 (.clk, .rst_n, .rnd_in(s2), .rnd_out(s3));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s0 = '1;
    repeat (2) @(posedge clk);
    #1 check(s1 == '0 && s2 == '0 && s3 == '0, "reset clears the chain");
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      s0 = {5{$urandom()}} ^ (W'($urandom()) << 64);
      hist.push_front(s0);
      @(posedge clk); #1;
      check(s1 == hist[0], "one stage, one cycle");
      if (hist.size() >= 3) check(s3 == hist[2], "three stages, three cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
