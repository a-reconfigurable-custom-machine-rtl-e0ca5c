// tb_ca_rng: the cellular-automaton generator against a software model of
// the same neighbourhood-of-four rule, plus simple quality checks on 4000
// words: close to half the bits are ones, every bit position toggles, and no
// word repeats the one before it.
module tb_ca_rng;
  localparam int W = 160;
  localparam logic [W-1:0] SEED = {W/32{32'h1357_9BDF}} ^ W'(64'h0F0F_1234);
  logic clk = 0, rst_n = 0;
  logic [W-1:0] rnd, model, prev, toggled;
  longint ones = 0;
  int checks = 0, failures = 0;

  ca_rng #(.W(W), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [W-1:0] rule(logic [W-1:0] c);
    logic [W-1:0] n;
    for (int i = 0; i < W; i++) begin
      int l, r1, r2;
      l  = (i == 0) ? W - 1 : i - 1;
      r1 = (i == W - 1) ? 0 : i + 1;
      r2 = (i + 2) % W;
      n[i] = c[l] ^ (c[i] | c[r1]) ^ c[r2];
    end
    if (n == '0 || n == '1) n = SEED;
    return n;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check(rnd == SEED, "reset loads the seed");
    rst_n = 1;
    model = SEED; toggled = '0; prev = rnd;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk); #1;
      model = rule(model);
      check(rnd == model, "matches the rule");
      check(rnd != prev, "word changes");
      toggled |= rnd ^ prev;
      ones += $countones(rnd);
      prev = rnd;
    end
    check(toggled == '1, "every bit toggles");
    check(ones > 4000 * W * 45 / 100 && ones < 4000 * W * 55 / 100, "about half ones");
    $display("ones ratio %0d per mille", ones * 1000 / (4000 * W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
