// rng_link: one stage of the random-number chain.
//
// The global generator's word is not broadcast on one long net: it is
// passed from PE to PE through a register in each, so that every PE finds a
// fresh random word at its door every cycle while all wiring stays local.
// The word a PE taps is the one it passes on; PE i therefore sees the
// generator's stream delayed by i+1 cycles. Latency one cycle, no stall.
// The document says the numbers are carried continuously through the array;
// the one-register-per-PE chain is this design's choice.
module rng_link #(
  parameter int W = 160
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] rnd_in,
  output logic [W-1:0] rnd_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd_out <= '0;
    else        rnd_out <= rnd_in;
  end

endmodule
