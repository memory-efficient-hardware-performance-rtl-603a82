// random_prob_gen: the random probability generator, a bank of independently
// seeded random sources ("Seed 1" .. "Seed N").
//
// How it works: NUM_SEEDS Fibonacci LFSRs run side by side, each with its own
// seed, and each delivers a fresh LFSR_W-bit random word every clock. Source k
// drives Morris counter k of every group counter, so the counters inside one
// group never share a source and behave independently, while counter k of
// different groups share source k. Separate sources per group member follow the
// design description and its block diagram; the sharing of a source across
// groups is read from that diagram. Each counter turns its word into a
// 1-with-probability-1/2^X bit with its own prob_gate.
//
// Interface: rnd_o[k] is the word of source k. Timing: all sources are loaded
// on the synchronous active-low reset and advance on every rising clock edge.
module random_prob_gen
  import ahpc_pkg::*;
#(
  parameter int unsigned NUM_SEEDS = GROUP_SIZE,
  parameter int unsigned W         = LFSR_W,
  parameter int unsigned STEPS     = LFSR_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic [NUM_SEEDS-1:0][W-1:0]   rnd_o
);

  for (genvar k = 0; k < NUM_SEEDS; k++) begin : g_src
    fib_lfsr #(
      .W    (W),
      .TAPS (W'(LFSR_TAPS)),
      .STEPS(STEPS),
      .SEED (W'(lfsr_seed(k)))
    ) u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .rnd_o(rnd_o[k])
    );
  end

endmodule
