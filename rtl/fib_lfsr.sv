// fib_lfsr: Fibonacci linear-feedback shift register, the random source of the
// probability generator.
//
// How it works: one step shifts the register left by one bit and feeds the XOR
// of the tapped bits back into bit 0 (Fibonacci form). The register advances
// STEPS steps every clock, computed as STEPS unrolled single steps, so that
// with STEPS = W each clock delivers a word of W bits none of which were seen in
// the previous word. The LFSR type follows the design description; stepping a
// whole word per clock, the taps and the seed are this design's own choices.
//
// Interface: rnd_o is the current state. Timing: the state is loaded with SEED
// by the synchronous active-low reset and then changes on every rising clock
// edge; there is no enable.
module fib_lfsr #(
  parameter int unsigned W     = 64,
  parameter logic [W-1:0] TAPS = W'(64'hD800_0000_0000_0000),
  parameter int unsigned STEPS = W,
  parameter logic [W-1:0] SEED = W'(64'h9E37_79B9_7F4A_7C15)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] rnd_o
);

  logic [W-1:0] state_q, state_d;

  always_comb begin
    state_d = state_q;
    for (int unsigned s = 0; s < STEPS; s++) begin
      state_d = {state_d[W-2:0], ^(state_d & TAPS)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SEED;
    else        state_q <= state_d;
  end

  assign rnd_o = state_q;

  // A zero state would lock the register; a non-zero seed never reaches it.
  initial assert (SEED != '0) else $error("fib_lfsr: SEED must be non-zero");

endmodule
