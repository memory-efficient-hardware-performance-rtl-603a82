// prob_gate: output stage of the random probability generator. Given a
// counter value X and a random word, it outputs 1 with probability 1/2^X.
//
// How it works: the low X bits of the random word are kept and OR-reduced; the
// result is 0 with probability 1/2^X (all X bits zero), and the gate outputs
// its inverse. For X = 0 no bit is kept and the output is always 1. This masking
// and OR-reduction follow the design description.
//
// Interface: x_i (counter value), rnd_i (random word from an LFSR), hit_o.
// Timing: purely combinational.
module prob_gate
  import ahpc_pkg::*;
#(
  parameter int unsigned XW = COUNTER_W,
  parameter int unsigned RW = LFSR_W
) (
  input  logic [XW-1:0] x_i,
  input  logic [RW-1:0] rnd_i,
  output logic          hit_o
);

  logic [RW-1:0] mask;

  always_comb begin
    mask  = (RW'(1) << x_i) - RW'(1);
    hit_o = ~|(rnd_i & mask);
  end

endmodule
