// morris_counter: one Morris approximate counter (COUNTER_W bits, base 2).
//
// How it works: the counter holds X. On an increment request it asks its
// probability gate, which answers 1 with probability 1/2^X using the random
// word from its LFSR; only then does X become X+1. The value X stands for an
// estimated count of 2^X. This follows the design description. Saturation at
// the largest X (so X never wraps to 0) and the synchronous clear are this
// design's own choices.
//
// Interface: inc_i requests one increment, clr_i sets X to 0 (clear wins over
// inc_i), rnd_i is the random word for this clock, x_o is X. Timing: X
// changes on the rising clock edge after inc_i; one increment at most per clock.
module morris_counter
  import ahpc_pkg::*;
#(
  parameter int unsigned XW = COUNTER_W,
  parameter int unsigned RW = LFSR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr_i,
  input  logic          inc_i,
  input  logic [RW-1:0] rnd_i,
  output logic [XW-1:0] x_o
);

  logic [XW-1:0] x_q;
  logic          sat;
  logic          hit;

  prob_gate #(.XW(XW), .RW(RW)) u_gate (
    .x_i  (x_q),
    .rnd_i(rnd_i),
    .hit_o(hit)
  );

  assign sat = &x_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i)             x_q <= '0;
    else if (inc_i && hit && !sat) x_q <= x_q + XW'(1);
  end

  assign x_o = x_q;

  // Rule of the counter: without a clear, X either holds or grows by one.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !clr_i |=> (x_q == $past(x_q)) || (x_q == $past(x_q) + XW'(1)))
    else $error("morris_counter: X changed by more than one step");

endmodule
