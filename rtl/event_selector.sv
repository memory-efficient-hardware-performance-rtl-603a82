// event_selector: one event selector register and the inc() request it
// produces for its counter.
//
// How it works: software writes a mask with one bit per monitored event; each
// clock the selector raises inc_o when any selected event is active. The
// register that chooses which events a counter tracks follows the design
// description; the one-hot/mask encoding, its OR of several selected events
// into one increment per clock, and reset to "no event" are this design's own
// choices.
//
// Interface: we_i/wdata_i write the register, sel_o shows it, events_i is the
// event vector from the core, inc_o the increment request. Timing: the register
// is written on the rising clock edge; inc_o is combinational from events_i.
module event_selector
  import ahpc_pkg::*;
#(
  parameter int unsigned NE = NUM_EVENTS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [NE-1:0] wdata_i,
  input  logic [NE-1:0] events_i,
  output logic [NE-1:0] sel_o,
  output logic          inc_o
);

  logic [NE-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n)    sel_q <= '0;
    else if (we_i) sel_q <= wdata_i;
  end

  assign sel_o = sel_q;
  assign inc_o = |(events_i & sel_q);

endmodule
