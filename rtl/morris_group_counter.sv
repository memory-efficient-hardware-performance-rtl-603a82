// morris_group_counter: GROUP_SIZE Morris counters that count the same event,
// read as the average of their estimates.
//
// How it works: an increment request inc() goes to every member counter at
// once; each member decides on its own, with its own random source, whether to
// step. A query() returns (2^X_1 + ... + 2^X_N) / N, the mean of the members'
// estimates (rounded down), which has 1/N of the variance of one counter. The
// broadcast and the averaging follow the design description; using the average
// of the estimates 2^X (not 2 to the power of the average X) and the rounding
// are this design's reading of it.
//
// Interface: inc_i (one event), clr_i (clear all members), rnd_i[k] random word
// of member k, x_o[k] state of member k (the GROUP_SIZE*COUNTER_W stored bits),
// est_o the query result. Timing: members update on the rising clock edge;
// est_o is combinational from the stored state.
module morris_group_counter
  import ahpc_pkg::*;
#(
  parameter int unsigned GS = GROUP_SIZE,
  parameter int unsigned XW = COUNTER_W,
  parameter int unsigned RW = LFSR_W,
  parameter int unsigned EW = EST_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr_i,
  input  logic                   inc_i,
  input  logic [GS-1:0][RW-1:0]  rnd_i,
  output logic [GS-1:0][XW-1:0]  x_o,
  output logic [EW-1:0]          est_o
);

  localparam int unsigned SW = EW + $clog2(GS + 1);

  logic [SW-1:0] sum;

  for (genvar k = 0; k < GS; k++) begin : g_ctr
    morris_counter #(.XW(XW), .RW(RW)) u_ctr (
      .clk  (clk),
      .rst_n(rst_n),
      .clr_i(clr_i),
      .inc_i(inc_i),
      .rnd_i(rnd_i[k]),
      .x_o  (x_o[k])
    );
  end

  // query(): average of the members' estimates 2^X.
  always_comb begin
    sum = '0;
    for (int unsigned k = 0; k < GS; k++) begin
      sum = sum + (SW'(1) << x_o[k]);
    end
    est_o = EW'(sum / SW'(GS));
  end

  // The estimate of a largest-X member must still fit the estimate width.
  initial assert ((1 << XW) - 1 < EW) else $error("morris_group_counter: EW too small for XW");

endmodule
