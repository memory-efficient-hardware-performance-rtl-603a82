// approx_hpm: approximate hardware performance counter unit (top level).
//
// Main idea: instead of NC deterministic 64-bit event counters, keep NC Morris
// group counters of GS x XW bits (5 x 6 = 30 bits), which count approximately
// but cover the same 64-bit range, at about half the storage.
//
// How it works: the core drives one bit per monitored event (events_i). Each of
// the NC counters has an event selector register; when one of its selected
// events fires, the selector calls inc() on its Morris group counter, which
// passes the request to its GS Morris counters. Each member steps with
// probability 1/2^X, drawn from random source k of the shared random
// probability generator (member k of every group uses source k). A query()
// returns the average of the members' estimates 2^X. This structure follows the
// design description and its block diagram. The register-access ports (write a
// selector, clear a counter, query a counter by index) stand in for the core's
// CSR access, which is not part of this unit, and are this design's own.
//
// Interface:
//   events_i                         event vector from the core (ahpc_pkg::event_e)
//   sel_we_i, sel_addr_i, sel_wdata_i  write event selector register sel_addr_i
//   clr_we_i, clr_addr_i             clear group counter clr_addr_i
//   query_i, query_addr_i            query group counter query_addr_i
//   rd_valid_o, rd_est_o, rd_x_o     query result: estimate and raw member states
// Timing: selector writes and clears take effect on the next rising clock edge;
// an event at clock t is counted (or rejected) at the edge ending clock t; a
// query at clock t returns its result, registered, during clock t+1 and sees
// the state before that edge. Addresses of NC and above are ignored on writes
// and read as zero.
module approx_hpm
  import ahpc_pkg::*;
#(
  parameter int unsigned NC = NUM_COUNTERS,
  parameter int unsigned NE = NUM_EVENTS,
  parameter int unsigned GS = GROUP_SIZE,
  parameter int unsigned XW = COUNTER_W,
  parameter int unsigned RW = LFSR_W,
  parameter int unsigned EW = EST_W,
  localparam int unsigned AW = $clog2(NC)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NE-1:0]         events_i,
  input  logic                  sel_we_i,
  input  logic [AW-1:0]         sel_addr_i,
  input  logic [NE-1:0]         sel_wdata_i,
  input  logic                  clr_we_i,
  input  logic [AW-1:0]         clr_addr_i,
  input  logic                  query_i,
  input  logic [AW-1:0]         query_addr_i,
  output logic                  rd_valid_o,
  output logic [EW-1:0]         rd_est_o,
  output logic [GS-1:0][XW-1:0] rd_x_o
);

  logic [GS-1:0][RW-1:0]        rnd;
  logic [NC-1:0]                inc;
  logic [NC-1:0][EW-1:0]        est;
  logic [NC-1:0][GS-1:0][XW-1:0] xs;

  random_prob_gen #(.NUM_SEEDS(GS), .W(RW), .STEPS(RW)) u_rpg (
    .clk  (clk),
    .rst_n(rst_n),
    .rnd_o(rnd)
  );

  for (genvar c = 0; c < NC; c++) begin : g_cnt
    event_selector #(.NE(NE)) u_sel (
      .clk     (clk),
      .rst_n   (rst_n),
      .we_i    (sel_we_i && (sel_addr_i == AW'(c))),
      .wdata_i (sel_wdata_i),
      .events_i(events_i),
      .sel_o   (),
      .inc_o   (inc[c])
    );

    morris_group_counter #(.GS(GS), .XW(XW), .RW(RW), .EW(EW)) u_grp (
      .clk  (clk),
      .rst_n(rst_n),
      .clr_i(clr_we_i && (clr_addr_i == AW'(c))),
      .inc_i(inc[c]),
      .rnd_i(rnd),
      .x_o  (xs[c]),
      .est_o(est[c])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid_o <= 1'b0;
      rd_est_o   <= '0;
      rd_x_o     <= '0;
    end else begin
      rd_valid_o <= query_i;
      if (query_i) begin
        if (32'(query_addr_i) < NC) begin
          rd_est_o <= est[query_addr_i];
          rd_x_o   <= xs[query_addr_i];
        end else begin
          rd_est_o <= '0;
          rd_x_o   <= '0;
        end
      end
    end
  end

endmodule
