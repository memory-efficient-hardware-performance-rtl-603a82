// tb_workloads: accuracy experiment on the approximate counter unit at its
// default size, in the style of the evaluation of the design: two benchmark
// profiles ("spmv", sparse matrix-vector multiply, and "vvadd", vector-vector
// add), each run 50 times, with the twelve events counted by counters 0..11.
//
// The event streams are synthetic: each event fires independently each clock
// with a per-profile probability chosen to resemble the event mix of the
// benchmark (memory and arithmetic heavy, rare misses); they are not traces of
// a processor. Exact counts are kept by the testbench. Between runs the
// counters are cleared while the random sources keep running, so the 50 runs
// see different random numbers. For each event the testbench prints the
// minimum, first quartile, third quartile and maximum relative error over the
// runs, and checks that the mean relative error is below 40%, that no more
// than 1/(2*0.75^2)/5 = 17.8% of all results are off by more than 75%, and
// that every event is counted and read back.
module tb_workloads;
  import ahpc_pkg::*;
  localparam int NE = 12, RUNS = 50, CYCLES = 8000;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic [NE-1:0]         events;
  logic                  sel_we, clr_we, query;
  logic [4:0]            sel_addr, clr_addr, query_addr;
  logic [NE-1:0]         sel_wdata;
  logic                  rd_valid;
  logic [63:0]           rd_est;
  logic [GROUP_SIZE-1:0][5:0] rd_x;
  int                    checks = 0, failures = 0;

  always #5 clk = ~clk;

  approx_hpm dut (
    .clk, .rst_n, .events_i(events),
    .sel_we_i(sel_we), .sel_addr_i(sel_addr), .sel_wdata_i(sel_wdata),
    .clr_we_i(clr_we), .clr_addr_i(clr_addr),
    .query_i(query), .query_addr_i(query_addr),
    .rd_valid_o(rd_valid), .rd_est_o(rd_est), .rd_x_o(rd_x)
  );

  // Per-event firing probability in 1/1024 per clock, per profile; order as
  // ahpc_pkg::event_e.
  int prob_spmv  [NE] = '{2, 280, 40, 3, 150, 160, 20, 10, 25, 6, 30, 12};
  int prob_vvadd [NE] = '{2, 200, 100, 3, 110, 100, 15, 12, 8, 4, 12, 20};

  real err [NE][RUNS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void sort_run(ref real a [RUNS]);
    for (int i = 1; i < RUNS; i++) begin
      real v = a[i];
      int  j = i - 1;
      while (j >= 0 && a[j] > v) begin a[j + 1] = a[j]; j--; end
      a[j + 1] = v;
    end
  endfunction

  task automatic run_profile(input string name, input int prob [NE]);
    longint exact [NE];
    real    sum_err, row [RUNS];
    int     n_big, n_all;
    sum_err = 0.0; n_big = 0; n_all = 0;
    for (int r = 0; r < RUNS; r++) begin
      // Clear counters 0..11.
      for (int c = 0; c < NE; c++) begin
        @(negedge clk);
        clr_we = 1'b1; clr_addr = 5'(c);
      end
      @(negedge clk);
      clr_we = 1'b0;
      for (int e = 0; e < NE; e++) exact[e] = 0;
      for (int t = 0; t < CYCLES; t++) begin
        for (int e = 0; e < NE; e++) begin
          events[e] = int'($urandom % 1024) < prob[e];
          if (events[e]) exact[e]++;
        end
        @(negedge clk);
      end
      events = '0;
      for (int e = 0; e < NE; e++) begin
        query = 1'b1; query_addr = 5'(e);
        @(negedge clk);
        query = 1'b0;
        check(rd_valid, "query answered");
        check(exact[e] > 0, "event occurred");
        err[e][r] = (real'(rd_est) > real'(exact[e]) ? real'(rd_est) - real'(exact[e])
                                                      : real'(exact[e]) - real'(rd_est)) / real'(exact[e]);
        sum_err += err[e][r];
        n_all++;
        if (err[e][r] > 0.75) n_big++;
      end
    end
    $display("%s: %0d runs of %0d clocks", name, RUNS, CYCLES);
    for (int e = 0; e < NE; e++) begin
      event_e ev = event_e'(e);
      for (int r = 0; r < RUNS; r++) row[r] = err[e][r];
      sort_run(row);
      $display("  %-15s min %5.3f  q1 %5.3f  q3 %5.3f  max %5.3f", ev.name(), row[0], row[RUNS/4], row[(3*RUNS)/4], row[RUNS-1]);
    end
    $display("  mean relative error %5.3f, results off by more than 75%%: %0d of %0d", sum_err / n_all, n_big, n_all);
    check(sum_err / n_all < 0.40, "mean relative error below 40%");
    check(real'(n_big) / real'(n_all) < 0.178, "large errors within the group bound");
  endtask

  initial begin
    rst_n = 1'b0; events = '0; sel_we = 1'b0; clr_we = 1'b0; query = 1'b0;
    sel_addr = '0; clr_addr = '0; query_addr = '0; sel_wdata = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NE; c++) begin
      sel_we = 1'b1; sel_addr = 5'(c); sel_wdata = 12'(1 << c);
      @(negedge clk);
    end
    sel_we = 1'b0;
    run_profile("spmv", prob_spmv);
    run_profile("vvadd", prob_vvadd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
