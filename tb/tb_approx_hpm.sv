// tb_approx_hpm: end-to-end test of the approximate performance counter unit
// at its default size (29 group counters of 5 x 6-bit Morris counters, 12
// events, five 64-bit random sources).
//
// The testbench keeps its own cycle-accurate reference model: five bit-serial
// LFSRs started from the documented seeds, the 29 selector registers and all
// 145 counter states. It programs the selectors (single events, event sets and
// no event), drives random event streams of different densities, clears
// counters, and queries counters every few clocks, comparing the estimate and
// the raw member states one clock after the query with the model. It also
// checks the deterministic first step (one event moves every member from 0 to
// 1, so the estimate becomes 2), that out-of-range addresses read zero, and
// reports the relative error of the estimates against exact event counts.
// Each mechanism (selector write, inc() request, accepted and rejected member
// increment, event set with several active events, clear, query, out-of-range
// query) must occur at least once.
module tb_approx_hpm;
  import ahpc_pkg::*;
  localparam int NC = 29, NE = 12, GS = 5;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [NE-1:0]        events;
  logic                 sel_we, clr_we, query;
  logic [4:0]           sel_addr, clr_addr, query_addr;
  logic [NE-1:0]        sel_wdata;
  logic                 rd_valid;
  logic [63:0]          rd_est;
  logic [GS-1:0][5:0]   rd_x;

  int checks = 0, failures = 0;

  // Reference model.
  logic [63:0]   m_src [GS];
  logic [NE-1:0] m_sel [NC];
  int            m_x   [NC][GS];
  longint        m_cnt [NC];       // exact number of inc() requests since clear

  // Mechanism counters.
  int n_selwr = 0, n_inc = 0, n_acc = 0, n_rej = 0, n_multi = 0, n_clr = 0, n_query = 0, n_oor = 0, n_first = 0;

  always #5 clk = ~clk;

  approx_hpm dut (
    .clk, .rst_n, .events_i(events),
    .sel_we_i(sel_we), .sel_addr_i(sel_addr), .sel_wdata_i(sel_wdata),
    .clr_we_i(clr_we), .clr_addr_i(clr_addr),
    .query_i(query), .query_addr_i(query_addr),
    .rd_valid_o(rd_valid), .rd_est_o(rd_est), .rd_x_o(rd_x)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [63:0] step64(input logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  function automatic logic [63:0] model_est(input int c);
    logic [127:0] s = '0;
    for (int k = 0; k < GS; k++) s += 128'(1) << m_x[c][k];
    return 64'(s / 128'(GS));
  endfunction

  // One clock: apply the current inputs to the model, then let the DUT take
  // the same edge and compare any query result.
  task automatic cycle();
    logic [63:0]        exp_est;
    logic [GS-1:0][5:0] exp_x;
    bit                 exp_valid, ok;
    int                 qa;
    exp_valid = query;
    qa = int'(query_addr);
    exp_est = '0; exp_x = '0;
    if (query && qa < NC) begin
      exp_est = model_est(qa);
      for (int k = 0; k < GS; k++) exp_x[k] = 6'(m_x[qa][k]);
    end
    if (query) begin n_query++; if (qa >= NC) n_oor++; end
    for (int c = 0; c < NC; c++) begin
      bit inc;
      int nsel;
      inc = |(events & m_sel[c]);
      nsel = $countones(events & m_sel[c]);
      if (clr_we && int'(clr_addr) == c) begin
        for (int k = 0; k < GS; k++) m_x[c][k] = 0;
        m_cnt[c] = 0;
        n_clr++;
      end else if (inc) begin
        n_inc++;
        if (nsel > 1) n_multi++;
        if (m_cnt[c] == 0) n_first++;
        m_cnt[c]++;
        for (int k = 0; k < GS; k++) begin
          ok = 1'b1;
          for (int b = 0; b < m_x[c][k]; b++) if (m_src[k][b]) ok = 1'b0;
          if (ok && m_x[c][k] < 63) begin m_x[c][k]++; n_acc++; end
          else n_rej++;
        end
      end
    end
    if (sel_we && int'(sel_addr) < NC) begin m_sel[sel_addr] = sel_wdata; n_selwr++; end
    for (int k = 0; k < GS; k++) for (int s = 0; s < 64; s++) m_src[k] = step64(m_src[k]);
    @(posedge clk); #1;
    check(rd_valid == exp_valid, "read valid");
    if (exp_valid) begin
      check(rd_est == exp_est, "query estimate");
      check(rd_x == exp_x, "query member states");
    end
  endtask

  task automatic idle_inputs();
    events = '0; sel_we = 1'b0; clr_we = 1'b0; query = 1'b0;
    sel_addr = '0; clr_addr = '0; query_addr = '0; sel_wdata = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err_sum;
    int  err_n;
    rst_n = 1'b0;
    idle_inputs();
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 0; k < GS; k++) m_src[k] = 64'h9E37_79B9_7F4A_7C15 * 64'(k + 1);
    for (int c = 0; c < NC; c++) begin
      m_sel[c] = '0; m_cnt[c] = 0;
      for (int k = 0; k < GS; k++) m_x[c][k] = 0;
    end

    // Fresh counter reads an estimate of 1 (all members at 0).
    query = 1'b1; query_addr = 5'd3;
    cycle();
    check(rd_est == 64'd1, "fresh estimate");
    idle_inputs();

    // Program the selectors: counters 0..11 one event each, 12..23 event sets,
    // 24..28 left at "no event".
    for (int c = 0; c < 24; c++) begin
      sel_we = 1'b1; sel_addr = 5'(c);
      sel_wdata = (c < 12) ? 12'(1 << c) : (12'($urandom) | 12'(1 << (c - 12)));
      cycle();
    end
    idle_inputs();

    // First event on counter 0: every member must step from 0 to 1.
    events = 12'(1 << EV_EXCEPTION);
    cycle();
    events = '0;
    query = 1'b1; query_addr = 5'd0;
    cycle();
    check(rd_est == 64'd2 && rd_x == {GS{6'd1}}, "first event estimate");
    idle_inputs();

    // Random operation.
    for (int i = 0; i < 20000; i++) begin
      idle_inputs();
      for (int e = 0; e < NE; e++) events[e] = ($urandom % 16) < (e % 8) + 1;
      if ($urandom % 50 == 0) begin
        sel_we = 1'b1; sel_addr = 5'($urandom % 32); sel_wdata = 12'($urandom);
        // Keep counters 0..11 on their single events for the error report.
        if (sel_addr < 12) sel_we = 1'b0;
      end
      if ($urandom % 300 == 0) begin clr_we = 1'b1; clr_addr = 5'(12 + $urandom % 20); end
      if ($urandom % 4 == 0) begin query = 1'b1; query_addr = 5'($urandom % 32); end
      cycle();
    end
    idle_inputs();

    // Final read of all counters; relative error of the single-event counters.
    err_sum = 0.0; err_n = 0;
    for (int c = 0; c < 32; c++) begin
      query = 1'b1; query_addr = 5'(c);
      cycle();
      if (c < 12 && m_cnt[c] > 0) begin
        err_sum += (real'(rd_est) > real'(m_cnt[c]) ? real'(rd_est) - real'(m_cnt[c])
                                                     : real'(m_cnt[c]) - real'(rd_est)) / real'(m_cnt[c]);
        err_n++;
      end
      if (c >= NC) check(rd_est == 64'd0 && rd_x == '0, "out-of-range reads zero");
    end
    idle_inputs();
    $display("mean relative error of %0d single-event counters: %0.3f", err_n, err_sum / err_n);
    check(err_n == 12 && err_sum / err_n < 0.6, "estimates in a plausible range");

    $display("selector writes=%0d inc=%0d accepted=%0d rejected=%0d multi-event=%0d clears=%0d queries=%0d out-of-range=%0d first=%0d",
             n_selwr, n_inc, n_acc, n_rej, n_multi, n_clr, n_query, n_oor, n_first);
    check(n_selwr > 0, "selector write happened");
    check(n_inc > 0,   "inc() happened");
    check(n_acc > 0,   "accepted increment happened");
    check(n_rej > 0,   "rejected increment happened");
    check(n_multi > 0, "multi-event set happened");
    check(n_clr > 0,   "clear happened");
    check(n_query > 0, "query happened");
    check(n_oor > 0,   "out-of-range query happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
