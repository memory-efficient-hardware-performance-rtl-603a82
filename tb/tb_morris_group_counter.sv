// tb_morris_group_counter: self-checking test of morris_group_counter.
// Drives increment requests, clears and an independent random word per member,
// and checks each member's X against a reference model and the query result
// against floor((2^X1 + ... + 2^X5) / 5) computed in wide arithmetic. Also
// forces the members to the top (X = 63) to check the largest estimate.
module tb_morris_group_counter;
  localparam int GS = 5;
  logic                 clk = 1'b0;
  logic                 rst_n, clr, inc;
  logic [GS-1:0][63:0]  rnd;
  logic [GS-1:0][5:0]   x;
  logic [63:0]          est;
  int                   checks = 0, failures = 0;
  int                   mx [GS];

  always #5 clk = ~clk;

  morris_group_counter dut (.clk, .rst_n, .clr_i(clr), .inc_i(inc), .rnd_i(rnd), .x_o(x), .est_o(est));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t est=%0d", what, $time, est);
    end
  endtask

  function automatic logic [63:0] ref_est();
    logic [127:0] s = '0;
    for (int k = 0; k < GS; k++) s += 128'(1) << mx[k];
    return 64'(s / 128'(GS));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok_member, diverged;
    rst_n = 1'b0; clr = 1'b0; inc = 1'b0; rnd = '1;
    for (int k = 0; k < GS; k++) mx[k] = 0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    check(est == 64'd1, "empty estimate is 1");
    diverged = 0;
    for (int i = 0; i < 6000; i++) begin
      inc = ($urandom % 3) != 0;
      clr = ($urandom % 700) == 0;
      for (int k = 0; k < GS; k++) begin
        rnd[k] = {$urandom, $urandom};
        for (int j = 0; j < int'($urandom % 5); j++) rnd[k] = rnd[k] & {$urandom, $urandom};
      end
      @(posedge clk); #1;
      for (int k = 0; k < GS; k++) begin
        ok_member = 1'b1;
        for (int b = 0; b < mx[k]; b++) if (rnd[k][b]) ok_member = 1'b0;
        if (clr) mx[k] = 0;
        else if (inc && ok_member && mx[k] < 63) mx[k]++;
        check(int'(x[k]) == mx[k], "member state");
      end
      check(est == ref_est(), "query average");
      for (int k = 1; k < GS; k++) if (mx[k] != mx[0]) diverged = 1;
    end
    check(diverged, "members evolve independently");
    // Drive all members to the top.
    rnd = '0; inc = 1'b1; clr = 1'b0;
    repeat (70) @(posedge clk);
    #1;
    for (int k = 0; k < GS; k++) mx[k] = 63;
    check(est == 64'h8000_0000_0000_0000, "largest estimate");
    check(est == ref_est(), "largest estimate model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
