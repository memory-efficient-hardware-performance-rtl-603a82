// tb_morris_counter: self-checking test of morris_counter.
// Drives random increment requests, clears and random words (sparse words so
// that larger X values are reached), and compares X each clock with a
// reference model: X steps only when the low X bits of the word are all zero.
// A second phase feeds all-zero words so every request is accepted, and checks
// that X climbs one per clock to 63 and then stays there.
module tb_morris_counter;
  logic        clk = 1'b0;
  logic        rst_n, clr, inc;
  logic [63:0] rnd;
  logic [5:0]  x;
  int          checks = 0, failures = 0;
  int          n_accept = 0, n_reject = 0, n_sat = 0, n_clr = 0;

  always #5 clk = ~clk;

  morris_counter dut (.clk, .rst_n, .clr_i(clr), .inc_i(inc), .rnd_i(rnd), .x_o(x));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t x=%0d", what, $time, x);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  mx;
    bit  lowzero;
    rst_n = 1'b0; clr = 1'b0; inc = 1'b0; rnd = '1;
    @(posedge clk); #1;
    rst_n = 1'b1;
    mx = 0;
    check(x == 6'd0, "reset value");
    for (int i = 0; i < 5000; i++) begin
      inc = ($urandom % 4) != 0;
      clr = ($urandom % 400) == 0;
      rnd = {$urandom, $urandom};
      for (int k = 0; k < int'($urandom % 6); k++) rnd = rnd & {$urandom, $urandom};
      lowzero = 1'b1;
      for (int b = 0; b < mx; b++) if (rnd[b]) lowzero = 1'b0;
      @(posedge clk); #1;
      if (clr) begin mx = 0; n_clr++; end
      else if (inc && lowzero && mx < 63) begin mx++; n_accept++; end
      else if (inc) n_reject++;
      check(int'(x) == mx, "random phase");
    end
    // Always-accept phase: reaches the top and saturates.
    clr = 1'b1; inc = 1'b0;
    @(posedge clk); #1;
    clr = 1'b0; inc = 1'b1; rnd = '0; mx = 0;
    for (int i = 0; i < 80; i++) begin
      @(posedge clk); #1;
      if (mx < 63) mx++; else n_sat++;
      check(int'(x) == mx, "saturation phase");
    end
    check(n_accept > 50 && n_reject > 50 && n_sat > 0 && n_clr > 0, "all mechanisms seen");
    $display("accepted=%0d rejected=%0d saturated=%0d clears=%0d", n_accept, n_reject, n_sat, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
