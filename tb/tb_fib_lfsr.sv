// tb_fib_lfsr: self-checking test of fib_lfsr.
// Checks, clock by clock, an 8-bit LFSR (x^8+x^6+x^5+x^4+1) stepped once and
// eight times per clock, and the default 64-bit LFSR, against a bit-serial
// reference model written with explicit tap positions. Also checks that the
// 8-bit register has the full period of 255 states and never reaches zero.
module tb_fib_lfsr;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [7:0]  r8a, r8b;
  logic [63:0] r64;

  fib_lfsr #(.W(8), .TAPS(8'hB8), .STEPS(1), .SEED(8'h01)) u_a (.clk, .rst_n, .rnd_o(r8a));
  fib_lfsr #(.W(8), .TAPS(8'hB8), .STEPS(8), .SEED(8'h5A)) u_b (.clk, .rst_n, .rnd_o(r8b));
  fib_lfsr u_c (.clk, .rst_n, .rnd_o(r64));

  function automatic logic [7:0] step8(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [63:0] step64(input logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  ma, mb;
    logic [63:0] mc;
    int          period;
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    ma = 8'h01; mb = 8'h5A; mc = 64'h9E37_79B9_7F4A_7C15;
    check(r8a == ma && r8b == mb && r64 == mc, "seed load");
    period = 0;
    for (int i = 1; i <= 600; i++) begin
      @(posedge clk); #1;
      ma = step8(ma);
      for (int k = 0; k < 8; k++) mb = step8(mb);
      for (int k = 0; k < 64; k++) mc = step64(mc);
      check(r8a == ma, "8-bit single step");
      check(r8b == mb, "8-bit eight steps");
      check(r64 == mc, "64-bit word step");
      check(r8a != 8'h00 && r64 != 64'h0, "non-zero state");
      if (period == 0 && r8a == 8'h01) period = i;
    end
    check(period == 255, "8-bit period is 255");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
