// tb_random_prob_gen: self-checking test of random_prob_gen.
// Checks that each of the five sources starts from its own seed
// (0x9E3779B97F4A7C15 * (k+1)), advances by 64 LFSR steps per clock as a
// bit-serial reference model does, and that no two sources ever give the same
// word.
module tb_random_prob_gen;
  localparam int N = 5;
  logic               clk = 1'b0;
  logic               rst_n;
  logic [N-1:0][63:0] rnd;
  logic [63:0]        m [N];
  int                 checks = 0, failures = 0;

  always #5 clk = ~clk;

  random_prob_gen dut (.clk, .rst_n, .rnd_o(rnd));

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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit distinct;
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int k = 0; k < N; k++) m[k] = 64'h9E37_79B9_7F4A_7C15 * 64'(k + 1);
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < N; k++) check(rnd[k] == m[k], "source word");
      distinct = 1;
      for (int a = 0; a < N; a++) for (int b = a + 1; b < N; b++) if (rnd[a] == rnd[b]) distinct = 0;
      check(distinct, "sources differ");
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) for (int s = 0; s < 64; s++) m[k] = step64(m[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
