// tb_prob_gate: self-checking test of prob_gate.
// Drives every X from 0 to 63 with random words and words built to have a
// single set bit just inside or just outside the low X bits, and compares the
// output with a bit-by-bit reference. Also checks that the measured hit rate
// for small X is close to 1/2^X.
module tb_prob_gate;
  logic [5:0]  x;
  logic [63:0] rnd;
  logic        hit;
  int          checks = 0, failures = 0;

  prob_gate dut (.x_i(x), .rnd_i(rnd), .hit_o(hit));

  function automatic logic ref_hit(input int xv, input logic [63:0] r);
    for (int b = 0; b < xv; b++) if (r[b]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d rnd=%h hit=%b", what, x, rnd, hit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    for (int xv = 0; xv < 64; xv++) begin
      x = 6'(xv);
      for (int t = 0; t < 40; t++) begin
        rnd = {$urandom, $urandom};
        // Sparse words make hits likely even for larger X.
        if (t % 2 == 1) rnd = rnd & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        if (t == 0) rnd = '0;
        if (t == 1 && xv > 0) rnd = 64'(1) << (xv - 1);
        if (t == 2 && xv < 64) rnd = 64'(1) << xv;
        #1;
        check(hit == ref_hit(xv, rnd), "gate output");
      end
    end
    // Rate check: hits / trials within a few standard deviations of 1/2^X.
    for (int xv = 0; xv <= 4; xv++) begin
      x = 6'(xv);
      hits = 0;
      for (int t = 0; t < 4096; t++) begin
        rnd = {$urandom, $urandom};
        #1;
        if (hit) hits++;
      end
      check(hits > (4096 >> xv) * 8 / 10 && hits < (4096 >> xv) * 12 / 10 + 5, "hit rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
