// tb_event_selector: self-checking test of event_selector.
// Writes random selector masks (including none and all events), drives random
// event vectors and checks the register value and the increment request
// against a reference model; also checks reset and that writes are ignored
// without the write enable.
module tb_event_selector;
  logic        clk = 1'b0;
  logic        rst_n, we, inc;
  logic [11:0] wdata, events, sel;
  logic [11:0] msel;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  event_selector dut (.clk, .rst_n, .we_i(we), .wdata_i(wdata), .events_i(events), .sel_o(sel), .inc_o(inc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t sel=%h ev=%h inc=%b", what, $time, sel, events, inc);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_inc;
    rst_n = 1'b0; we = 1'b0; wdata = '1; events = '1;
    @(posedge clk); #1;
    rst_n = 1'b1;
    msel = '0;
    check(sel == 12'h000 && inc == 1'b0, "reset selects nothing");
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 8) == 0;
      case ($urandom % 4)
        0: wdata = 12'(1 << ($urandom % 12));
        1: wdata = 12'($urandom);
        2: wdata = '0;
        default: wdata = '1;
      endcase
      @(posedge clk); #1;
      if (we) msel = wdata;
      we = 1'b0;
      events = 12'($urandom) & 12'($urandom);
      #1;
      exp_inc = 1'b0;
      for (int b = 0; b < 12; b++) if (msel[b] && events[b]) exp_inc = 1'b1;
      check(sel == msel, "register");
      check(inc == exp_inc, "increment request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
