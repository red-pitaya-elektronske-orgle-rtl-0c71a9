// freq_divider_tb: divides a 50 Hz clock by 12 and by 13.
//
// Checks the count sequence of both dividers against a reference counter,
// that tc is high exactly at M-1, that msb is the counter's top bit, and the
// output frequencies over 12 s of 50 Hz input: 50 periods (4.17 Hz) for
// M = 12 and 46 whole periods (3.85 Hz) for M = 13.
module freq_divider_tb;
  timeunit 1ms; timeprecision 1us;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] c12, c13;
  logic tc12, tc13, msb12, msb13;
  int checks = 0, failures = 0;
  int ref12, ref13, n12, n13;

  always #10 clk = ~clk;   // 20 ms period: 50 Hz

  freq_divider #(.M(12)) dut12 (.clk, .rst, .count(c12), .tc(tc12), .msb(msb12));
  freq_divider #(.M(13)) dut13 (.clk, .rst, .count(c13), .tc(tc13), .msb(msb13));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    ref12 = 0; ref13 = 0; n12 = 0; n13 = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // 600 clocks = 12 s of a 50 Hz clock.
    repeat (600) begin
      @(negedge clk);
      check(int'(c12) == ref12, "count M=12");
      check(int'(c13) == ref13, "count M=13");
      check(tc12 == (ref12 == 11), "tc M=12");
      check(tc13 == (ref13 == 12), "tc M=13");
      check(msb12 == (ref12 >= 8), "msb M=12");
      check(msb13 == (ref13 >= 8), "msb M=13");
      if (tc12) n12++;
      if (tc13) n13++;
      ref12 = (ref12 + 1) % 12;
      ref13 = (ref13 + 1) % 13;
    end
    check(n12 == 50, "50 output periods in 12 s for M=12 (4.17 Hz)");
    check(n13 == 46, "46 output periods in 12 s for M=13 (3.85 Hz)");
    $display("M=12: %0d periods in 12 s, M=13: %0d periods in 12 s", n12, n13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
