// nco_tb: the two oscillators of the divider-versus-oscillator comparison.
//
// With a 50 Hz sampling clock, a 6-bit accumulator and step 5 must give
// 3.906 Hz (5 overflows in 64 samples), and a 10-bit accumulator with step
// 82 must give 4.004 Hz (82 overflows in 1024 samples). The phase of both is
// checked every cycle against a reference model, as are msb and the sine
// table address (top 6 bits). Then the 10-bit one is checked for holding its
// phase while sample_en is low, and for the one-cycle latency of a new step.
module nco_tb;
  timeunit 1ms; timeprecision 1us;
  logic clk = 1'b0, rst = 1'b1;
  logic        we6, we10, en6, en10;
  logic [5:0]  step6;
  logic [9:0]  step10;
  logic [5:0]  ph6, adr6;
  logic [9:0]  ph10;
  logic [5:0]  adr10;
  logic        msb6, msb10;
  int checks = 0, failures = 0;
  int ref6, ref10, st6, st10, wraps6, wraps10;

  always #10 clk = ~clk;   // 50 Hz

  nco #(.N(6),  .ADDR_W(6)) dut6  (.clk, .rst, .step_we(we6), .step_in(step6),
                                   .sample_en(en6), .phase(ph6), .msb(msb6), .adr(adr6));
  nco #(.N(10), .ADDR_W(6)) dut10 (.clk, .rst, .step_we(we10), .step_in(step10),
                                   .sample_en(en10), .phase(ph10), .msb(msb10), .adr(adr10));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    we6 = 0; we10 = 0; en6 = 0; en10 = 0; step6 = 0; step10 = 0;
    ref6 = 0; ref10 = 0; wraps6 = 0; wraps10 = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // Load the steps.
    @(negedge clk);
    we6 = 1; step6 = 6'd5; we10 = 1; step10 = 10'd82;
    @(negedge clk);
    we6 = 0; we10 = 0; en6 = 1; en10 = 1;
    st6 = 5; st10 = 82;
    // 1024 samples.
    repeat (1024) begin
      @(negedge clk);
      if (ref6 + st6 >= 64) wraps6++;
      if (ref10 + st10 >= 1024) wraps10++;
      ref6 = (ref6 + st6) % 64;
      ref10 = (ref10 + st10) % 1024;
      check(int'(ph6) == ref6, "phase N=6");
      check(int'(ph10) == ref10, "phase N=10");
      check(msb6 == ph6[5] && adr6 == ph6, "msb/adr N=6");
      check(msb10 == ph10[9] && adr10 == ph10[9:4], "msb/adr N=10");
    end
    // 1024 samples at 50 Hz = 20.48 s.
    check(wraps6 == 80, "N=6 step 5: 80 periods in 1024 samples (3.906 Hz)");
    check(wraps10 == 82, "N=10 step 82: 82 periods in 1024 samples (4.004 Hz)");
    $display("N=6: %0d periods, N=10: %0d periods in 20.48 s", wraps6, wraps10);
    // Hold while the sampling enable is low.
    en10 = 0;
    repeat (5) @(negedge clk);
    check(int'(ph10) == ref10, "phase holds without sample_en");
    // A new step is used from the next sample on.
    we10 = 1; step10 = 10'd3; en10 = 1;
    @(negedge clk);
    ref10 = (ref10 + 82) % 1024;       // old step still used this cycle
    check(int'(ph10) == ref10, "old step in the write cycle");
    we10 = 0;
    @(negedge clk);
    ref10 = (ref10 + 3) % 1024;
    check(int'(ph10) == ref10, "new step after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
