// ps2_sync_tb: falling-edge detection and data synchronisation.
//
// The PS/2 clock is driven with random high and low times of 1 to 6 system
// clocks. Every falling edge must give exactly one psfall pulse, one clock
// wide, seen on the second falling system-clock edge after the PS/2 clock
// changed (two flip-flop stages); rising edges give none. psd must follow
// psdata one clock later.
module ps2_sync_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic psdata, psclk, psd, psfall;
  int checks = 0, failures = 0;
  int falls = 0, pulses = 0;
  logic expect_q [$];     // expected psfall, one entry per clock

  always #5 clk = ~clk;

  ps2_sync dut (.clk, .rst, .psdata, .psclk, .psd, .psfall);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    logic level;
    int len;
    psclk = 1'b1; psdata = 1'b1; level = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Reset must not produce an edge.
    repeat (3) begin
      @(negedge clk);
      check(psfall == 1'b0, "no psfall after reset");
    end
    // Two clocks of pipeline: nothing expected for the first two entries.
    expect_q.push_back(1'b0);
    repeat (400) begin
      len = 1 + $urandom_range(5);
      level = ~level;
      if (!level) falls++;
      for (int i = 0; i < len; i++) begin
        psclk  = level;
        psdata = 1'($urandom);
        // psfall appears two negedges after the negedge where psclk fell.
        expect_q.push_back(!level && i == 0);
        @(negedge clk);
        check(psd == psdata, "psd follows psdata");
        check(psfall == expect_q.pop_front(), "psfall timing");
        if (psfall) pulses++;
      end
    end
    check(pulses == falls, "one psfall per falling edge");
    $display("%0d falling edges, %0d psfall pulses", falls, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
