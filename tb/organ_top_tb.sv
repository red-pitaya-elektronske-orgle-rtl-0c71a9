// organ_top_tb: the whole organ at its default parameters, played from a
// simulated PS/2 keyboard.
//
// The keyboard model sends 11-bit frames (start, data LSB first, odd parity,
// stop) with a 12.5 kHz PS/2 clock, changing the data line while the clock is
// high. The test presses and releases keys and measures the tone: it finds
// the rising zero crossings of the sample stream and checks that the period
// matches the equal-tempered note (C4, A4, C5) to 0.5 %, that the samples
// reach +127 and -127, that they come every 1024 clocks, and that the output
// is 0 while no key is held.
//
// Each mechanism of the design is counted and must happen at least once:
// received bytes, key presses (make), releases (F0 break), a key taking over
// from a held one, a key outside the organ being ignored, a frame with a bad
// stop bit being rejected, a byte with a wrong parity bit being flagged, and
// silent sample ticks.
module organ_top_tb;
  import organ_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real CLK_NS  = 20.0;          // 50 MHz
  localparam real PS2_HALF = 40_000.0;     // 12.5 kHz PS/2 clock
  localparam real FS_HZ   = 50.0e6 / 1024.0;

  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk = 1'b1, ps2_data = 1'b1;
  logic signed [7:0] sample;
  logic sample_valid, tone_sq, key_on, key_make, key_break;
  note_t note;
  logic [7:0] rx_data;
  logic rx_valid, rx_parity_ok, rx_frame_err;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_bytes = 0, n_make = 0, n_break = 0, n_switch = 0, n_ignored = 0;
  int n_frame_err = 0, n_parity_flag = 0, n_silent = 0, n_ticks = 0;

  always #(CLK_NS / 2.0) clk = ~clk;

  organ_top dut (
    .clk, .rst, .ps2_clk, .ps2_data, .sample, .sample_valid, .tone_sq,
    .key_on, .note, .key_make, .key_break, .rx_data, .rx_valid,
    .rx_parity_ok, .rx_frame_err
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  // ---- Event counters and per-clock checks -------------------------------
  longint cyc = 0, last_tick = -1;
  note_t  note_q;
  logic   on_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (rx_valid) n_bytes++;
      if (rx_valid && !rx_parity_ok) n_parity_flag++;
      if (rx_frame_err) n_frame_err++;
      if (key_make) n_make++;
      if (key_make && on_q && note != note_q) n_switch++;
      if (key_break) n_break++;
      if (sample_valid) begin
        n_ticks++;
        if (last_tick >= 0) check(cyc - last_tick == 1024, "1024 clocks per sample");
        last_tick = cyc;
        if (!key_on && !on_q) begin
          check(sample == 0 && tone_sq == 1'b0, "silence with no key held");
          n_silent++;
        end
      end
      note_q <= note;
      on_q   <= key_on;
    end
  end

  // ---- PS/2 keyboard model ------------------------------------------------
  task automatic ps2_bit(logic b);
    ps2_data = b;
    #(PS2_HALF);
    ps2_clk = 1'b0;
    #(PS2_HALF);
    ps2_clk = 1'b1;
  endtask

  task automatic ps2_send(logic [7:0] d, logic good_stop = 1'b1, logic good_par = 1'b1);
    ps2_bit(1'b0);
    for (int i = 0; i < 8; i++) ps2_bit(d[i]);
    ps2_bit(good_par ? ~^d : ^d);
    ps2_bit(good_stop);
    ps2_data = 1'b1;
    #(PS2_HALF * 6.0);
  endtask

  // ---- Tone measurement ---------------------------------------------------
  // Over nsamp samples, the mean period between rising zero crossings.
  task automatic measure(int nsamp, real f_expect, string what);
    int idx = 0, first = -1, last = -1, ncross = 0;
    int smax = -200, smin = 200;
    logic signed [7:0] prev = 0;
    real period, f_meas;
    while (idx < nsamp) begin
      @(posedge clk);
      if (sample_valid) begin
        if (prev < 0 && sample >= 0) begin
          if (first < 0) first = idx;
          last = idx;
          ncross++;
        end
        if (int'(sample) > smax) smax = int'(sample);
        if (int'(sample) < smin) smin = int'(sample);
        prev = sample;
        idx++;
      end
    end
    check(ncross >= 3, {what, ": tone present"});
    if (ncross >= 3) begin
      period = real'(last - first) / real'(ncross - 1);
      f_meas = FS_HZ / period;
      $display("%s: %0d crossings, measured %.2f Hz, note %.2f Hz", what, ncross,
               f_meas, f_expect);
      check(f_meas > f_expect * 0.995 && f_meas < f_expect * 1.005,
            {what, ": frequency"});
    end
    check(smax == 127 && smin == -127, {what, ": amplitude"});
  endtask

  localparam real C4 = 261.6256, A4 = 440.0, C5 = 523.2511;

  initial begin
    #(CLK_NS * 10);
    @(negedge clk) rst = 1'b0;
    #(PS2_HALF * 4.0);
    check(!key_on, "silent after reset");

    // Press A: C4.
    ps2_send(8'h1C);
    #(CLK_NS * 10);
    check(key_on && note == 0 && rx_data == 8'h1C, "A pressed");
    measure(2048, C4, "C4");

    // Press H while A is held: A4 takes over.
    ps2_send(8'h33);
    #(CLK_NS * 10);
    check(key_on && note == 9, "H takes over");
    measure(2048, A4, "A4");

    // Release A (not sounding): nothing changes. Release H: silence.
    ps2_send(SC_BREAK); ps2_send(8'h1C);
    check(key_on && note == 9, "release of A leaves A4");
    ps2_send(SC_BREAK); ps2_send(8'h33);
    check(!key_on, "release of H silences");

    // Z is no organ key.
    begin
      int b0;
      b0 = n_bytes;
      ps2_send(8'h1A);
      check(n_bytes == b0 + 1 && !key_on && rx_data == 8'h1A, "Z ignored");
      if (n_bytes == b0 + 1 && !key_on) n_ignored++;
    end

    // K with a bad stop bit: rejected.
    ps2_send(8'h42, 1'b0);
    check(!key_on && rx_data == 8'h1A, "bad stop bit rejected");

    // K with a wrong parity bit: delivered, but flagged.
    ps2_send(8'h42, 1'b1, 1'b0);
    check(!rx_parity_ok && key_on && note == 12, "wrong parity flagged");
    measure(2048, C5, "C5");
    ps2_send(SC_BREAK); ps2_send(8'h42);
    check(!key_on, "K released");
    repeat (20 * 1024) @(posedge clk);

    $display("bytes=%0d make=%0d break=%0d switch=%0d ignored=%0d frame_err=%0d parity_flag=%0d silent_ticks=%0d ticks=%0d",
             n_bytes, n_make, n_break, n_switch, n_ignored, n_frame_err,
             n_parity_flag, n_silent, n_ticks);
    check(n_bytes == 10, "bytes received");
    check(n_make > 0, "key press happened");
    check(n_break > 0, "key release happened");
    check(n_switch > 0, "key take-over happened");
    check(n_ignored > 0, "foreign key happened");
    check(n_frame_err > 0, "frame rejection happened");
    check(n_parity_flag > 0, "parity flag happened");
    check(n_silent > 0, "silent ticks happened");
    check(n_ticks > 0, "sample ticks happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
