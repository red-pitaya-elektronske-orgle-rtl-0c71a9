// key_decoder_tb: make and break codes to note and key_on.
//
// Expected scan codes are written out here from the PS/2 keyboard chart:
// A W S E D F T G Y H U J K play C4 .. C5. Checked: each key's make code
// selects its note, its break code (F0 prefix) releases it; a second key
// pressed while the first is held takes over, and releasing the first then
// changes nothing; other keys, extended (E0) codes and repeated make codes
// behave as described in the module.
module key_decoder_tb;
  import organ_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] code;
  logic valid;
  note_t note;
  logic key_on, make, brk;
  int checks = 0, failures = 0;
  int n_make = 0, n_brk = 0;

  localparam logic [7:0] KEYS [13] = '{8'h1C, 8'h1D, 8'h1B, 8'h24, 8'h23, 8'h2B,
                                       8'h2C, 8'h34, 8'h35, 8'h33, 8'h3C, 8'h3B, 8'h42};

  always #5 clk = ~clk;

  key_decoder dut (.clk, .rst, .code, .valid, .note, .key_on, .make, .brk);

  always @(posedge clk) begin
    if (!rst && make) n_make++;
    if (!rst && brk)  n_brk++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  task automatic send(logic [7:0] c);
    code = c; valid = 1'b1;
    @(negedge clk);
    valid = 1'b0; code = 8'h00;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_state(logic on, int n, string what);
    check(key_on == on, {what, ": key_on"});
    if (on) check(int'(note) == n, {what, ": note"});
  endtask

  initial begin
    code = 8'h00; valid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_state(1'b0, 0, "after reset");
    // Every organ key, pressed and released.
    for (int k = 0; k < 13; k++) begin
      // Latency: key_on is set one clock after valid.
      code = KEYS[k]; valid = 1'b1;
      @(negedge clk);
      valid = 1'b0;
      expect_state(1'b1, k, "make");
      check(make == 1'b1, "make strobe");
      repeat (3) @(negedge clk);
      send(KEYS[k]);                         // typematic repeat
      expect_state(1'b1, k, "repeat");
      send(SC_BREAK);
      expect_state(1'b1, k, "after F0 only");
      send(KEYS[k]);
      expect_state(1'b0, k, "break");
    end
    check(n_make == 26 && n_brk == 13, "make/break strobe counts");
    // Second key takes over; releasing the first does nothing.
    send(8'h42);                             // K: C5
    send(8'h33);                             // H: A4
    expect_state(1'b1, 9, "second key");
    send(SC_BREAK); send(8'h42);
    expect_state(1'b1, 9, "release of the silent key");
    send(SC_BREAK); send(8'h33);
    expect_state(1'b0, 0, "release of the sounding key");
    // A key that is not an organ key.
    send(8'h1A);                             // Z
    expect_state(1'b0, 0, "non-organ key");
    // Extended code E0 1C is not the A key.
    send(8'hE0); send(8'h1C);
    expect_state(1'b0, 0, "extended code ignored");
    // The prefixes are cleared after a code: a later 1C is a make again.
    send(8'h1C);
    expect_state(1'b1, 0, "make after extended code");
    // Extended break (E0 F0 1C) does not release A.
    send(8'hE0); send(SC_BREAK); send(8'h1C);
    expect_state(1'b1, 0, "extended break ignored");
    send(SC_BREAK); send(8'h1C);
    expect_state(1'b0, 0, "normal break");
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
