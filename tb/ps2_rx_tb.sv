// ps2_rx_tb: frame reception by the PS/2 receiver state machine.
//
// psd and psfall are driven directly, one bit per psfall pulse, with a few
// idle clocks between bits. Checked: random bytes with correct odd parity
// arrive on data with a one-clock valid exactly two clocks after the stop
// bit's psfall, with parity_ok set; a wrong parity bit still delivers the byte
// but clears parity_ok; a frame with a bad stop bit is rejected (frame_err,
// no valid, data unchanged); a psfall with psd = 1 while idle is not taken as
// a start bit.
module ps2_rx_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic psd, psfall;
  logic [7:0] data;
  logic valid, parity_ok, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;

  always #5 clk = ~clk;

  ps2_rx dut (.clk, .rst, .psd, .psfall, .data, .valid, .parity_ok, .frame_err);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  // Count strobes everywhere, to catch strobes at the wrong time.
  always @(posedge clk) begin
    if (!rst && valid) n_valid++;
    if (!rst && frame_err) n_ferr++;
  end

  task automatic bit_out(logic b);
    psd = b;
    @(negedge clk);
    psfall = 1'b1;
    @(negedge clk);
    psfall = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  // Sends start, d[0..7], parity, stop; then checks the outcome.
  task automatic frame(logic [7:0] d, logic par, logic stop, logic start = 1'b0);
    logic [7:0] data_old;
    int nv, nf;
    data_old = data;
    nv = n_valid; nf = n_ferr;
    bit_out(start);
    for (int i = 0; i < 8; i++) bit_out(d[i]);
    bit_out(par);
    // Stop bit, with the exact latency check.
    psd = stop;
    @(negedge clk);
    psfall = 1'b1;
    @(negedge clk);
    psfall = 1'b0;
    check(valid == 1'b0 && frame_err == 1'b0, "no strobe one clock after stop");
    @(negedge clk);
    if (stop && !start) begin
      check(valid == 1'b1, "valid two clocks after stop");
      check(data == d, "data byte");
      check(parity_ok == (^{d, par}), "parity_ok");
    end else begin
      check(valid == 1'b0, "no valid for a bad frame");
      check(frame_err == 1'b1, "frame_err for a bad frame");
      check(data == data_old, "data kept for a bad frame");
    end
    repeat (4) @(negedge clk);
    check(n_valid - nv == ((stop && !start) ? 1 : 0), "number of valid strobes");
    check(n_ferr - nf == ((stop && !start) ? 0 : 1), "number of frame_err strobes");
  endtask

  initial begin
    logic [7:0] d;
    psd = 1'b1; psfall = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    // The byte the keyboard sends data_old a released key's code.
    frame(8'hF0, ~^8'hF0, 1'b1);
    for (int k = 0; k < 40; k++) begin
      d = 8'($urandom);
      frame(d, ~^d, 1'b1);                 // good frame
    end
    frame(8'h1C, ^8'h1C, 1'b1);           // wrong parity: delivered, flagged
    frame(8'h5A, ~^8'h5A, 1'b0);          // bad stop bit: rejected
    // A psfall with psd = 1 in idle must not start a frame.
    bit_out(1'b1);
    check(n_valid == 42 && n_ferr == 1, "idle edge with psd = 1 ignored");
    frame(8'h3B, ~^8'h3B, 1'b1);
    check(n_valid == 43, "receiver works after the ignored edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
