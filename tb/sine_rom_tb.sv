// sine_rom_tb: checks every entry of the 64 x 8-bit sine table.
//
// The expected values are a hand-written first quarter of
// round(127 * sin(2*pi*i/64)), i = 0..16, extended to the whole period with
// the sine's symmetries: s(32 - i) = s(i) and s(32 + i) = -s(i).
module sine_rom_tb;
  logic        [5:0] adr;
  logic signed [7:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.adr, .data);

  localparam int QUARTER [17] = '{0, 12, 25, 37, 49, 60, 71, 81, 90, 98,
                                  106, 112, 117, 122, 125, 126, 127};

  function automatic int expected(int i);
    if (i <= 16)      return QUARTER[i];
    else if (i <= 32) return QUARTER[32 - i];
    else              return -expected(i - 32);
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) begin
      adr = 6'(i);
      #1;
      checks++;
      if (int'(data) != expected(i)) begin
        failures++;
        $display("FAIL adr=%0d data=%0d expected=%0d", i, data, expected(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
