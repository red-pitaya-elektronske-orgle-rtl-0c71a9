// note_step_rom_tb: phase increments of the 13 organ notes.
//
// The expected steps, round(f_note * 2^16 * 1024 / 50e6) for equal-tempered
// C4 .. C5, were worked out separately and are written out here. Out-of-range
// note numbers must give step 0 (silence).
module note_step_rom_tb;
  import organ_pkg::*;
  note_t note;
  logic [15:0] step;
  int checks = 0, failures = 0;

  localparam int EXPECTED [13] = '{351, 372, 394, 418, 442, 469, 497,
                                   526, 557, 591, 626, 663, 702};

  note_step_rom dut (.note, .step);

  initial begin
    for (int n = 0; n < 16; n++) begin
      note = note_t'(n);
      #1;
      checks++;
      if (int'(step) != (n < 13 ? EXPECTED[n] : 0)) begin
        failures++;
        $display("FAIL note %0d: step %0d", n, step);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
