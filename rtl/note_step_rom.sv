// note_step_rom: phase increment of the oscillator for each organ note.
//
// The oscillator's frequency is f = f_s * step / 2^ACC_W with the sampling
// rate f_s = CLK_HZ / SAMPLE_DIV. For note n (0 = C4 = 261.626 Hz, one
// equal-tempered semitone per step, up to C5) this table holds
//   step(n) = round(261.6256 * 2^(n/12) * 2^ACC_W / f_s),
// worked out while the design is elaborated. The read is combinational.
// With the defaults (50 MHz clock, f_s = 48.83 kHz, 16-bit accumulator) the
// frequency resolution is 0.75 Hz, and A4 gets step 591, i.e. 440.3 Hz.
//
// That a note sets the oscillator's phase increment follows the document;
// the tuning, the note range and all the numbers here are this design's own.
//
// Ports: note (index), step (phase increment for the oscillator).
module note_step_rom
  import organ_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,  // system clock
  parameter int unsigned SAMPLE_DIV = 1024,        // clocks per sample
  parameter int unsigned ACC_W      = 16           // accumulator width
) (
  input  note_t             note,
  output logic [ACC_W-1:0]  step
);

  localparam real C4_HZ    = 261.6255653005986;
  localparam real SEMITONE = 1.0594630943592953;   // 2^(1/12)

  typedef logic [ACC_W-1:0] step_table_t [NUM_NOTES];

  function automatic step_table_t make_table();
    step_table_t t;
    real f, fs, scale;
    fs    = real'(CLK_HZ) / real'(SAMPLE_DIV);
    scale = 2.0 ** ACC_W;
    f     = C4_HZ;
    for (int n = 0; n < NUM_NOTES; n++) begin
      t[n] = ACC_W'($rtoi(f * scale / fs + 0.5));
      f    = f * SEMITONE;
    end
    return t;
  endfunction

  localparam step_table_t STEPS = make_table();

  assign step = (note < note_t'(NUM_NOTES)) ? STEPS[note] : '0;

endmodule
