// sine_rom: sine wave look-up table of the numerically controlled oscillator.
//
// Entry i holds 127 * sin(2*pi*i/DEPTH) as a signed 8-bit number, rounded to
// the nearest integer, so one pass through the addresses gives one period of
// the sine. The table is worked out while the design is elaborated, from
// that formula, and read as an asynchronous ROM: data follows adr in the same
// cycle, with no clock. The size (64 entries of 8 bits), the amplitude 127
// and the combinational read follow the document; rounding to nearest is how
// its conversion of the real value to an integer behaves.
//
// Ports: adr (ADDR_W bits, phase), data (DATA_W-bit signed sample).
module sine_rom #(
  parameter int unsigned ADDR_W = 6,   // 64 entries
  parameter int unsigned DATA_W = 8,   // signed samples
  parameter int          AMPL   = 127  // peak value
) (
  input  logic        [ADDR_W-1:0] adr,
  output logic signed [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      real v;
      v = real'(AMPL) * $sin(real'(i) * 2.0 * PI / real'(DEPTH));
      t[i] = DATA_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
    end
    return t;
  endfunction

  localparam table_t SINE = make_table();

  assign data = SINE[adr];

endmodule
