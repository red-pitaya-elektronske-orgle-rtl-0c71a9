// organ_pkg: types and constants shared by the FPGA electronic organ.
//
// Holds the PS/2 receiver state encoding, the PS/2 scan codes the organ
// reacts to, and the note count of its keyboard. The three receiver states
// and their names (mir = idle, pomik = shift, prenos = transfer) follow the
// receiver's ASM chart; their binary encoding is this design's choice. The
// scan codes are the standard PS/2 set-2 codes of the keys used; which keys
// play which notes is this design's choice.
package organ_pkg;

  // PS/2 receiver states.
  typedef enum logic [1:0] {
    PS2_MIR    = 2'd0,   // idle, waiting for the start bit
    PS2_POMIK  = 2'd1,   // shifting in the remaining ten bits
    PS2_PRENOS = 2'd2    // checking the frame and passing the byte on
  } ps2_state_t;

  // Number of bits in one PS/2 frame: start, 8 data, parity, stop.
  localparam int unsigned PS2_FRAME_BITS = 11;

  // Prefix byte the keyboard sends before the code of a released key.
  localparam logic [7:0] SC_BREAK = 8'hF0;

  // Organ keyboard: one octave and one note, C4 .. C5, on the home row
  // (white keys) and the row above it (black keys).
  localparam int unsigned NUM_NOTES = 13;
  typedef logic [3:0] note_t;

  localparam logic [7:0] NOTE_SCANCODE [NUM_NOTES] = '{
    8'h1C,  //  0 C4   A
    8'h1D,  //  1 C#4  W
    8'h1B,  //  2 D4   S
    8'h24,  //  3 D#4  E
    8'h23,  //  4 E4   D
    8'h2B,  //  5 F4   F
    8'h2C,  //  6 F#4  T
    8'h34,  //  7 G4   G
    8'h35,  //  8 G#4  Y
    8'h33,  //  9 A4   H
    8'h3C,  // 10 A#4  U
    8'h3B,  // 11 B4   J
    8'h42   // 12 C5   K
  };

endpackage
