// key_decoder: turns the keyboard's scan codes into the note the organ plays.
//
// A PS/2 keyboard sends a key's scan code when the key goes down (make) and
// the prefix F0 followed by the same code when it comes up (break); some keys
// carry the prefix E0 as well. Each byte from the receiver (code, valid) is
// handled as follows:
//   F0            remember that the next code is a break;
//   E0            remember that the next code is an extended key;
//   other codes   look the code up in organ_pkg::NOTE_SCANCODE. A make code
//                 of an organ key selects that note and sets key_on; a break
//                 code of the note that is sounding clears key_on. Extended
//                 keys and keys that are not organ keys are ignored. Both
//                 remembered prefixes are then cleared.
// The organ is monophonic: the key pressed last sounds, and releasing a key
// that no longer sounds changes nothing. Held keys repeat their make code,
// which reselects the same note.
//
// The scan codes come from the standard PS/2 keyboard code chart; the F0
// break prefix and E0 extension are standard PS/2 behaviour. The choice of
// keys, the monophonic rule and the synchronous reset are this design's own.
//
// Ports: clk, rst; code/valid from ps2_rx; note, key_on; make/brk are
// 1-cycle strobes for a recognised organ key press/release.
// Timing: note and key_on change 1 clock after valid.
module key_decoder
  import organ_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] code,
  input  logic       valid,
  output note_t      note,
  output logic       key_on,
  output logic       make,
  output logic       brk
);

  logic  break_pending, ext_pending;
  logic  hit;
  note_t hit_note;

  always_comb begin
    hit      = 1'b0;
    hit_note = '0;
    for (int i = 0; i < NUM_NOTES; i++) begin
      if (code == NOTE_SCANCODE[i]) begin
        hit      = 1'b1;
        hit_note = note_t'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      break_pending <= 1'b0;
      ext_pending   <= 1'b0;
      note          <= '0;
      key_on        <= 1'b0;
      make          <= 1'b0;
      brk           <= 1'b0;
    end else begin
      make <= 1'b0;
      brk  <= 1'b0;
      if (valid) begin
        if (code == SC_BREAK) begin
          break_pending <= 1'b1;
        end else if (code == 8'hE0) begin
          ext_pending <= 1'b1;
        end else begin
          break_pending <= 1'b0;
          ext_pending   <= 1'b0;
          if (hit && !ext_pending) begin
            if (break_pending) begin
              if (key_on && note == hit_note) begin
                key_on <= 1'b0;
                brk    <= 1'b1;
              end
            end else begin
              note   <= hit_note;
              key_on <= 1'b1;
              make   <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
