// ps2_rx: receiver for the frames a PS/2 keyboard sends.
//
// A frame is 11 bits, each valid on a falling edge of the PS/2 clock: a start
// bit 0, eight data bits from LSB to MSB, an odd-parity bit and a stop bit 1.
// Every falling edge (psfall from ps2_sync) shifts the data line psd into the
// top of an 11-bit shift register w, so after a whole frame w[0] holds the
// start bit, w[8:1] the data byte, w[9] the parity bit and w[10] the stop bit.
//
// An algorithmic state machine with three states controls the reception:
//   mir    (idle)     clears the bit counter b; a falling edge with psd = 0
//                     (the start bit) moves it to pomik.
//   pomik  (shift)    counts falling edges in b; the edge that arrives with
//                     b = 9 (the stop bit) moves it to prenos, the others
//                     increment b.
//   prenos (transfer) if w[0] = 0 and w[10] = 1 the byte w[8:1] is copied to
//                     data; then back to mir.
// States, counter, tests and transfer follow the document's ASM chart, which
// checks the start and stop bits only. The valid strobe that tells the next
// block a byte arrived, the frame_err strobe for a frame whose start or stop
// bit is wrong, the parity_ok flag (odd parity over w[9:1], reported with
// each byte but not used to reject it, as in the chart) and the
// synchronous reset are this design's additions.
//
// Ports: clk, rst; psd, psfall from ps2_sync; data (last good byte),
// valid (1-cycle strobe with a new byte), parity_ok (for that byte),
// frame_err (1-cycle strobe for a rejected frame).
// Timing: valid rises 2 clocks after the psfall of the stop bit.
module ps2_rx
  import organ_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       psd,
  input  logic       psfall,
  output logic [7:0] data,
  output logic       valid,
  output logic       parity_ok,
  output logic       frame_err
);

  ps2_state_t state;
  logic [3:0]                  b;   // bit counter
  logic [PS2_FRAME_BITS-1:0]   w;   // frame shift register
  logic                        frame_ok;

  // Shift register: the newest bit enters at the top.
  always_ff @(posedge clk) begin
    if (rst)         w <= '1;
    else if (psfall) w <= {psd, w[PS2_FRAME_BITS-1:1]};
  end

  assign frame_ok = (w[0] == 1'b0) && (w[PS2_FRAME_BITS-1] == 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= PS2_MIR;
      b         <= '0;
      data      <= '0;
      valid     <= 1'b0;
      parity_ok <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        PS2_MIR: begin
          b <= '0;
          if (psfall && !psd) state <= PS2_POMIK;
        end
        PS2_POMIK: begin
          if (psfall) begin
            if (b == 4'd9) state <= PS2_PRENOS;
            else           b     <= b + 1'b1;
          end
        end
        PS2_PRENOS: begin
          if (frame_ok) begin
            data      <= w[8:1];
            valid     <= 1'b1;
            parity_ok <= ^w[9:1];
          end else begin
            frame_err <= 1'b1;
          end
          state <= PS2_MIR;
        end
        default: state <= PS2_MIR;
      endcase
    end
  end

  // Protocol checks: the bit counter never passes the stop bit, and a byte
  // is only handed on from the transfer state.
  ps2_state_t state_d1;
  always_ff @(posedge clk) begin
    state_d1 <= state;
    if (!rst) begin
      a_b_range: assert (b <= 4'd9) else $error("ps2_rx: bit counter out of range");
      a_valid_src: assert (!valid || state_d1 == PS2_PRENOS)
        else $error("ps2_rx: valid outside the transfer state");
    end
  end

endmodule
