// organ_top: electronic organ on an FPGA, played from a PS/2 keyboard.
//
// Signal path:
//   PS/2 lines -> ps2_sync (synchroniser, falling-edge detector)
//              -> ps2_rx (frame receiver ASM) -> key_decoder (scan code to
//              note, make/break) -> note_step_rom (note to phase increment)
//              -> nco (phase increment register, phase accumulator)
//              -> sine_rom (64 x 8-bit sine table) -> sample output.
// A freq_divider, a modulo-SAMPLE_DIV counter, makes the sampling clock of the
// oscillator: its terminal count is a one-clock enable every SAMPLE_DIV
// system clocks (48.83 kHz from the board's 50 MHz clock). The signed 8-bit
// sample is registered on each sampling tick, and is 0 while no organ key is
// held; sample_valid marks the ticks for the digital-to-analog converter,
// which lies outside this design. tone_sq is the accumulator's top bit, the
// square wave of the same note, gated the same way. The VGA graphics the
// organ also has are not part of this RTL.
//
// The tone generator (divider, oscillator, sine table) and the PS/2 path
// follow the document; the key layout, tuning, sampling rate, accumulator
// width and the gating of the output are this design's own choices.
//
// Ports: clk (50 MHz), rst (synchronous, active high); ps2_clk, ps2_data
// (keyboard lines, asynchronous); sample / sample_valid to the DAC; tone_sq;
// key_on, note, key_make / key_break (1-cycle strobes); rx_data / rx_valid / rx_parity_ok / rx_frame_err show what
// the PS/2 receiver got.
module organ_top
  import organ_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,  // system clock
  parameter int unsigned SAMPLE_DIV = 1024,        // clocks per audio sample
  parameter int unsigned ACC_W      = 16,          // phase accumulator width
  parameter int unsigned ROM_ADDR_W = 6,           // sine table: 64 entries
  parameter int unsigned SAMPLE_W   = 8            // sine table: 8 bits
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ps2_clk,
  input  logic                       ps2_data,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       sample_valid,
  output logic                       tone_sq,
  output logic                       key_on,
  output note_t                      note,
  output logic                       key_make,
  output logic                       key_break,
  output logic [7:0]                 rx_data,
  output logic                       rx_valid,
  output logic                       rx_parity_ok,
  output logic                       rx_frame_err
);

  // PS/2 keyboard path.
  logic psd, psfall;

  ps2_sync u_sync (
    .clk, .rst, .psdata(ps2_data), .psclk(ps2_clk), .psd, .psfall
  );

  ps2_rx u_rx (
    .clk, .rst, .psd, .psfall,
    .data(rx_data), .valid(rx_valid), .parity_ok(rx_parity_ok),
    .frame_err(rx_frame_err)
  );

  key_decoder u_keys (
    .clk, .rst, .code(rx_data), .valid(rx_valid),
    .note, .key_on, .make(key_make), .brk(key_break)
  );

  // Tone generator.
  logic [ACC_W-1:0]      step;
  logic                  acc_msb;
  logic [ROM_ADDR_W-1:0] rom_adr;
  logic signed [SAMPLE_W-1:0] rom_data;
  logic                  fs_tick;

  note_step_rom #(
    .CLK_HZ(CLK_HZ), .SAMPLE_DIV(SAMPLE_DIV), .ACC_W(ACC_W)
  ) u_steps (
    .note, .step
  );

  freq_divider #(.M(SAMPLE_DIV)) u_fs (
    .clk, .rst, .count(), .tc(fs_tick), .msb()
  );

  nco #(.N(ACC_W), .ADDR_W(ROM_ADDR_W)) u_nco (
    .clk, .rst,
    .step_we(1'b1), .step_in(step),
    .sample_en(fs_tick),
    .phase(), .msb(acc_msb), .adr(rom_adr)
  );

  sine_rom #(.ADDR_W(ROM_ADDR_W), .DATA_W(SAMPLE_W)) u_sine (
    .adr(rom_adr), .data(rom_data)
  );

  // Output register: one sample per sampling tick, silent with no key held.
  always_ff @(posedge clk) begin
    if (rst) begin
      sample       <= '0;
      tone_sq      <= 1'b0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= fs_tick;
      if (fs_tick) begin
        sample  <= key_on ? rom_data : '0;
        tone_sq <= key_on & acc_msb;
      end
    end
  end

endmodule
