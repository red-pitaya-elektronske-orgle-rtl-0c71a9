// nco: numerically controlled oscillator (phase increment register plus
// phase accumulator).
//
// The phase increment register holds the step (delta f); on every sampling
// tick the N-bit phase accumulator adds the step to itself and wraps modulo
// 2^N. The accumulator therefore overflows f_s * step / 2^N times a second,
// which is the output frequency: a 50 Hz sampling clock gives 3.906 Hz with
// N = 6 and step 5, and 4.004 Hz with N = 10 and step 82. The top bit of the
// accumulator is a square wave of that frequency; its top ADDR_W bits are the
// phase that addresses the sine look-up table.
//
// The register, the adder, the accumulator, the use of the top bit(s) and the
// sampling clock follow the document. The sampling clock is a clock enable
// (sample_en) here rather than a separate clock, and the register is loaded
// through step_we; both, and the synchronous reset, are this design's
// choices.
//
// Ports: clk, rst; step_we/step_in load the increment register;
// sample_en advances the accumulator; phase (whole accumulator), msb, adr.
// Timing: a step written in cycle t is first added at a tick in cycle t+1.
module nco #(
  parameter int unsigned N      = 10,  // accumulator width
  parameter int unsigned ADDR_W = 6    // bits passed to the sine table
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step_we,
  input  logic [N-1:0]      step_in,
  input  logic              sample_en,
  output logic [N-1:0]      phase,
  output logic              msb,
  output logic [ADDR_W-1:0] adr
);

  logic [N-1:0] step_q;

  always_ff @(posedge clk) begin
    if (rst)          step_q <= '0;
    else if (step_we) step_q <= step_in;
  end

  always_ff @(posedge clk) begin
    if (rst)            phase <= '0;
    else if (sample_en) phase <= phase + step_q;
  end

  assign msb = phase[N-1];
  assign adr = phase[N-1 -: ADDR_W];

  initial assert (N >= ADDR_W) else $error("nco: N must be at least ADDR_W");

endmodule
