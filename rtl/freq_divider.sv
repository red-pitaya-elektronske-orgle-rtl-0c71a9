// freq_divider: frequency divider built as a modulo-M counter.
//
// The counter runs 0, 1, ..., M-1, 0, ... on every clock edge, so it rolls
// over once every M clocks and both outputs have the frequency f_clk / M.
// Two outputs are offered, as the document suggests: tc, the terminal count,
// is high for one clock when the counter holds M-1 (useful as a clock
// enable), and msb is the counter's top bit, a square-ish wave that is high
// while the count is 2^(W-1) or more. With M = 12 and a 50 Hz clock the
// output is 4.17 Hz; with M = 13 it is 3.85 Hz.
//
// The counter, its modulus and the two output choices follow the document.
// The synchronous, active-high reset to zero is this design's choice.
//
// Ports: clk, rst; count (current value), tc (terminal count), msb.
// Timing: count changes on the rising edge; tc and msb are decoded from it.
module freq_divider #(
  parameter int unsigned M = 12,                        // modulus
  localparam int unsigned W = (M > 2) ? $clog2(M) : 1   // counter width
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] count,
  output logic         tc,
  output logic         msb
);

  always_ff @(posedge clk) begin
    if (rst)     count <= '0;
    else if (tc) count <= '0;
    else         count <= count + 1'b1;
  end

  assign tc  = (count == W'(M - 1));
  assign msb = count[W-1];

  initial assert (M >= 2) else $error("freq_divider: M must be at least 2");

endmodule
