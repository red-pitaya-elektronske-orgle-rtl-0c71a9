// ps2_sync: brings the PS/2 lines into the system clock domain and finds the
// falling edges of the PS/2 clock.
//
// The PS/2 data line passes through one flip-flop and leaves as psd. The PS/2
// clock passes through a chain of three flip-flops; psfall is high for one
// system clock when the second stage is 0 and the third, one clock older, is
// still 1, i.e. just after the PS/2 clock fell. The first two stages of the
// chain act as a synchroniser. Every flip-flop runs on the system clock, so
// the receiver behind it is fully synchronous.
//
// The register chain and the edge detector follow the document's schematic.
// The reset, which loads the idle level 1 into every stage so that no edge
// is seen coming out of reset, is this design's choice.
//
// Ports: clk, rst; psdata, psclk (asynchronous PS/2 lines); psd, psfall.
// Timing: psfall is high for the one clock that follows the second rising
// clock edge to sample the PS/2 clock low; psd lags psdata by one clock.
module ps2_sync (
  input  logic clk,
  input  logic rst,
  input  logic psdata,
  input  logic psclk,
  output logic psd,
  output logic psfall
);

  logic [2:0] clk_q;   // clk_q[0] first stage, clk_q[2] last

  always_ff @(posedge clk) begin
    if (rst) begin
      psd   <= 1'b1;
      clk_q <= 3'b111;
    end else begin
      psd   <= psdata;
      clk_q <= {clk_q[1:0], psclk};
    end
  end

  assign psfall = clk_q[2] & ~clk_q[1];

endmodule
