`timescale 1ns/1ps
// Samples the tapped delay line and removes bubbles.
//
// Every tap of the delay line is captured by a flip-flop on the 500 MHz
// sampling clock. Groups of three neighbouring flip-flops are then ORed,
// which hides "bubbles" (a 0 inside the run of 1s caused by uneven
// propagation) and reduces the TAPS raw taps to TAPS/3 effective taps
// (192 -> 64). The result is registered again, so `code` is the delay-line
// state two sampling-clock edges earlier. Both steps follow the published
// design (flip-flop per O/CO output, 3-input OR, 64 effective taps).
//
// code[0] is the effective tap nearest to the input: after a rising input
// edge `code` reads as a thermometer code 0...0111 with the number of 1s
// growing with the time the edge had to travel before the sampling edge.
module tdl_sampler #(
  parameter int TAPS     = 192,
  parameter int EFF_TAPS = TAPS / 3
) (
  input  logic                clk_fast,
  input  logic [TAPS-1:0]     taps,
  output logic [EFF_TAPS-1:0] code
);

  logic [TAPS-1:0]     cap;
  logic [EFF_TAPS-1:0] ored;

  always_comb
    for (int i = 0; i < EFF_TAPS; i++)
      ored[i] = cap[3*i] | cap[3*i+1] | cap[3*i+2];

  always_ff @(posedge clk_fast) begin
    cap  <= taps;
    code <= ored;
  end

  initial assert (TAPS == 3 * EFF_TAPS) else $error("TAPS must be 3 x EFF_TAPS");

endmodule
