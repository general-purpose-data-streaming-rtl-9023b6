`timescale 1ns/1ps
// Calibration look-up table of one timing unit.
//
// The raw fine time of a hit is an 8-bit code {phase region, tap index}:
// 4 phase regions (the four 500 MHz sampling cycles within one 125 MHz
// system clock cycle) times 64 effective taps. Because the tap delays
// differ and even depend on the phase region, each of the 4 x 64 codes
// has its own entry, which holds the calibrated fine time in units of
// 8 ns / 2**FINE_W. That a 4 x 64 table is used follows the published
// design; the entry width and the way the table is filled are choices of
// this implementation: it powers up with the ideal linear values
// (entry = code x 2**(FINE_W-8), i.e. 31.25 ps per tap) and can be
// rewritten through the write port, e.g. with the result of a code-density
// measurement of the calibration clock.
//
// Timing: `fine` is registered, one cycle after `addr`.
module calib_lut #(
  parameter int ADDR_W = 8,        // 2 phase bits + 6 tap bits
  parameter int FINE_W = 13
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [FINE_W-1:0] fine,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [FINE_W-1:0] wr_data
);

  localparam int DEPTH = 1 << ADDR_W;

  logic [FINE_W-1:0] mem [DEPTH];

  initial
    for (int i = 0; i < DEPTH; i++)
      mem[i] = FINE_W'(i << (FINE_W - ADDR_W));

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    fine <= mem[addr];
  end

endmodule
