`timescale 1ns/1ps
// Behavioural model of the tapped delay line built from chained CARRY4
// primitives (kind: behavioural model, not synthesizable logic; in the FPGA
// this is a hand-placed carry chain).
//
// The hit signal enters the carry input (CYINIT) of the first CARRY4, and
// the calibration clock enters its DI0 input; `cal_sel` plays the role of
// the first select input and chooses which of the two propagates. The
// taps are taken from the O and CO outputs alternately (CO0, CO1, O2, CO3,
// O0, CO1, O2, CO3, ... : the first O output is replaced by CO because DI0
// carries the calibration clock). Tap k switches TAP_PS*(k+1) after the
// input, with O outputs JITTER_PS earlier and CO outputs JITTER_PS later
// than nominal, which models the uneven bin widths that the calibration
// table corrects. The tap order, the CO0 substitution and the 192 taps
// follow the published design; the delays are illustrative values that
// make the 192 taps span about 1.9 ns, just under one 500 MHz period.
// The line is empty (all taps 0) at time zero; hit and calibration clock
// are expected to start low.
module tdl_carry_chain #(
  parameter int  TAPS      = 192,
  parameter real TAP_PS    = 10.0,
  parameter real JITTER_PS = 2.0
) (
  input  logic            hit_in,
  input  logic            cal_clk,
  input  logic            cal_sel,
  output logic [TAPS-1:0] taps
);

  logic start;
  assign start = cal_sel ? cal_clk : hit_in;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    // even positions inside a CARRY4 are O outputs, except position 0 of
    // the first CARRY4, which is CO0
    localparam bit  IS_O  = (k % 2 == 0) && (k != 0);
    localparam real DLY_PS = TAP_PS * (k + 1) + (IS_O ? -JITTER_PS : JITTER_PS);
    // transport delay; the line starts empty
    logic t = 1'b0;
    always @(start) t <= #(DLY_PS / 1000.0) start;
    assign taps[k] = t;
  end

endmodule
