`timescale 1ns/1ps
// Trigger gate: the switch after the delay buffer.
//
// In trigger-less mode (trig_mode = 0, the default operation) every slot
// passes. In triggered mode a slot passes only while `gate` is high; the
// edges of a slot outside the gate are dropped by clearing their valid
// bits. How the gate is produced from a trigger (its delay and width) is
// left to the surrounding system. Timing: one register stage.
module trigger_gate
  import str_tdc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       trig_mode,
  input  logic       gate,
  input  fine_slot_t din,
  output fine_slot_t dout
);

  logic pass;
  assign pass = !trig_mode || gate;

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else begin
      dout         <= din;
      dout.lead_v  <= din.lead_v  && pass;
      dout.trail_v <= din.trail_v && pass;
      dout.trail_first <= din.trail_first && pass;
    end
  end

endmodule
