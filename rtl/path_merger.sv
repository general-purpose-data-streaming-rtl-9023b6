`timescale 1ns/1ps
// Path merger: joins the leading- and trailing-edge timing units into one
// data path.
//
// Each 125 MHz cycle produces one fine_slot_t holding the leading and the
// trailing fine time of that cycle (each with its valid bit). Keeping both
// edges of a cycle in one slot keeps the latency of the channel fixed,
// which the published design requires up to the delimiter inserter. When
// both edges fall in the same cycle the merger compares their fine times
// and sets `trail_first` if the trailing edge came first: that trailing
// edge closes a pulse that began in an earlier cycle, and the pairing unit
// needs the order. The slot format and the order flag are choices of this
// implementation. Timing: one register stage.
module path_merger
  import str_tdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              lead_v,
  input  logic [FINE_W-1:0] lead_fine,
  input  logic              trail_v,
  input  logic [FINE_W-1:0] trail_fine,
  output fine_slot_t        slot
);

  always_ff @(posedge clk) begin
    if (rst) slot <= '0;
    else begin
      slot.lead_v      <= lead_v;
      slot.lead_fine   <= lead_fine;
      slot.trail_v     <= trail_v;
      slot.trail_fine  <= trail_fine;
      slot.trail_first <= lead_v && trail_v && (trail_fine < lead_fine);
    end
  end

endmodule
