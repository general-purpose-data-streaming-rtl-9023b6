`timescale 1ns/1ps
// Delimiter inserter: attaches the 16-bit heartbeat counter to the fine
// times and marks the heartbeat frame boundary.
//
// Every slot leaving the trigger gate receives the current counter value
// as its coarse time, so a TDC value is counter x 8 ns + fine time. In the
// cycle of a heartbeat the slot also carries the delimiter request with
// the frame number; edges of that same slot have counter value 0 and
// belong to the new frame. Adding the counter after the 2 us delay, not at
// the timing unit, follows the published design; all times therefore carry
// the same constant latency. Timing: one register stage.
module delimiter_inserter
  import str_tdc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  fine_slot_t          din,
  input  logic [CNT_W-1:0]    coarse,
  input  logic                hbd_v,
  input  logic [FRAME_W-1:0]  hbd_frame,
  output stamped_slot_t       dout
);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else begin
      dout.fs     <= din;
      dout.coarse <= coarse;
      dout.hbd_v  <= hbd_v;
      dout.frame  <= hbd_frame;
    end
  end

endmodule
