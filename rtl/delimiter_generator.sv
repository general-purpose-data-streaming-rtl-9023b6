`timescale 1ns/1ps
// Delimiter generator: turns the heartbeat of the heartbeat unit into the
// delimiter request shared by all channels.
//
// In the cycle in which the heartbeat unit reports counter == 0 the
// generator raises `hbd_v` for one cycle (one cycle later) with the frame
// number of the new frame, and passes the counter along delayed by the
// same cycle, so that counter value and delimiter stay aligned on their
// way to the channels. The register stage eases the fan-out to many
// channels; it is a choice of this implementation.
module delimiter_generator #(
  parameter int CNT_W   = 16,
  parameter int FRAME_W = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               heartbeat,
  input  logic [CNT_W-1:0]   counter,
  input  logic [FRAME_W-1:0] frame,
  output logic               hbd_v,
  output logic [FRAME_W-1:0] hbd_frame,
  output logic [CNT_W-1:0]   coarse
);

  always_ff @(posedge clk) begin
    if (rst) begin
      hbd_v     <= 1'b0;
      hbd_frame <= '0;
      coarse    <= '0;
    end else begin
      hbd_v  <= heartbeat;
      coarse <= counter;
      if (heartbeat) hbd_frame <= frame;
    end
  end

endmodule
