`timescale 1ns/1ps
// Heartbeat unit: defines the timestamp of the system.
//
// A CNT_W-bit counter runs on the 125 MHz system clock. When it wraps to
// zero the unit raises `heartbeat` for one cycle; this marks the boundary of
// a heartbeat frame (2**16 x 8 ns, about 524 us). A FRAME_W-bit frame number
// counts the frames, so counter and frame number together give an 8 ns
// timestamp that is unique for about 2.4 hours. Counter width, frame-number
// width and the carry-defined heartbeat follow the published design.
//
// On a secondary module the LACCP block drives `load` when the upstream
// heartbeat pulse arrives, with `load_value` being the counter value the
// upstream counter has in the cycle after the load. `frame_load` copies the
// upstream frame number, which arrives as a message some cycles after the
// heartbeat. On a primary (root) module both inputs stay low.
//
// Timing: `heartbeat` is high in the cycle in which `counter` is 0, and
// `frame` already holds the new frame number in that cycle. `sync_err`
// pulses when a load changes a counter that was already loaded once before,
// i.e. when the local frame lost alignment. Reset clears everything (a
// choice of this implementation).
module heartbeat_unit #(
  parameter int CNT_W   = 16,
  parameter int FRAME_W = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               load,
  input  logic [CNT_W-1:0]   load_value,
  input  logic               frame_load,
  input  logic [FRAME_W-1:0] frame_in,
  output logic [CNT_W-1:0]   counter,
  output logic [FRAME_W-1:0] frame,
  output logic               heartbeat,
  output logic               locked,
  output logic               sync_err
);

  logic [CNT_W-1:0] cnt_next;
  logic             wrap;

  always_comb begin
    cnt_next = load ? load_value : counter + 1'b1;
    wrap     = (cnt_next == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      counter  <= '0;
      frame    <= '0;
      locked   <= 1'b0;
      sync_err <= 1'b0;
    end else begin
      counter  <= cnt_next;
      sync_err <= load && locked && (load_value != counter + 1'b1);
      if (load) locked <= 1'b1;
      if (frame_load)
        frame <= frame_in + FRAME_W'(wrap);
      else if (wrap)
        frame <= frame + 1'b1;
    end
  end

  assign heartbeat = (counter == '0);

endmodule
