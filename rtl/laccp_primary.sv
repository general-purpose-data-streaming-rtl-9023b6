`timescale 1ns/1ps
// LACCP primary (upstream) side of one MIKUMARI link.
//
// While `local_synced` is high (tie it high on the clock root; on a hub it
// is the secondary side's `synced`, so a downstream link is served only
// after the hub itself is synchronised), this block
//   - sends a PT_HEARTBEAT pulse in every cycle its heartbeat unit reports
//     counter == 0, using the fixed-latency pulse service of the link;
//   - answers every PT_RTT_REQ pulse with a PT_RTT_ACK pulse TURNAROUND
//     (= 1) cycle later, so that the secondary can time the round trip;
//   - sends, as messages, the frame number at each heartbeat, its own link
//     delay dt (IDELAY taps x 78 ps + bitslip offset x 1 ns) and its own
//     accumulated fine offset (0 on the root). dt and the fine offset are
//     sent once after link-up and again after every frame-number message.
// The protocol content follows the published design; the pulse types, the
// message layout and the resend policy are choices of this implementation.
//
// Interface timing: pulse_tx is a one-cycle strobe with pulse_tx_type
// valid in the same cycle. A message is taken by the link in a cycle with
// msg_tx_valid && msg_tx_ready. A heartbeat pulse has priority over an
// echo in the same cycle (the echo then goes one cycle later and the
// secondary's round-trip value is one cycle long; the secondary repeats
// measurements that coincide with a heartbeat, see laccp_secondary).
module laccp_primary
  import laccp_pkg::*;
#(
  parameter int IDELAY_STEP_PS = 78,
  parameter int SERDES_STEP_PS = 1000
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     link_up,
  input  logic                     local_synced,
  input  logic                     heartbeat,
  input  logic [FRAME_W-1:0]       frame,
  input  logic [4:0]               idelay_tap,
  input  logic signed [3:0]        serdes_ofs,
  input  logic signed [OFS_W-1:0]  fine_offset_acc,
  // pulse service
  output logic                     pulse_tx,
  output pulse_type_e              pulse_tx_type,
  input  logic                     pulse_rx,
  input  pulse_type_e              pulse_rx_type,
  // message service
  output logic                     msg_tx_valid,
  output msg_t                     msg_tx,
  input  logic                     msg_tx_ready
);

  logic active;
  logic echo_pend;
  logic frame_pend, dt_pend, fofs_pend;
  logic up_q;
  logic [FRAME_W-1:0] frame_q;
  logic signed [OFS_W-1:0] dt_ps;

  assign active = link_up && local_synced;
  assign dt_ps  = link_dt_ps(idelay_tap, serdes_ofs, IDELAY_STEP_PS, SERDES_STEP_PS);

  // pulses
  always_comb begin
    pulse_tx      = 1'b0;
    pulse_tx_type = PT_HEARTBEAT;
    if (active && heartbeat) begin
      pulse_tx      = 1'b1;
      pulse_tx_type = PT_HEARTBEAT;
    end else if (active && echo_pend) begin
      pulse_tx      = 1'b1;
      pulse_tx_type = PT_RTT_ACK;
    end
  end

  // messages: frame number first, then dt, then fine offset
  always_comb begin
    msg_tx_valid = active && (frame_pend || dt_pend || fofs_pend);
    msg_tx       = '0;
    if (frame_pend) begin
      msg_tx.mtype   = MSG_FRAME;
      msg_tx.payload = 60'(frame_q);
    end else if (dt_pend) begin
      msg_tx.mtype   = MSG_DT;
      msg_tx.payload = 60'(signed'(dt_ps));
    end else begin
      msg_tx.mtype   = MSG_FOFS;
      msg_tx.payload = 60'(signed'(fine_offset_acc));
    end
  end

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      echo_pend  <= 1'b0;
      frame_pend <= 1'b0;
      dt_pend    <= 1'b0;
      fofs_pend  <= 1'b0;
      up_q       <= 1'b0;
      frame_q    <= '0;
    end else begin
      up_q <= 1'b1;
      if (!up_q) begin
        dt_pend   <= 1'b1;
        fofs_pend <= 1'b1;
      end
      // echo: set when a request arrives, cleared when the ack goes out
      if (pulse_rx && pulse_rx_type == PT_RTT_REQ)
        echo_pend <= 1'b1;
      else if (echo_pend && !heartbeat)
        echo_pend <= 1'b0;
      // message bookkeeping
      if (msg_tx_valid && msg_tx_ready) begin
        if (frame_pend) begin
          frame_pend <= 1'b0;
          dt_pend    <= 1'b1;
          fofs_pend  <= 1'b1;
        end else if (dt_pend)
          dt_pend <= 1'b0;
        else
          fofs_pend <= 1'b0;
      end
      if (heartbeat) begin
        frame_pend <= 1'b1;
        frame_q    <= frame;
      end
    end
  end

endmodule
