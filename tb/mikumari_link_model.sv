`timescale 1ns/1ps
// Behavioural model of one direction pair of a MIKUMARI link, for
// testbenches only. It offers the two services LACCP uses: a pulse with a
// 2-bit type, delivered after exactly DOWN_LAT (primary -> secondary) or
// UP_LAT (secondary -> primary) system clock cycles, and 64-bit messages
// from primary to secondary, delivered MSG_LAT cycles after acceptance,
// one every MSG_GAP cycles (a slow data channel). Both ends share one
// clock, i.e. the recovered clock is modelled as identical to the
// reference clock.
module mikumari_link_model #(
  parameter int DOWN_LAT = 20,
  parameter int UP_LAT   = 20,
  parameter int MSG_LAT  = 40,
  parameter int MSG_GAP  = 12
) (
  input  logic        clk,
  input  logic        rst,
  // primary side
  input  logic        p_pulse_tx,
  input  logic [1:0]  p_pulse_tx_type,
  output logic        p_pulse_rx,
  output logic [1:0]  p_pulse_rx_type,
  input  logic        p_msg_tx_valid,
  input  logic [63:0] p_msg_tx,
  output logic        p_msg_tx_ready,
  // secondary side
  input  logic        s_pulse_tx,
  input  logic [1:0]  s_pulse_tx_type,
  output logic        s_pulse_rx,
  output logic [1:0]  s_pulse_rx_type,
  output logic        s_msg_rx_valid,
  output logic [63:0] s_msg_rx
);

  logic [2:0]  dn_pipe [DOWN_LAT];
  logic [2:0]  up_pipe [UP_LAT];
  logic [64:0] msg_pipe [MSG_LAT];
  int          gap;

  assign p_msg_tx_ready = (gap == 0);
  assign s_pulse_rx      = dn_pipe[DOWN_LAT-1][2];
  assign s_pulse_rx_type = dn_pipe[DOWN_LAT-1][1:0];
  assign p_pulse_rx      = up_pipe[UP_LAT-1][2];
  assign p_pulse_rx_type = up_pipe[UP_LAT-1][1:0];
  assign s_msg_rx_valid  = msg_pipe[MSG_LAT-1][64];
  assign s_msg_rx        = msg_pipe[MSG_LAT-1][63:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DOWN_LAT; i++) dn_pipe[i] <= '0;
      for (int i = 0; i < UP_LAT; i++)   up_pipe[i] <= '0;
      for (int i = 0; i < MSG_LAT; i++)  msg_pipe[i] <= '0;
      gap <= 0;
    end else begin
      // a pulse is in the pipeline for LAT register stages: it is seen at the
      // far end LAT cycles after it was sent
      dn_pipe[0] <= {p_pulse_tx, p_pulse_tx_type};
      for (int i = 1; i < DOWN_LAT; i++) dn_pipe[i] <= dn_pipe[i-1];
      up_pipe[0] <= {s_pulse_tx, s_pulse_tx_type};
      for (int i = 1; i < UP_LAT; i++) up_pipe[i] <= up_pipe[i-1];
      msg_pipe[0] <= {p_msg_tx_valid && p_msg_tx_ready, p_msg_tx};
      for (int i = 1; i < MSG_LAT; i++) msg_pipe[i] <= msg_pipe[i-1];
      if (p_msg_tx_valid && p_msg_tx_ready) gap <= MSG_GAP;
      else if (gap != 0) gap <= gap - 1;
    end
  end

endmodule
