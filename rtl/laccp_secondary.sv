`timescale 1ns/1ps
// LACCP secondary (downstream) side of one MIKUMARI link.
//
// After the link is up and the primary's link delay dt and accumulated fine
// offset have arrived as messages, the block measures the round-trip time:
// it sends a PT_RTT_REQ pulse and counts system clock cycles until the
// PT_RTT_ACK pulse returns. With T = T_rt - TURNAROUND it derives
//   coarse offset      = floor(T / 2)                 (cycles, one-way delay)
//   local fine offset  = (dt' - dt) / 2 (+ 4000 ps if T is odd)
//   accumulated offset = local fine offset + primary's accumulated offset
// where dt' is this side's own link delay (IDELAY taps x 78 ps + bitslip
// offset x 1 ns). When the accumulated offset reaches +-one clock period
// (8000 ps) it is brought back into range and the coarse offset is
// corrected by +-1. These rules follow the published design; the order of
// the steps, the retry on timeout or on a heartbeat pulse arriving during
// the measurement, and the rounding of the halving (toward minus infinity)
// are choices of this implementation.
//
// Once synchronised (`synced` high) every PT_HEARTBEAT pulse produces a
// one-cycle `hb_load` with `hb_load_value` = coarse offset + 1, which is the
// primary's counter value in the following cycle, and every MSG_FRAME
// message produces `frame_load`. The offsets are measured once per link-up
// (static phase compensation); a drop of `link_up` restarts the sequence.
module laccp_secondary
  import laccp_pkg::*;
#(
  parameter int IDELAY_STEP_PS = 78,
  parameter int SERDES_STEP_PS = 1000,
  parameter int CLK_PERIOD_PS  = 8000
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     link_up,
  input  logic [4:0]               idelay_tap,
  input  logic signed [3:0]        serdes_ofs,
  // pulse service
  output logic                     pulse_tx,
  output pulse_type_e              pulse_tx_type,
  input  logic                     pulse_rx,
  input  pulse_type_e              pulse_rx_type,
  // message service (receive only)
  input  logic                     msg_rx_valid,
  input  msg_t                     msg_rx,
  // to the heartbeat unit
  output logic                     hb_load,
  output logic [CNT_W-1:0]         hb_load_value,
  output logic                     frame_load,
  output logic [FRAME_W-1:0]       frame_value,
  // results
  output logic                     synced,
  output logic [RTT_W-1:0]         rtt_cycles,
  output logic [CNT_W-1:0]         coarse_offset,
  output logic signed [OFS_W-1:0]  fine_offset_local,
  output logic signed [OFS_W-1:0]  fine_offset_acc
);

  typedef enum logic [2:0] {
    S_WAIT_LINK, S_WAIT_INFO, S_RTT_REQ, S_RTT_WAIT, S_CALC, S_SYNCED
  } state_e;

  state_e                   state;
  logic                     have_dt, have_fofs;
  logic signed [OFS_W-1:0]  dt_pri, fofs_up, dt_sec;
  logic [RTT_W-1:0]         rtt_cnt;

  // combinational offset arithmetic for S_CALC
  logic [RTT_W-1:0]         t_net;
  logic signed [OFS_W+1:0]  loc, acc;
  logic [CNT_W-1:0]         crs;

  assign dt_sec = link_dt_ps(idelay_tap, serdes_ofs, IDELAY_STEP_PS, SERDES_STEP_PS);

  always_comb begin
    t_net = rtt_cycles - RTT_W'(TURNAROUND);
    loc   = ((OFS_W+2)'(dt_sec) - (OFS_W+2)'(dt_pri)) >>> 1;
    if (t_net[0]) loc = loc + (OFS_W+2)'(CLK_PERIOD_PS / 2);
    acc   = loc + (OFS_W+2)'(fofs_up);
    crs   = CNT_W'(t_net >> 1);
    if (acc >= (OFS_W+2)'(CLK_PERIOD_PS)) begin
      acc = acc - (OFS_W+2)'(CLK_PERIOD_PS);
      crs = crs + 1'b1;
    end else if (acc <= -(OFS_W+2)'(CLK_PERIOD_PS)) begin
      acc = acc + (OFS_W+2)'(CLK_PERIOD_PS);
      crs = crs - 1'b1;
    end
  end

  assign synced        = (state == S_SYNCED);
  assign pulse_tx      = (state == S_RTT_REQ);
  assign pulse_tx_type = PT_RTT_REQ;
  assign hb_load       = synced && pulse_rx && (pulse_rx_type == PT_HEARTBEAT);
  assign hb_load_value = coarse_offset + 1'b1;
  assign frame_load    = synced && msg_rx_valid && (msg_rx.mtype == MSG_FRAME);
  assign frame_value   = msg_rx.payload[FRAME_W-1:0];

  always_ff @(posedge clk) begin
    if (rst || !link_up) begin
      state             <= S_WAIT_LINK;
      have_dt           <= 1'b0;
      have_fofs         <= 1'b0;
      dt_pri            <= '0;
      fofs_up           <= '0;
      rtt_cnt           <= '0;
      rtt_cycles        <= '0;
      coarse_offset     <= '0;
      fine_offset_local <= '0;
      fine_offset_acc   <= '0;
    end else begin
      if (msg_rx_valid && msg_rx.mtype == MSG_DT) begin
        dt_pri  <= msg_rx.payload[OFS_W-1:0];
        have_dt <= 1'b1;
      end
      if (msg_rx_valid && msg_rx.mtype == MSG_FOFS) begin
        fofs_up   <= msg_rx.payload[OFS_W-1:0];
        have_fofs <= 1'b1;
      end
      unique case (state)
        S_WAIT_LINK: state <= S_WAIT_INFO;
        S_WAIT_INFO: if (have_dt && have_fofs) state <= S_RTT_REQ;
        S_RTT_REQ: begin
          rtt_cnt <= RTT_W'(1);
          state   <= S_RTT_WAIT;
        end
        S_RTT_WAIT: begin
          rtt_cnt <= rtt_cnt + 1'b1;
          if (pulse_rx && pulse_rx_type == PT_HEARTBEAT)
            state <= S_RTT_REQ;                      // measurement disturbed
          else if (pulse_rx && pulse_rx_type == PT_RTT_ACK) begin
            rtt_cycles <= rtt_cnt;
            state      <= S_CALC;
          end else if (&rtt_cnt)
            state <= S_RTT_REQ;                      // timeout
        end
        S_CALC: begin
          coarse_offset     <= crs;
          fine_offset_local <= OFS_W'(loc);
          fine_offset_acc   <= OFS_W'(acc);
          state             <= S_SYNCED;
        end
        S_SYNCED: ;
        default: state <= S_WAIT_LINK;
      endcase
    end
  end

  // a round-trip result must at least cover the primary's turnaround
  always_ff @(posedge clk)
    if (!rst && state == S_CALC)
      assert (rtt_cycles > RTT_W'(TURNAROUND)) else $error("round-trip shorter than turnaround");

endmodule
