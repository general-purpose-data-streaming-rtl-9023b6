`timescale 1ns/1ps
// Shared types and constants of the LACCP clock synchronisation protocol.
//
// LACCP runs on top of a MIKUMARI link, which offers two services: a pulse
// with a small type number, transferred with fixed latency, and a message
// (here 64 bits) transferred without latency guarantee. The pulse types and
// message layout below are choices of this implementation; the protocol
// steps (heartbeat pulse, round-trip pulse, frame number, fine offset) and
// the step sizes (78 ps IDELAY tap, 1 ns ISERDES bitslip step, 8 ns system
// clock period) follow the published design.
package laccp_pkg;

  localparam int CNT_W   = 16;
  localparam int FRAME_W = 24;
  localparam int OFS_W   = 18;   // signed fine offsets in ps
  localparam int RTT_W   = 12;   // round-trip counter, system clock cycles

  // Cycles from a round-trip request arriving at the primary to the reply
  // pulse leaving it.
  localparam int TURNAROUND = 1;

  typedef enum logic [1:0] {
    PT_HEARTBEAT = 2'd0,  // primary counter became 0
    PT_RTT_REQ   = 2'd1,  // secondary starts a round-trip measurement
    PT_RTT_ACK   = 2'd2   // primary echoes the request
  } pulse_type_e;

  typedef enum logic [3:0] {
    MSG_FRAME = 4'h1,     // frame number of the frame just started
    MSG_DT    = 4'h2,     // primary's link delay dt in ps
    MSG_FOFS  = 4'h3      // primary's accumulated fine offset in ps
  } msg_type_e;

  typedef struct packed {
    msg_type_e    mtype;
    logic [59:0]  payload;
  } msg_t;

  // dt = d_idelay + d_iserdes from the link-up results.
  function automatic logic signed [OFS_W-1:0] link_dt_ps(
      input logic [4:0] idelay_tap, input logic signed [3:0] serdes_ofs,
      input int idelay_step_ps, input int serdes_step_ps);
    int v;
    v = int'(idelay_tap) * idelay_step_ps + int'(serdes_ofs) * serdes_step_ps;
    return OFS_W'(v);
  endfunction

endpackage
