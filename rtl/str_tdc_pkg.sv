`timescale 1ns/1ps
// Shared types and constants of the streaming TDC.
//
// Time is kept as a 16-bit heartbeat counter value (8 ns per count at
// 125 MHz) plus a FINE_W-bit fine time that divides one 8 ns system clock
// period into 2**FINE_W steps (about 0.98 ps for FINE_W = 13). The 16-bit
// counter, the 24-bit frame number, the 64 effective taps, the 4 phase
// regions and the 64-bit data words follow the published design; the field
// layout of the words, FINE_W and TOT_W are choices of this implementation.
package str_tdc_pkg;

  localparam int CNT_W     = 16;  // heartbeat counter
  localparam int FRAME_W   = 24;  // heartbeat frame number
  localparam int EFF_TAPS  = 64;  // effective taps after the 3-input OR
  localparam int TAP_W     = 6;   // log2(EFF_TAPS)
  localparam int PHASE_W   = 2;   // four 500 MHz phases per 125 MHz cycle
  localparam int FINE_W    = 13;  // calibrated fine time, 8 ns / 2**13
  localparam int TOT_W     = 22;  // time over threshold, fine units
  localparam int CH_W      = 7;   // channel number field
  localparam int WORD_W    = 64;  // data word: 64 bit x 125 MHz = 8 Gbps

  typedef enum logic [3:0] {
    DT_TDC = 4'hB,   // leading-edge timing with TOT embedded
    DT_HBD = 4'hC    // heartbeat delimiter
  } data_type_e;

  // Leading-edge TDC word.
  typedef struct packed {
    data_type_e          dtype;   // [63:60]
    logic [CH_W-1:0]     ch;      // [59:53]
    logic [1:0]          rsv;     // [52:51]
    logic [TOT_W-1:0]    tot;     // [50:29]
    logic [CNT_W-1:0]    coarse;  // [28:13]
    logic [FINE_W-1:0]   fine;    // [12:0]
  } tdc_word_t;

  // Heartbeat delimiter word.
  // flags[0]: TDC data were lost in a channel FIFO during this frame
  // flags[1]: frame numbers of merged delimiters disagreed
  // flags[2]: a leading edge was emitted without its trailing edge
  typedef struct packed {
    data_type_e          dtype;   // [63:60]
    logic [7:0]          flags;   // [59:52]
    logic [27:0]         rsv;     // [51:24]
    logic [FRAME_W-1:0]  frame;   // [23:0]
  } hbd_word_t;

  // Leading and trailing fine times of one 125 MHz cycle, after the path
  // merger. trail_first is set when both edges fall in the same cycle and
  // the trailing edge came first (it closes an earlier pulse).
  typedef struct packed {
    logic              lead_v;
    logic [FINE_W-1:0] lead_fine;
    logic              trail_v;
    logic [FINE_W-1:0] trail_fine;
    logic              trail_first;
  } fine_slot_t;

  // Slot after the delimiter inserter: coarse time and delimiter attached.
  typedef struct packed {
    fine_slot_t          fs;
    logic [CNT_W-1:0]    coarse;
    logic                hbd_v;
    logic [FRAME_W-1:0]  frame;
  } stamped_slot_t;

  localparam logic [7:0] HBD_FLAG_LOST     = 8'h01;
  localparam logic [7:0] HBD_FLAG_MISMATCH = 8'h02;
  localparam logic [7:0] HBD_FLAG_UNPAIRED = 8'h04;

  function automatic logic is_hbd(input logic [WORD_W-1:0] w);
    return w[63:60] == DT_HBD;
  endfunction

  function automatic logic [WORD_W-1:0] make_hbd(input logic [FRAME_W-1:0] frame,
                                                 input logic [7:0] flags);
    hbd_word_t h;
    h.dtype = DT_HBD;
    h.flags = flags;
    h.rsv   = '0;
    h.frame = frame;
    return h;
  endfunction

endpackage
