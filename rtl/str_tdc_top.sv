`timescale 1ns/1ps
// Streaming high-resolution TDC with LACCP clock synchronisation.
//
// The module measures the leading and trailing edge times of
// NUM_FRONT x CH_PER_FRONT hit inputs continuously, without a trigger, and
// delivers them as one stream of 64-bit words cut into heartbeat frames.
// A timestamp is a 16-bit heartbeat counter value (8 ns steps) plus a
// calibrated fine time; each frame (2**16 cycles) ends with a delimiter
// word carrying the 24-bit frame number. The counters of all modules of a
// system are aligned by LACCP so that timestamps from different modules
// can be compared directly.
//
// Blocks:
//   - laccp_secondary + heartbeat_unit: synchronise the local heartbeat
//     counter and frame number to the upstream module over the MIKUMARI
//     link (round-trip time / 2 as coarse offset, IDELAY and bitslip
//     values for the fine offset). With root_mode high the unit free-runs
//     and this module is the clock root.
//   - laccp_primary: serves a downstream link (clock hub function) once
//     this module is synchronised, forwarding the accumulated fine offset.
//   - delimiter_generator: heartbeat -> delimiter request for all channels.
//   - tdc_channel (one per input): delay line, timing units, path merger,
//     2 us delay buffer, trigger gate, delimiter inserter, pairing, TOT
//     filter.
//   - front_merger (one per CH_PER_FRONT channels) and back_merger: merge
//     the channel streams frame by frame into the output stream.
// The MIKUMARI link itself (CDCM modulation, SerDes, IDELAY link-up) and
// the TCP/IP network core are outside this module: the link's pulse and
// message services and its link-up results are ports, and the output is a
// 64-bit valid/ready stream. The defaults (2 groups of 32 channels,
// 250-cycle delay) correspond to the high-resolution system with two TDC
// mezzanine cards; both groups share one heartbeat unit here, while in
// that hardware each mezzanine FPGA has its own, synchronised over an
// internal link.
//
// Clocks: clk is the 125 MHz system clock (recovered from the upstream
// link), clk_fast the 500 MHz sampling clock, phase-aligned to clk.
module str_tdc_top
  import str_tdc_pkg::*;
  import laccp_pkg::OFS_W;
  import laccp_pkg::RTT_W;
#(
  parameter int NUM_FRONT      = 2,
  parameter int CH_PER_FRONT   = 32,
  parameter int DELAY_CYCLES   = 250,
  parameter int CH_FIFO_DEPTH  = 64,
  parameter int FM_FIFO_DEPTH  = 256,
  parameter int BM_FIFO_DEPTH  = 1024,
  parameter int NCH            = NUM_FRONT * CH_PER_FRONT
) (
  input  logic                    clk,
  input  logic                    clk_fast,
  input  logic                    rst,
  input  logic                    root_mode,
  // detector inputs
  input  logic [NCH-1:0]          hit,
  input  logic                    cal_clk,
  input  logic                    cal_sel,
  // upstream MIKUMARI link (this module is the LACCP secondary)
  input  logic                    up_link_up,
  input  logic [4:0]              up_idelay_tap,
  input  logic signed [3:0]       up_serdes_ofs,
  output logic                    up_pulse_tx,
  output logic [1:0]              up_pulse_tx_type,
  input  logic                    up_pulse_rx,
  input  logic [1:0]              up_pulse_rx_type,
  input  logic                    up_msg_rx_valid,
  input  logic [63:0]             up_msg_rx,
  // downstream MIKUMARI link (this module is the LACCP primary)
  input  logic                    dn_link_up,
  input  logic [4:0]              dn_idelay_tap,
  input  logic signed [3:0]       dn_serdes_ofs,
  output logic                    dn_pulse_tx,
  output logic [1:0]              dn_pulse_tx_type,
  input  logic                    dn_pulse_rx,
  input  logic [1:0]              dn_pulse_rx_type,
  output logic                    dn_msg_tx_valid,
  output logic [63:0]             dn_msg_tx,
  input  logic                    dn_msg_tx_ready,
  // run control
  input  logic                    trig_mode,
  input  logic                    trig_gate,
  input  logic                    tot_en,
  input  logic [TOT_W-1:0]        tot_min,
  input  logic [TOT_W-1:0]        tot_max,
  input  logic                    lut_wr_en,
  input  logic [CH_W-1:0]         lut_wr_ch,
  input  logic                    lut_wr_trail,
  input  logic [7:0]              lut_wr_addr,
  input  logic [FINE_W-1:0]       lut_wr_data,
  // data stream to the network core
  output logic                    out_valid,
  output logic [WORD_W-1:0]       out_data,
  input  logic                    out_ready,
  // status
  output logic                    synced,
  output logic [RTT_W-1:0]        rtt_cycles,
  output logic [CNT_W-1:0]        coarse_offset,
  output logic signed [OFS_W-1:0] fine_offset_local,
  output logic signed [OFS_W-1:0] fine_offset_acc,
  output logic [CNT_W-1:0]        hb_counter,
  output logic [FRAME_W-1:0]      hb_frame,
  output logic                    heartbeat,
  output logic                    sync_err,
  output logic [NCH-1:0]          ch_lost
);

  // ---------------- clock synchronisation ----------------
  logic                 hb_load, frame_load, sec_synced, hb_locked;
  logic [CNT_W-1:0]     hb_load_value;
  logic [FRAME_W-1:0]   frame_value;
  laccp_pkg::pulse_type_e up_ptx_type, dn_ptx_type;
  laccp_pkg::msg_t        dn_msg;

  laccp_secondary u_laccp_up (
    .clk, .rst, .link_up(up_link_up && !root_mode),
    .idelay_tap(up_idelay_tap), .serdes_ofs(up_serdes_ofs),
    .pulse_tx(up_pulse_tx), .pulse_tx_type(up_ptx_type),
    .pulse_rx(up_pulse_rx), .pulse_rx_type(laccp_pkg::pulse_type_e'(up_pulse_rx_type)),
    .msg_rx_valid(up_msg_rx_valid), .msg_rx(laccp_pkg::msg_t'(up_msg_rx)),
    .hb_load, .hb_load_value, .frame_load, .frame_value,
    .synced(sec_synced), .rtt_cycles, .coarse_offset, .fine_offset_local,
    .fine_offset_acc);

  assign up_pulse_tx_type = up_ptx_type;
  assign synced           = root_mode || sec_synced;

  heartbeat_unit #(.CNT_W(CNT_W), .FRAME_W(FRAME_W)) u_hb (
    .clk, .rst, .load(hb_load), .load_value(hb_load_value),
    .frame_load, .frame_in(frame_value),
    .counter(hb_counter), .frame(hb_frame), .heartbeat, .locked(hb_locked), .sync_err);

  laccp_primary u_laccp_dn (
    .clk, .rst, .link_up(dn_link_up), .local_synced(synced),
    .heartbeat, .frame(hb_frame),
    .idelay_tap(dn_idelay_tap), .serdes_ofs(dn_serdes_ofs),
    .fine_offset_acc(root_mode ? '0 : fine_offset_acc),
    .pulse_tx(dn_pulse_tx), .pulse_tx_type(dn_ptx_type),
    .pulse_rx(dn_pulse_rx), .pulse_rx_type(laccp_pkg::pulse_type_e'(dn_pulse_rx_type)),
    .msg_tx_valid(dn_msg_tx_valid), .msg_tx(dn_msg), .msg_tx_ready(dn_msg_tx_ready));

  assign dn_pulse_tx_type = dn_ptx_type;
  assign dn_msg_tx        = dn_msg;

  // ---------------- delimiter generation ----------------
  logic               hbd_v;
  logic [FRAME_W-1:0] hbd_frame;
  logic [CNT_W-1:0]   coarse;

  delimiter_generator #(.CNT_W(CNT_W), .FRAME_W(FRAME_W)) u_dgen (
    .clk, .rst, .heartbeat, .counter(hb_counter), .frame(hb_frame),
    .hbd_v, .hbd_frame, .coarse);

  // ---------------- channels and merger tree ----------------
  logic [NUM_FRONT-1:0]    fm_valid, fm_pop;
  logic [WORD_W-1:0]       fm_data [NUM_FRONT];
  logic [NCH-1:0]          ch_ovf, par_lost;
  logic                    bm_delim;

  for (genvar f = 0; f < NUM_FRONT; f++) begin : g_front
    logic [CH_PER_FRONT-1:0] cv;
    logic [WORD_W-1:0]       cd [CH_PER_FRONT];

    for (genvar c = 0; c < CH_PER_FRONT; c++) begin : g_ch
      localparam int CH = f * CH_PER_FRONT + c;
      tdc_channel #(.DELAY_CYCLES(DELAY_CYCLES)) u_ch (
        .clk, .clk_fast, .rst, .hit(hit[CH]), .cal_clk, .cal_sel,
        .ch_id(CH_W'(CH)), .coarse, .hbd_v, .hbd_frame,
        .trig_mode, .trig_gate, .tot_en, .tot_min, .tot_max,
        .lut_wr_en(lut_wr_en && lut_wr_ch == CH_W'(CH)), .lut_wr_trail,
        .lut_wr_addr, .lut_wr_data,
        .out_valid(cv[c]), .out_data(cd[c]), .lost(par_lost[CH]));
    end

    front_merger #(.N_IN(CH_PER_FRONT), .CH_FIFO_DEPTH(CH_FIFO_DEPTH),
                   .OUT_FIFO_DEPTH(FM_FIFO_DEPTH)) u_fm (
      .clk, .rst, .ch_valid(cv), .ch_data(cd),
      .out_valid(fm_valid[f]), .out_data(fm_data[f]), .out_pop(fm_pop[f]),
      .ch_overflow(ch_ovf[f*CH_PER_FRONT +: CH_PER_FRONT]));
  end

  back_merger #(.N_IN(NUM_FRONT), .OUT_FIFO_DEPTH(BM_FIFO_DEPTH)) u_bm (
    .clk, .rst, .in_valid(fm_valid), .in_data(fm_data), .in_pop(fm_pop),
    .out_valid, .out_data, .out_ready, .delim_out(bm_delim));

  assign ch_lost = ch_ovf | par_lost;

  initial assert (NCH <= (1 << CH_W)) else $error("too many channels for the channel field");

endmodule
