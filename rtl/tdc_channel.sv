`timescale 1ns/1ps
// One channel of the online data processing (ODP) block of the streaming
// TDC: from the discriminated hit signal to framed 64-bit TDC words.
//
//   hit -> tapped delay line -> sampler (500 MHz, 3-input OR, 64 taps)
//       -> leading timing unit  \
//       -> trailing timing unit  -> path merger -> 2 us delay buffer
//       -> trigger gate -> delimiter inserter (adds 16-bit counter and
//          heartbeat delimiter) -> pairing unit (TOT) -> TOT filter -> out
//
// The leading and trailing timing units share one delay line; the
// trailing unit works on the bit-inverted code. Everything up to the
// delimiter inserter has a fixed latency, so the coarse time attached
// after the delay buffer is a constant number of cycles later than the
// hit; that constant is common to all channels. The chain follows the
// published channel structure; register stages and word formats are
// choices of this implementation.
//
// Interface: `coarse`, `hbd_v` and `hbd_frame` come from the delimiter
// generator and are shared by all channels. `out_valid`/`out_data` carry
// one word per cycle at most and have no back-pressure (the FIFO of the
// front merger follows). The calibration tables of both timing units are
// written through lut_wr_* (lut_wr_trail selects the trailing unit).
module tdc_channel
  import str_tdc_pkg::*;
#(
  parameter int TAPS         = 192,
  parameter int DELAY_CYCLES = 250
) (
  input  logic               clk,
  input  logic               clk_fast,
  input  logic               rst,
  input  logic               hit,
  input  logic               cal_clk,
  input  logic               cal_sel,
  input  logic [CH_W-1:0]    ch_id,
  // heartbeat unit / delimiter generator
  input  logic [CNT_W-1:0]   coarse,
  input  logic               hbd_v,
  input  logic [FRAME_W-1:0] hbd_frame,
  // trigger and TOT filter settings
  input  logic               trig_mode,
  input  logic               trig_gate,
  input  logic               tot_en,
  input  logic [TOT_W-1:0]   tot_min,
  input  logic [TOT_W-1:0]   tot_max,
  // calibration table
  input  logic               lut_wr_en,
  input  logic               lut_wr_trail,
  input  logic [7:0]         lut_wr_addr,
  input  logic [FINE_W-1:0]  lut_wr_data,
  // output
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_data,
  output logic               lost
);

  logic [TAPS-1:0]     taps;
  logic [TAPS/3-1:0]   code;
  logic                l_v, t_v;
  logic [FINE_W-1:0]   l_fine, t_fine;
  logic [7:0]          l_raw, t_raw;
  fine_slot_t          merged, delayed, gated;
  stamped_slot_t       stamped;
  logic                p_valid;
  logic [WORD_W-1:0]   p_data;

  tdl_carry_chain #(.TAPS(TAPS)) u_tdl (
    .hit_in(hit), .cal_clk(cal_clk), .cal_sel(cal_sel), .taps(taps));

  tdl_sampler #(.TAPS(TAPS), .EFF_TAPS(TAPS/3)) u_smp (
    .clk_fast(clk_fast), .taps(taps), .code(code));

  timing_unit #(.TRAILING(1'b0), .EFF_TAPS(TAPS/3), .FINE_W(FINE_W)) u_lead (
    .clk, .clk_fast, .rst, .code, .valid(l_v), .fine(l_fine), .raw_code(l_raw),
    .lut_wr_en(lut_wr_en && !lut_wr_trail), .lut_wr_addr, .lut_wr_data);

  timing_unit #(.TRAILING(1'b1), .EFF_TAPS(TAPS/3), .FINE_W(FINE_W)) u_trail (
    .clk, .clk_fast, .rst, .code, .valid(t_v), .fine(t_fine), .raw_code(t_raw),
    .lut_wr_en(lut_wr_en && lut_wr_trail), .lut_wr_addr, .lut_wr_data);

  path_merger u_pm (
    .clk, .rst, .lead_v(l_v), .lead_fine(l_fine), .trail_v(t_v), .trail_fine(t_fine),
    .slot(merged));

  delay_buffer #(.WIDTH($bits(fine_slot_t)), .DELAY_CYCLES(DELAY_CYCLES)) u_dly (
    .clk, .rst, .din(merged), .dout(delayed));

  trigger_gate u_gate (
    .clk, .rst, .trig_mode, .gate(trig_gate), .din(delayed), .dout(gated));

  delimiter_inserter u_ins (
    .clk, .rst, .din(gated), .coarse, .hbd_v, .hbd_frame, .dout(stamped));

  paring_unit u_par (
    .clk, .rst, .ch_id, .din(stamped), .out_valid(p_valid), .out_data(p_data), .lost);

  tot_filter u_tot (
    .clk, .rst, .enable(tot_en), .tot_min, .tot_max,
    .in_valid(p_valid), .in_data(p_data), .out_valid, .out_data);

endmodule
