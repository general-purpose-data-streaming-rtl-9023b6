`timescale 1ns/1ps
// Front merger unit: per-channel FIFOs, an N_IN-to-1 merger core and the
// output FIFO (32 channels per unit in the published design).
//
// Each channel writes its words into its own FIFO. A TDC word is written
// only while at least two entries are free, so the last entry is always
// left for the heartbeat delimiter and a frame boundary is never lost
// (otherwise the merger would wait for it forever). A dropped TDC word
// sets a per-channel flag that is ORed into the channel's next delimiter
// as HBD_FLAG_LOST. The drop policy is a choice of this implementation.
//
// The merger core reads the channel FIFOs and writes the output FIFO,
// whose head is offered to the back merger on out_valid/out_data; the back
// merger removes it with out_pop.
module front_merger
  import str_tdc_pkg::*;
#(
  parameter int N_IN           = 32,
  parameter int CH_FIFO_DEPTH  = 64,
  parameter int OUT_FIFO_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_IN-1:0]   ch_valid,
  input  logic [WORD_W-1:0] ch_data [N_IN],
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  input  logic              out_pop,
  output logic [N_IN-1:0]   ch_overflow      // a TDC word was dropped
);

  localparam int CAW = $clog2(CH_FIFO_DEPTH);
  localparam int OAW = $clog2(OUT_FIFO_DEPTH);

  logic [N_IN-1:0]   f_empty, f_full, f_pop, f_push, lost_q;
  logic [WORD_W-1:0] f_rdata [N_IN];
  logic [WORD_W-1:0] f_wdata [N_IN];
  logic [CAW:0]      f_count [N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    logic room, hbd;
    assign hbd  = is_hbd(ch_data[i]);
    assign room = f_count[i] < (CAW+1)'(CH_FIFO_DEPTH - 1);
    assign f_push[i]      = ch_valid[i] && (hbd ? !f_full[i] : room);
    assign ch_overflow[i] = ch_valid[i] && !hbd && !room;
    assign f_wdata[i]     = hbd ? (ch_data[i] | (WORD_W'(lost_q[i] ? HBD_FLAG_LOST : 8'h00) << 52))
                                : ch_data[i];

    always_ff @(posedge clk)
      if (rst) lost_q[i] <= 1'b0;
      else if (ch_valid[i] && hbd) lost_q[i] <= 1'b0;
      else if (ch_overflow[i])     lost_q[i] <= 1'b1;

    sync_fifo #(.WIDTH(WORD_W), .DEPTH(CH_FIFO_DEPTH)) u_fifo (
      .clk, .rst, .push(f_push[i]), .wdata(f_wdata[i]), .pop(f_pop[i]),
      .rdata(f_rdata[i]), .empty(f_empty[i]), .full(f_full[i]), .count(f_count[i]));
  end

  logic              m_valid, m_ready, o_empty, o_full;
  logic [WORD_W-1:0] m_data;
  logic              m_delim;
  logic [OAW:0]      o_count;

  merger_core #(.N_IN(N_IN)) u_merge (
    .clk, .rst, .in_valid(~f_empty), .in_data(f_rdata), .in_pop(f_pop),
    .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready), .delim_out(m_delim));

  assign m_ready = !o_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_FIFO_DEPTH)) u_out (
    .clk, .rst, .push(m_valid && m_ready), .wdata(m_data), .pop(out_pop),
    .rdata(out_data), .empty(o_empty), .full(o_full), .count(o_count));

  assign out_valid = !o_empty;

endmodule
