`timescale 1ns/1ps
// Back merger unit: merges the streams of several front merger units
// (four in the generic structure, two HR-TDC mezzanine cards in the
// high-resolution system) into the final heartbeat-framed stream, with an
// output FIFO in front of the network core.
//
// Inputs are FIFO heads (in_valid/in_data, removed with in_pop). The same
// merger core as in the front merger stops each input at its delimiter
// and emits one merged delimiter per frame. The output is a valid/ready
// stream: a word moves when out_valid && out_ready.
module back_merger
  import str_tdc_pkg::*;
#(
  parameter int N_IN           = 4,
  parameter int OUT_FIFO_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_IN-1:0]   in_valid,
  input  logic [WORD_W-1:0] in_data [N_IN],
  output logic [N_IN-1:0]   in_pop,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  input  logic              out_ready,
  output logic              delim_out
);

  localparam int OAW = $clog2(OUT_FIFO_DEPTH);

  logic              m_valid, m_ready, o_empty, o_full;
  logic [WORD_W-1:0] m_data;
  logic [OAW:0]      o_count;

  merger_core #(.N_IN(N_IN)) u_merge (
    .clk, .rst, .in_valid, .in_data, .in_pop,
    .out_valid(m_valid), .out_data(m_data), .out_ready(m_ready), .delim_out);

  assign m_ready = !o_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_FIFO_DEPTH)) u_out (
    .clk, .rst, .push(m_valid && m_ready), .wdata(m_data), .pop(out_valid && out_ready),
    .rdata(out_data), .empty(o_empty), .full(o_full), .count(o_count));

  assign out_valid = !o_empty;

endmodule
