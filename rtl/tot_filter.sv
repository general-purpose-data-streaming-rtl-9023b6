`timescale 1ns/1ps
// TOT filter: removes TDC words whose time over threshold lies outside a
// programmable window, e.g. to reject noise pulses or unpaired edges.
//
// When `enable` is high, a DT_TDC word passes only if
// tot_min <= TOT <= tot_max (fine units of 8 ns / 2**FINE_W). Delimiter
// words always pass. With `enable` low everything passes. That a TOT
// filter follows the pairing unit is from the published design; the
// window rule is a choice of this implementation. Timing: one register
// stage, no back-pressure.
module tot_filter
  import str_tdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [TOT_W-1:0]  tot_min,
  input  logic [TOT_W-1:0]  tot_max,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data
);

  tdc_word_t t;
  logic      keep;

  assign t    = in_data;
  assign keep = is_hbd(in_data) || !enable || (t.tot >= tot_min && t.tot <= tot_max);

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid && keep;
    out_data <= in_data;
  end

endmodule
