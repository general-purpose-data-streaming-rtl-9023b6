`timescale 1ns/1ps
// Merger core: N_IN-to-1 merging of heartbeat-framed data streams, the
// common engine of the front and back merger units.
//
// Each input is the head of a FIFO (in_valid = not empty, in_data = head,
// in_pop removes it). Data words are forwarded, one per cycle, from the
// inputs that currently hold data, so words leave roughly in the order in
// which they arrived; a round-robin pointer decides between inputs that
// hold data at the same time (arrival order among simultaneous words is
// not defined by the published design, round-robin is a choice of this
// implementation). When an input's head is a heartbeat delimiter the
// delimiter is consumed and the input is "stopped": no more words are read
// from it. When all inputs are stopped, one delimiter is emitted that
// carries the frame number and the OR of the flags of the merged
// delimiters (plus HBD_FLAG_MISMATCH if their frame numbers differed), and
// all inputs are released. This stop-and-regenerate rule follows the
// published design and rebuilds the heartbeat frame at the output.
//
// Throughput: one word per cycle (64 bit x 125 MHz = 8 Gbps) as long as
// `out_ready` is high; delimiters are consumed in parallel with data.
// `out_valid` and `out_data` are combinational; the word is taken in a
// cycle with out_valid && out_ready.
module merger_core
  import str_tdc_pkg::*;
#(
  parameter int N_IN = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N_IN-1:0]         in_valid,
  input  logic [WORD_W-1:0]       in_data [N_IN],
  output logic [N_IN-1:0]         in_pop,
  output logic                    out_valid,
  output logic [WORD_W-1:0]       out_data,
  input  logic                    out_ready,
  output logic                    delim_out      // a merged delimiter left
);

  localparam int IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [N_IN-1:0]    stopped;
  logic [N_IN-1:0]    head_hbd, cand, take_hbd;
  logic [IW-1:0]      rr;
  logic               sel_v;
  logic [IW-1:0]      sel;
  logic [IW:0]        idx;
  logic               all_stopped;
  logic               seen;
  logic [FRAME_W-1:0] hb_frame;
  logic [7:0]         hb_flags;
  logic [FRAME_W-1:0] ref_frame;
  logic [7:0]         take_flags;

  always_comb begin
    for (int i = 0; i < N_IN; i++) begin
      head_hbd[i] = in_valid[i] && is_hbd(in_data[i]);
      cand[i]     = in_valid[i] && !head_hbd[i] && !stopped[i];
      take_hbd[i] = head_hbd[i] && !stopped[i];
    end
    all_stopped = &stopped;
    // round-robin choice starting at rr
    sel_v = 1'b0;
    sel   = '0;
    for (int k = 0; k < N_IN; k++) begin
      idx = (IW+1)'(rr) + (IW+1)'(k);
      if (idx >= (IW+1)'(N_IN)) idx = idx - (IW+1)'(N_IN);
      if (!sel_v && cand[idx[IW-1:0]]) begin
        sel_v = 1'b1;
        sel   = idx[IW-1:0];
      end
    end
    // delimiters taken in this cycle: the reference frame number is the
    // first one seen in this frame (lowest input index on a tie)
    ref_frame = hb_frame;
    if (!seen)
      for (int i = N_IN - 1; i >= 0; i--)
        if (take_hbd[i]) ref_frame = in_data[i][FRAME_W-1:0];
    take_flags = '0;
    for (int i = 0; i < N_IN; i++)
      if (take_hbd[i]) begin
        take_flags = take_flags | in_data[i][59:52];
        if (in_data[i][FRAME_W-1:0] != ref_frame) take_flags = take_flags | HBD_FLAG_MISMATCH;
      end
    out_valid = all_stopped || sel_v;
    out_data  = all_stopped ? make_hbd(hb_frame, hb_flags) : in_data[sel];
    in_pop    = take_hbd;
    if (!all_stopped && sel_v && out_ready) in_pop[sel] = 1'b1;
  end

  assign delim_out = all_stopped && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      stopped  <= '0;
      rr       <= '0;
      seen     <= 1'b0;
      hb_frame <= '0;
      hb_flags <= '0;
    end else begin
      if (all_stopped) begin
        if (out_ready) begin
          stopped  <= '0;
          seen     <= 1'b0;
          hb_flags <= '0;
        end
      end else begin
        if (sel_v && out_ready)
          rr <= (int'(sel) == N_IN - 1) ? '0 : sel + 1'b1;
        stopped  <= stopped | take_hbd;
        hb_flags <= hb_flags | take_flags;
        if (|take_hbd) begin
          seen     <= 1'b1;
          hb_frame <= ref_frame;
        end
      end
    end
  end

endmodule
