`timescale 1ns/1ps
// Pairing unit: combines each leading edge with the following trailing
// edge, writes the time over threshold (TOT) into the leading-edge word
// and discards the trailing edge, which halves the data rate. Delimiters
// pass through as delimiter words.
//
// A leading edge is held as "pending" until a trailing edge arrives; then
// one DT_TDC word with TOT = t_trail - t_lead (fine units, saturated to
// TOT_W bits) is emitted. Within one slot the order is: delimiter first,
// then the edges, in the order given by `trail_first`. A pending leading
// edge is emitted without TOT (TOT = 0, word bit 51 set, "unpaired") when
//   - a heartbeat delimiter arrives, so that it stays in its own frame,
//   - a new leading edge arrives before a trailing edge, or
//   - no trailing edge came within TOT_MAX_CYCLES cycles (the TOT range).
// A trailing edge without pending leading edge is dropped. Pairing and TOT
// embedding follow the published design; the three rules above are
// choices of this implementation.
//
// One slot can produce up to three words (flushed lead, delimiter, paired
// lead), so a small queue of QDEPTH words serialises them to one word per
// cycle on `out_valid`/`out_data` (no back-pressure). If the queue is
// short of room TDC words are dropped and counted (`lost` pulses, and the
// next delimiter carries HBD_FLAG_LOST); one entry is kept free for
// delimiters so a frame boundary is never lost.
module paring_unit
  import str_tdc_pkg::*;
#(
  parameter int QDEPTH        = 8,
  parameter int TOT_MAX_CYCLES = 1 << (TOT_W - FINE_W)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [CH_W-1:0]     ch_id,
  input  stamped_slot_t       din,
  output logic                out_valid,
  output logic [WORD_W-1:0]   out_data,
  output logic                lost
);

  localparam int QA_W = $clog2(QDEPTH);
  localparam int T_W  = CNT_W + FINE_W;

  // pending leading edge
  logic               pend_v;
  logic [T_W-1:0]     pend_t;
  logic [$clog2(TOT_MAX_CYCLES+1)-1:0] pend_age;

  // queue
  logic [WORD_W-1:0]  q [QDEPTH];
  logic [QA_W-1:0]    q_wp, q_rp;
  logic [QA_W:0]      q_cnt;

  // words produced in this cycle
  logic [WORD_W-1:0]  w [3];
  logic [2:0]         w_v;
  logic               w_is_hbd [3];
  logic               n_pend_v;
  logic [T_W-1:0]     n_pend_t;
  logic               unpaired_seen, lost_frame;

  logic [T_W-1:0] t_lead, t_trail;
  assign t_lead  = {din.coarse, din.fs.lead_fine};
  assign t_trail = {din.coarse, din.fs.trail_fine};

  function automatic logic [WORD_W-1:0] tdc_word(input logic [CH_W-1:0] ch,
      input logic [T_W-1:0] tl, input logic paired, input logic [T_W-1:0] tt);
    tdc_word_t r;
    logic [T_W-1:0] d;
    d        = tt - tl;
    r.dtype  = DT_TDC;
    r.ch     = ch;
    r.rsv    = {1'b0, !paired};
    r.tot    = !paired ? '0 : (d > T_W'({TOT_W{1'b1}})) ? {TOT_W{1'b1}} : d[TOT_W-1:0];
    r.coarse = tl[T_W-1:FINE_W];
    r.fine   = tl[FINE_W-1:0];
    return r;
  endfunction

  always_comb begin
    logic pv;
    logic [T_W-1:0] pt;
    logic flushed;
    int   k;
    pv = pend_v;
    pt = pend_t;
    flushed = 1'b0;
    k  = 0;
    w_v = '0;
    for (int i = 0; i < 3; i++) begin
      w[i] = '0;
      w_is_hbd[i] = 1'b0;
    end
    // pending lead too old, or frame boundary, or a new lead first
    if (pv && (pend_age >= TOT_MAX_CYCLES[$bits(pend_age)-1:0] || din.hbd_v ||
               (din.fs.lead_v && !(din.fs.trail_v && din.fs.trail_first)))) begin
      w[k] = tdc_word(ch_id, pt, 1'b0, '0); w_v[k] = 1'b1; k++;
      pv = 1'b0;
      flushed = 1'b1;
    end
    if (din.hbd_v) begin
      w[k] = make_hbd(din.frame, (lost_frame || lost ? HBD_FLAG_LOST : 8'h00) |
                      (unpaired_seen || flushed ? HBD_FLAG_UNPAIRED : 8'h00));
      w_is_hbd[k] = 1'b1; w_v[k] = 1'b1; k++;
    end
    if (din.fs.trail_v && (din.fs.trail_first || !din.fs.lead_v)) begin
      // trailing edge closes the pending pulse, then a new lead may start
      if (pv) begin
        w[k] = tdc_word(ch_id, pt, 1'b1, t_trail); w_v[k] = 1'b1; k++;
        pv = 1'b0;
      end
      if (din.fs.lead_v) begin
        pv = 1'b1;
        pt = t_lead;
      end
    end else if (din.fs.lead_v && din.fs.trail_v) begin
      // a complete pulse inside this cycle
      w[k] = tdc_word(ch_id, t_lead, 1'b1, t_trail); w_v[k] = 1'b1; k++;
    end else if (din.fs.lead_v) begin
      pv = 1'b1;
      pt = t_lead;
    end
    n_pend_v = pv;
    n_pend_t = pt;
  end

  always_ff @(posedge clk) begin
    logic [QA_W-1:0] wp;
    logic [QA_W:0]   cnt;
    logic            drop;
    if (rst) begin
      pend_v        <= 1'b0;
      pend_t        <= '0;
      pend_age      <= '0;
      q_wp          <= '0;
      q_rp          <= '0;
      q_cnt         <= '0;
      lost          <= 1'b0;
      lost_frame    <= 1'b0;
      unpaired_seen <= 1'b0;
    end else begin
      pend_v <= n_pend_v;
      pend_t <= n_pend_t;
      if (!n_pend_v || (din.fs.lead_v && n_pend_t == t_lead))
        pend_age <= '0;
      else if (pend_age < TOT_MAX_CYCLES[$bits(pend_age)-1:0])
        pend_age <= pend_age + 1'b1;
      // pop one word per cycle
      wp  = q_wp;
      cnt = q_cnt;
      if (q_cnt != 0) begin
        q_rp <= q_rp + 1'b1;
        cnt  = cnt - 1'b1;
      end
      drop = 1'b0;
      for (int i = 0; i < 3; i++)
        if (w_v[i]) begin
          if ((w_is_hbd[i] && cnt < (QA_W+1)'(QDEPTH)) ||
              (!w_is_hbd[i] && cnt < (QA_W+1)'(QDEPTH - 1))) begin
            q[wp] <= w[i];
            wp  = wp + 1'b1;
            cnt = cnt + 1'b1;
          end else
            drop = 1'b1;
        end
      q_wp  <= wp;
      q_cnt <= cnt;
      lost  <= drop;
      if (din.hbd_v) begin
        lost_frame    <= drop;
        unpaired_seen <= 1'b0;
      end else begin
        if (drop) lost_frame <= 1'b1;
        if (w_v[0] && !w_is_hbd[0] && w[0][51]) unpaired_seen <= 1'b1;
      end
    end
  end

  assign out_valid = (q_cnt != 0);
  assign out_data  = q[q_rp];

  initial assert (QDEPTH == (1 << QA_W)) else $error("QDEPTH must be a power of two");

endmodule
