`timescale 1ns/1ps
// Testbench of the pairing unit followed by the TOT filter.
//
// Random slots (leading and trailing edges, sometimes both in one cycle in
// either order, occasional heartbeat delimiters, and long gaps that let a
// pending leading edge time out) are applied. A reference model written
// here as a list of events predicts the word stream: paired leading words
// with TOT = t_trail - t_lead, unpaired leading words (TOT 0, bit 51) for
// a new lead before a trailing edge, a delimiter, or 512 cycles without
// trailing edge, delimiters carrying the unpaired flag, and dropped
// orphan trailing edges. The unit's output must equal that stream word
// for word, and the TOT filter's output must equal the same stream with
// the words outside the TOT window removed.
module tb_paring_unit;
  import str_tdc_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  stamped_slot_t din;
  logic pv, fv, lost;
  logic [WORD_W-1:0] pd, fd;
  localparam logic [TOT_W-1:0] TMIN = 22'd20000, TMAX = 22'd200000;

  paring_unit dut (.clk, .rst, .ch_id(7'd42), .din, .out_valid(pv), .out_data(pd), .lost);
  tot_filter  u_f (.clk, .rst, .enable(1'b1), .tot_min(TMIN), .tot_max(TMAX),
                   .in_valid(pv), .in_data(pd), .out_valid(fv), .out_data(fd));

  logic [WORD_W-1:0] exp_q [$], expf_q [$];
  int n_paired = 0, n_unp = 0, n_hbd = 0, n_timeout = 0, n_same = 0, n_tfirst = 0, n_filtered = 0;

  // reference model state
  bit      m_pend;
  longint  m_t;          // time of pending lead, fine units, 29 bits
  int      m_cyc;
  bit      m_unp_seen;

  function automatic logic [WORD_W-1:0] w_tdc(longint tl, bit paired, longint tt);
    longint d;
    logic [WORD_W-1:0] w;
    d = (tt - tl) & ((64'd1 << 29) - 1);
    if (d > 22'h3FFFFF) d = 22'h3FFFFF;
    w = '0;
    w[63:60] = 4'hB;
    w[59:53] = 7'd42;
    w[51]    = !paired;
    w[50:29] = paired ? 22'(d) : 22'd0;
    w[28:0]  = 29'(tl);
    return w;
  endfunction

  function automatic void push(logic [WORD_W-1:0] w);
    exp_q.push_back(w);
    if (w[63:60] != 4'hB || (w[50:29] >= TMIN && w[50:29] <= TMAX)) expf_q.push_back(w);
    else n_filtered++;
  endfunction

  task automatic model(int cyc, stamped_slot_t s);
    longint tl, tt;
    bit flush;
    tl = {s.coarse, s.fs.lead_fine};
    tt = {s.coarse, s.fs.trail_fine};
    flush = m_pend && ((cyc - m_cyc >= 513) || s.hbd_v ||
                       (s.fs.lead_v && !(s.fs.trail_v && s.fs.trail_first)));
    if (flush) begin
      push(w_tdc(m_t, 0, 0)); m_pend = 0; m_unp_seen = 1; n_unp++;
      if (cyc - m_cyc >= 513) n_timeout++;
    end
    if (s.hbd_v) begin
      logic [WORD_W-1:0] h;
      h = make_hbd(s.frame, m_unp_seen ? HBD_FLAG_UNPAIRED : 8'h00);
      push(h); m_unp_seen = 0; n_hbd++;
    end
    if (s.fs.trail_v && (s.fs.trail_first || !s.fs.lead_v)) begin
      if (m_pend) begin push(w_tdc(m_t, 1, tt)); m_pend = 0; n_paired++; end
      if (s.fs.lead_v) begin m_pend = 1; m_t = tl; m_cyc = cyc; n_tfirst++; end
    end else if (s.fs.lead_v && s.fs.trail_v) begin
      push(w_tdc(tl, 1, tt)); n_paired++; n_same++;
    end else if (s.fs.lead_v) begin
      m_pend = 1; m_t = tl; m_cyc = cyc;
    end
  endtask

  // compare both output streams
  always @(negedge clk) if (!rst) begin
    if (pv) begin
      `CHECK(exp_q.size() > 0 && pd == exp_q[0],
             $sformatf("pairing out %h exp %h", pd, exp_q.size() ? exp_q[0] : 64'hx))
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (fv) begin
      `CHECK(expf_q.size() > 0 && fd == expf_q[0], $sformatf("filter out %h", fd))
      if (expf_q.size() > 0) void'(expf_q.pop_front());
    end
    `CHECK(!lost, "no loss at this rate")
  end

  initial begin
    logic [CNT_W-1:0] cnt;
    din = '0;
    m_pend = 0; m_unp_seen = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    cnt = 16'd60000;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      cnt = cnt + 1'b1;
      din = '0;
      din.coarse = cnt;
      if ((cyc / 2000) % 3 != 2) begin       // busy periods and quiet periods
        din.fs.lead_v  = ($urandom_range(0, 15) == 0);
        din.fs.trail_v = ($urandom_range(0, 15) == 0);
      end else if (cyc % 700 == 5) din.fs.lead_v = 1;
      din.fs.lead_fine  = FINE_W'($urandom);
      din.fs.trail_fine = FINE_W'($urandom);
      din.fs.trail_first = din.fs.lead_v && din.fs.trail_v && (din.fs.trail_fine < din.fs.lead_fine);
      din.hbd_v = (cnt == 0) || ($urandom_range(0, 1999) == 0);
      din.frame = 24'($urandom);
      model(cyc, din);
    end
    @(negedge clk);
    din = '0;
    repeat (20) @(negedge clk);
    `CHECK(exp_q.size() == 0 && expf_q.size() == 0, $sformatf("words missing: %0d", exp_q.size()))
    $display("paired %0d (same cycle %0d, trailing first %0d), unpaired %0d (timeout %0d), delimiters %0d, filtered %0d",
             n_paired, n_same, n_tfirst, n_unp, n_timeout, n_hbd, n_filtered);
    `CHECK(n_same > 0 && n_tfirst > 0 && n_timeout > 0 && n_hbd > 3 && n_filtered > 0, "all cases exercised")
    `TB_FINISH
  end

  initial begin
    repeat (21000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
