`timescale 1ns/1ps
// Testbench of one complete TDC channel (delay-line model, sampler, both
// timing units, path merger, 2 us delay buffer, trigger gate, delimiter
// inserter, pairing unit and TOT filter) with the power-up calibration
// table.
//
// The testbench supplies the 16-bit coarse counter and a heartbeat
// delimiter every 250 cycles, and applies pulses of random start time:
// most are 10..150 ns wide, some are 4 ns "noise" pulses, which the TOT
// filter (window 8 ns .. max) must remove. Checks:
//   - exactly one paired word per wide pulse, in order, never unpaired,
//     except pulses cut by a heartbeat delimiter (flushed unpaired, TOT 0,
//     and then removed by the filter);
//   - timestamp (coarse x 8 ns + fine) minus true leading time is constant
//     within 2 x 110 ps over all pulses (the constant is the latency);
//   - TOT equals the pulse width within 2 x 110 ps;
//   - one delimiter per heartbeat with increasing frame number, and no
//     word placed in the wrong frame (word time after its delimiter).
module tb_tdc_channel;
  import str_tdc_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk, clk_fast, rst = 1;
  initial forever begin clk = 1; #4; clk = 0; #4; end
  initial forever begin clk_fast = 1; #1; clk_fast = 0; #1; end

  localparam real PS_PER_FINE = 8000.0 / 8192.0;
  localparam int  NPULSE = 150;

  logic hit = 0;
  logic [CNT_W-1:0]   coarse = '0;
  logic               hbd_v = 0;
  logic [FRAME_W-1:0] hbd_frame = '0;
  logic               out_valid, lost;
  logic [WORD_W-1:0]  out_data;

  tdc_channel dut (
    .clk, .clk_fast, .rst, .hit, .cal_clk(1'b0), .cal_sel(1'b0), .ch_id(7'd5),
    .coarse, .hbd_v, .hbd_frame, .trig_mode(1'b0), .trig_gate(1'b0),
    .tot_en(1'b1), .tot_min(22'd8192), .tot_max('1),
    .lut_wr_en(1'b0), .lut_wr_trail(1'b0), .lut_wr_addr(8'd0), .lut_wr_data(13'd0),
    .out_valid, .out_data, .lost);

  // coarse counter and heartbeat, delimiter when the counter passes 0 mod 250
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    coarse <= coarse + 1'b1;
    hbd_v <= ((cyc + 1) % 250 == 0);
    if ((cyc + 1) % 250 == 0) hbd_frame <= hbd_frame + 1'b1;
  end

  real lead_q [$], width_q [$], skip_lead [$], skip_width [$];

  // timestamp minus true time, with the 16-bit wrap of the counter undone
  function automatic real wrap_ofs(real d);
    while (d < -300000.0) d += 65536.0 * 8000.0;
    while (d > 65536.0 * 8000.0 - 300000.0) d -= 65536.0 * 8000.0;
    return d;
  endfunction
  int  n_hbd = 0, n_words = 0, n_noise = 0;
  real ofs_min = 1e30, ofs_max = -1e30;

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    for (int k = 0; k < NPULSE; k++) begin
      real gap, w;
      gap = 100.0 + $urandom_range(0, 200000) / 1000.0;
      if ($urandom_range(0, 4) == 0) begin w = 4.0; n_noise++; end
      else w = 10.0 + $urandom_range(0, 140000) / 1000.0;
      #(gap);
      hit = 1;
      if (w > 5.0) begin lead_q.push_back($realtime * 1000.0); width_q.push_back(w * 1000.0); end
      #(w);
      hit = 0;
    end
  end

  always @(posedge clk) if (!rst && lost) begin
    failures++; $display("FAIL: unexpected lost");
  end

  initial begin
    wait (!rst);
    forever begin
      @(posedge clk);
      if (out_valid) begin
        tdc_word_t t;
        t = out_data;
        if (is_hbd(out_data)) begin
          n_hbd++;
          `CHECK(out_data[23:0] == 24'(n_hbd), $sformatf("frame %0d exp %0d", out_data[23:0], n_hbd))
        end else begin
          real meas, ofs, tot_ps;
          `CHECK(t.dtype == DT_TDC && t.ch == 7'd5 && !t.rsv[0], "word type, channel, paired")
          meas = real'(t.coarse) * 8000.0 + real'(t.fine) * PS_PER_FINE;
          // pulses that produced no word before this one are kept for the
          // frame-boundary check at the end
          while (lead_q.size() > 1 && n_words > 0 && wrap_ofs(meas - lead_q[0]) > ofs_max + 50000.0) begin
            skip_lead.push_back(lead_q.pop_front());
            skip_width.push_back(width_q.pop_front());
          end
          if (lead_q.size() == 0) begin
            failures++; $display("FAIL: extra word");
          end else begin
            real lt, w;
            lt = lead_q.pop_front(); w = width_q.pop_front();
            ofs = wrap_ofs(meas - lt);
            if (ofs < ofs_min) ofs_min = ofs;
            if (ofs > ofs_max) ofs_max = ofs;
            tot_ps = real'(t.tot) * PS_PER_FINE;
            `CHECK(tot_ps > w - 220.0 && tot_ps < w + 220.0, $sformatf("TOT %0.0f ps width %0.0f ps", tot_ps, w))
            // the word belongs to frame n_hbd: its counter value lies in [n_hbd*250, ...)
            `CHECK(t.coarse >= 16'(n_hbd * 250) || n_hbd * 250 >= 65536, "word in its own frame")
            n_words++;
          end
        end
      end
    end
  end

  initial begin
    wait (!rst);
    wait (lead_q.size() == 0 && n_words > 0);
    repeat (400) @(posedge clk);
    // A pulse whose trailing edge falls after the next heartbeat delimiter
    // is flushed unpaired at the delimiter (TOT 0) and then removed by the
    // TOT filter. Every missing word must be such a pulse.
    foreach (skip_lead[k]) begin
      real a, b;
      a = skip_lead[k] + ofs_min;
      b = a + skip_width[k];
      `CHECK($floor((a - 8000.0) / 2.0e6) != $floor((b + 8000.0) / 2.0e6),
             $sformatf("pulse at %0.0f ps width %0.0f ps lost without crossing a frame boundary", skip_lead[k], skip_width[k]))
    end
    `CHECK(n_words + skip_lead.size() == NPULSE - n_noise, $sformatf("words %0d + split %0d expected %0d", n_words, skip_lead.size(), NPULSE - n_noise))
    `CHECK(n_words > (NPULSE - n_noise) * 3 / 4, $sformatf("words %0d expected %0d", n_words, NPULSE - n_noise))
    `CHECK(n_noise > 0, "noise pulses were applied")
    `CHECK(n_hbd >= 20, $sformatf("delimiters %0d", n_hbd))
    `CHECK(ofs_max - ofs_min < 220.0, $sformatf("timestamp spread %0.1f ps (latency %0.1f ns)", ofs_max - ofs_min, ofs_min / 1000.0))
    $display("timestamp spread %0.1f ps, latency %0.1f ns, %0d words, %0d delimiters",
             ofs_max - ofs_min, ofs_min / 1000.0, n_words, n_hbd);
    `TB_FINISH
  end

  initial begin
    #(NPULSE * 500.0 + 20000.0);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
