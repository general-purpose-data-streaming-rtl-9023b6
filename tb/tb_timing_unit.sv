`timescale 1ns/1ps
// Testbench of the timing unit (leading and trailing instances) driven by
// the delay-line model and sampler, with 125 MHz and 500 MHz clocks whose
// rising edges coincide.
//
// Pulses of random start time and width are applied. For every edge the
// unit reports, the timestamp (125 MHz cycle of `valid` x 8 ns + fine
// time) is compared with the true edge time known here: after removing
// the average offset (the fixed latency) every difference must lie within
// a tolerance. Pass 1 uses the power-up linear table (tolerance 110 ps,
// because the model's 30 ps taps differ from the nominal 31.25 ps);
// pass 2 writes a table computed here from the model's tap delays
// (bin centres) through the write port and must reach 60 ps worst case
// (the last bin also covers the 80 ps by which the line is shorter than
// 2 ns) and 30 ps rms. Also
// checked: one output per edge, all four phase regions used.
module tb_timing_unit;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk, clk_fast, rst = 1;
  initial forever begin clk = 1; #4; clk = 0; #4; end
  initial forever begin clk_fast = 1; #1; clk_fast = 0; #1; end

  logic hit = 0;
  logic [191:0] taps;
  logic [63:0]  code;
  logic lv, tv;
  logic [12:0] lf, tf;
  logic [7:0]  lraw, traw;
  logic        wr_en = 0, wr_trail = 0;
  logic [7:0]  wr_addr = 0;
  logic [12:0] wr_data = 0;

  tdl_carry_chain u_tdl (.hit_in(hit), .cal_clk(1'b0), .cal_sel(1'b0), .taps);
  tdl_sampler     u_smp (.clk_fast, .taps, .code);
  timing_unit #(.TRAILING(1'b0)) dut_l (.clk, .clk_fast, .rst, .code, .valid(lv), .fine(lf),
    .raw_code(lraw), .lut_wr_en(wr_en && !wr_trail), .lut_wr_addr(wr_addr), .lut_wr_data(wr_data));
  timing_unit #(.TRAILING(1'b1)) dut_t (.clk, .clk_fast, .rst, .code, .valid(tv), .fine(tf),
    .raw_code(traw), .lut_wr_en(wr_en && wr_trail), .lut_wr_addr(wr_addr), .lut_wr_data(wr_data));

  longint ncyc = 0;
  always @(posedge clk) ncyc <= ncyc + 1;

  real    edge_t [2][$];     // true edge times, ps
  real    meas_t [2][$];     // measured timestamps, ps
  bit [3:0] phases_seen [2];

  always @(negedge clk) begin
    if (lv && !rst) begin meas_t[0].push_back(real'(ncyc) * 8000.0 + real'(lf) * 8000.0 / 8192.0); phases_seen[0][lraw[7:6]] = 1; end
    if (tv && !rst) begin meas_t[1].push_back(real'(ncyc) * 8000.0 + real'(tf) * 8000.0 / 8192.0); phases_seen[1][traw[7:6]] = 1; end
  end

  function automatic int tap_delay_ps(int k);
    bit is_o = (k % 2 == 0) && (k != 0);
    return 10 * (k + 1) + (is_o ? -2 : 2);
  endfunction

  task automatic pulses(int n);
    for (int i = 0; i < n; i++) begin
      #(20.0 + $urandom_range(0, 20000) / 1000.0);
      hit = 1; edge_t[0].push_back($realtime * 1000.0);
      #(10.0 + $urandom_range(0, 20000) / 1000.0);
      hit = 0; edge_t[1].push_back($realtime * 1000.0);
    end
    #200;
  endtask

  task automatic evaluate(real tol, string tag);
    for (int e = 0; e < 2; e++) begin
      real mean, dev, worst, ss;
      `CHECK(meas_t[e].size() == edge_t[e].size(),
             $sformatf("%s edge %0d: %0d outputs for %0d edges", tag, e, meas_t[e].size(), edge_t[e].size()))
      if (meas_t[e].size() == edge_t[e].size() && edge_t[e].size() > 0) begin
        mean = 0;
        foreach (edge_t[e][i]) mean += meas_t[e][i] - edge_t[e][i];
        mean /= edge_t[e].size();
        worst = 0;
        ss = 0;
        foreach (edge_t[e][i]) begin
          dev = meas_t[e][i] - edge_t[e][i] - mean;
          if (dev < 0) dev = -dev;
          if (dev > worst) worst = dev;
          ss += dev * dev;
          `CHECK(dev <= tol, $sformatf("%s edge %0d #%0d deviation %0.1f ps", tag, e, i, dev))
        end
        $display("%s edge %0d: %0d edges, worst deviation %0.1f ps, rms %0.1f ps", tag, e, edge_t[e].size(), worst, $sqrt(ss / edge_t[e].size()));
        `CHECK($sqrt(ss / edge_t[e].size()) <= tol / 2.0, $sformatf("%s edge %0d rms too large", tag, e))
      end
      `CHECK(phases_seen[e] == 4'hF, $sformatf("%s phases seen %b", tag, phases_seen[e]))
      edge_t[e].delete(); meas_t[e].delete(); phases_seen[e] = '0;
    end
  endtask

  initial begin
    phases_seen[0] = '0; phases_seen[1] = '0;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    #1.234;
    pulses(300);
    evaluate(110.0, "linear table");
    // calibrated table: fine time of a code = start of its 2 ns phase +
    // 2 ns - age of the edge at the sampling instant (bin centre)
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 256; a++) begin
        int cnt, lo, hi;
        real age, ps;
        cnt = 64 - (a % 64);
        // a group of three taps reads 1 on a rising edge once its fastest
        // tap switched, on a falling edge (inverted) once its slowest did
        lo  = tap_delay_ps(3 * (cnt - 1) + 2 * e);
        hi  = (cnt == 64) ? 2000 + tap_delay_ps(2 * e) : tap_delay_ps(3 * cnt + 2 * e);
        age = (lo + hi) / 2.0;
        ps  = (a / 64) * 2000.0 + 2000.0 - age;
        @(negedge clk);
        wr_en = 1; wr_trail = e[0]; wr_addr = 8'(a); wr_data = 13'(int'(ps * 8192.0 / 8000.0));
      end
    @(negedge clk);
    wr_en = 0;
    repeat (4) @(posedge clk);
    #0.777;
    pulses(300);
    evaluate(60.0, "calibrated table");
    `TB_FINISH
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
