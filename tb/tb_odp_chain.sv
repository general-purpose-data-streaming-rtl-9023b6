`timescale 1ns/1ps
// Testbench of the fixed-latency part of a TDC channel: path merger,
// 2 us delay buffer, trigger gate, delimiter generator and delimiter
// inserter, connected as in the channel.
//
// Random leading/trailing fine times, trigger-gate settings and a
// heartbeat counter that is started close to its wrap-around are applied.
// A model kept here predicts every output slot: the input slot of exactly
// 253 cycles earlier (1 path merger + 250 delay + 1 gate + 1 inserter),
// with trail_first recomputed, edges removed when triggered mode was on
// and the gate closed, and the counter value, heartbeat and frame number
// that the delimiter generator saw. The fixed latency itself is checked.
module tb_odp_chain;
  import str_tdc_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  localparam int LAT = 253;

  logic lv = 0, tv = 0, trig_mode = 0, gate = 0, heartbeat = 0;
  logic [FINE_W-1:0] lf = 0, tf = 0;
  logic [CNT_W-1:0] counter = 0;
  logic [FRAME_W-1:0] frame = 0;
  fine_slot_t merged, delayed, gated;
  logic hbd_v;
  logic [FRAME_W-1:0] hbd_frame;
  logic [CNT_W-1:0] coarse;
  stamped_slot_t out;

  path_merger u_pm (.clk, .rst, .lead_v(lv), .lead_fine(lf), .trail_v(tv), .trail_fine(tf), .slot(merged));
  delay_buffer #(.WIDTH($bits(fine_slot_t)), .DELAY_CYCLES(250)) u_dly (.clk, .rst, .din(merged), .dout(delayed));
  trigger_gate u_g (.clk, .rst, .trig_mode, .gate, .din(delayed), .dout(gated));
  delimiter_generator u_dg (.clk, .rst, .heartbeat, .counter, .frame, .hbd_v, .hbd_frame, .coarse);
  delimiter_inserter u_ins (.clk, .rst, .din(gated), .coarse, .hbd_v, .hbd_frame, .dout(out));

  // history of applied inputs, indexed by cycle
  localparam int N = 3000;
  fine_slot_t h_in [N];
  logic h_mode [N], h_gate [N], h_hb [N];
  logic [CNT_W-1:0] h_cnt [N];
  logic [FRAME_W-1:0] h_frame [N];
  int nhb = 0, ngated = 0, nboth = 0;

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst <= 0;
    counter = 16'd65536 - 16'd700;
    frame = 24'd77;
    for (cyc = 0; cyc < N; cyc++) begin
      @(negedge clk);
      // check the output produced by earlier inputs
      if (cyc >= LAT + 2) begin
        fine_slot_t e;
        e = h_in[cyc - LAT];
        e.trail_first = e.lead_v && e.trail_v && (e.trail_fine < e.lead_fine);
        if (h_mode[cyc - 2] && !h_gate[cyc - 2]) begin
          e.lead_v = 0; e.trail_v = 0; e.trail_first = 0;
        end
        `CHECK(out.fs.lead_v == e.lead_v && out.fs.trail_v == e.trail_v &&
               (!e.lead_v || out.fs.lead_fine == e.lead_fine) &&
               (!e.trail_v || out.fs.trail_fine == e.trail_fine) &&
               out.fs.trail_first == e.trail_first,
               $sformatf("cycle %0d slot mismatch", cyc))
        `CHECK(out.coarse == h_cnt[cyc - 2], $sformatf("cycle %0d coarse %0d exp %0d", cyc, out.coarse, h_cnt[cyc - 2]))
        `CHECK(out.hbd_v == h_hb[cyc - 2], $sformatf("cycle %0d hbd_v", cyc))
        if (out.hbd_v) begin
          `CHECK(out.frame == h_frame[cyc - 2], "delimiter frame number")
          nhb++;
        end
        if (h_mode[cyc - 2] && !h_gate[cyc - 2] && (h_in[cyc - LAT].lead_v || h_in[cyc - LAT].trail_v)) ngated++;
        if (e.trail_first) nboth++;
      end
      // drive the next cycle
      lv = ($urandom_range(0, 3) == 0);
      tv = ($urandom_range(0, 3) == 0);
      lf = FINE_W'($urandom);
      tf = FINE_W'($urandom);
      trig_mode = (cyc > 1500);
      gate = ($urandom_range(0, 1) == 0);
      counter = counter + 1'b1;
      heartbeat = (counter == 0);
      if (heartbeat) frame = frame + 1'b1;
      h_in[cyc].lead_v = lv; h_in[cyc].lead_fine = lf; h_in[cyc].trail_v = tv;
      h_in[cyc].trail_fine = tf; h_in[cyc].trail_first = 0;
      h_mode[cyc] = trig_mode; h_gate[cyc] = gate; h_hb[cyc] = heartbeat;
      h_cnt[cyc] = counter; h_frame[cyc] = frame;
    end
    `CHECK(nhb == 1, $sformatf("delimiters seen %0d", nhb))
    `CHECK(ngated > 10, "trigger gate exercised")
    `CHECK(nboth > 10, "trailing-first order exercised")
    `TB_FINISH
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
