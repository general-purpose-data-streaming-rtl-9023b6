`timescale 1ns/1ps
// Testbench of the heartbeat unit: free-running counter and heartbeat
// period (2**16 cycles), frame number increment, counter load from LACCP
// (including a load that changes an aligned counter, which must raise
// sync_err) and frame-number load. A reference counter kept here is
// compared with the unit every cycle.
module tb_heartbeat_unit;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  logic load = 0, frame_load = 0;
  logic [15:0] load_value = '0;
  logic [23:0] frame_in = '0;
  logic [15:0] counter;
  logic [23:0] frame;
  logic heartbeat, locked, sync_err;

  heartbeat_unit dut (.*);

  int ref_cnt, ref_frame, hb_seen, last_hb, period_ok;

  initial begin
    hb_seen = 0; last_hb = -1; period_ok = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    ref_cnt = 0; ref_frame = 0;
    // free run for three frames, check every cycle
    for (int cyc = 0; cyc < 3 * 65536 + 100; cyc++) begin
      @(negedge clk);
      if (counter != 16'(ref_cnt) || frame != 24'(ref_frame)) begin
        `CHECK(0, $sformatf("cnt %0d/%0d frame %0d/%0d", counter, ref_cnt, frame, ref_frame))
        break;
      end
      `CHECK(heartbeat == (ref_cnt == 0), "heartbeat at counter 0")
      if (heartbeat) begin
        if (last_hb >= 0) `CHECK(cyc - last_hb == 65536, $sformatf("heartbeat period %0d", cyc - last_hb))
        last_hb = cyc;
        hb_seen++;
      end
      ref_cnt = (ref_cnt + 1) % 65536;
      if (ref_cnt == 0) ref_frame++;
    end
    `CHECK(hb_seen == 4, $sformatf("heartbeats seen %0d", hb_seen))
    // first load: counter jumps, no sync error (not locked yet)
    @(negedge clk);
    load = 1; load_value = 16'd1234;
    @(negedge clk);
    load = 0;
    `CHECK(counter == 16'd1234 && locked, "load applied")
    `CHECK(!sync_err, "first load is not an error")
    // aligned load: no error
    load = 1; load_value = counter + 1;
    @(negedge clk);
    load = 0;
    `CHECK(!sync_err, "aligned load no error")
    // misaligned load: error
    load = 1; load_value = counter + 5;
    @(negedge clk);
    load = 0;
    `CHECK(sync_err, "misaligned load flagged")
    // load to 65535 then wrap: frame increments
    ref_frame = frame;
    load = 1; load_value = 16'hFFFF;
    @(negedge clk);
    load = 0;
    @(negedge clk);
    `CHECK(counter == 0 && heartbeat && frame == 24'(ref_frame + 1), "wrap after load")
    // frame load
    frame_load = 1; frame_in = 24'hABCDE;
    @(negedge clk);
    frame_load = 0;
    `CHECK(frame == 24'hABCDE, "frame load")
    `TB_FINISH
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
