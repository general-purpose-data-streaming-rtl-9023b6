`timescale 1ns/1ps
// Testbench of the tapped delay line model and the sampler.
//
// A hit edge is placed at a random time before a sampling edge; the
// expected raw tap states are worked out here from the tap delays
// (10 ps x (k+1), O outputs 2 ps early, CO outputs 2 ps late, CO0 for the
// first tap) and ORed in groups of three; the sampler's code two sampling
// edges later must match. Falling edges and the calibration-clock input
// (cal_sel) are checked as well.
module tb_tdl_sampler;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk_fast = 0;
  always #1 clk_fast = !clk_fast;     // rising edges at 1, 3, 5, ... ns

  logic hit = 0, cal_clk = 0, cal_sel = 0;
  logic [191:0] taps;
  logic [63:0]  code;

  tdl_carry_chain u_tdl (.hit_in(hit), .cal_clk, .cal_sel, .taps);
  tdl_sampler     dut   (.clk_fast, .taps, .code);

  function automatic int tap_delay_ps(int k);
    bit is_o = (k % 2 == 0) && (k != 0);
    return 10 * (k + 1) + (is_o ? -2 : 2);
  endfunction

  function automatic logic [63:0] expected(int age_ps, bit level);
    logic [191:0] raw;
    logic [63:0]  e;
    for (int k = 0; k < 192; k++) raw[k] = (age_ps > tap_delay_ps(k)) ? level : !level;
    for (int i = 0; i < 64; i++) e[i] = raw[3*i] | raw[3*i+1] | raw[3*i+2];
    return e;
  endfunction

  task automatic one_edge(bit level, bit use_cal);
    int age;
    // next sampling edge is at an odd ns; place the edge age ps before it
    age = 5 + 10 * $urandom_range(0, 199);      // 5..1995 ps, never on a tap delay
    @(posedge clk_fast);                        // edge E0
    #(2.0 - age / 1000.0);
    if (use_cal) cal_clk = level; else hit = level;
    @(posedge clk_fast);                        // sampling edge E
    @(posedge clk_fast);                        // code valid after E + 2 ns
    #0.5;
    `CHECK(code == expected(age, level),
           $sformatf("level %0d cal %0d age %0d ps: code %h exp %h", level, use_cal, age, code, expected(age, level)))
    repeat (3) @(posedge clk_fast);             // let the line settle
  endtask

  initial begin
    repeat (4) @(posedge clk_fast);
    for (int n = 0; n < 200; n++) begin
      one_edge(1'b1, 1'b0);
      one_edge(1'b0, 1'b0);
    end
    cal_sel = 1;
    repeat (4) @(posedge clk_fast);
    for (int n = 0; n < 20; n++) begin
      one_edge(1'b1, 1'b1);
      one_edge(1'b0, 1'b1);
    end
    // hit is ignored while the calibration clock is selected
    hit = 1;
    repeat (4) @(posedge clk_fast);
    `CHECK(code == '0, "hit blocked in calibration mode")
    `TB_FINISH
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
