`timescale 1ns/1ps
// Testbench of the synchronous FIFO: random pushes and pops (never into a
// full or from an empty FIFO) against a queue model; data order, empty,
// full and count are compared every cycle, and the FIFO is driven to full
// and back to empty.
module tb_sync_fifo;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  logic push = 0, pop = 0, empty, full;
  logic [15:0] wdata = 0, rdata;
  logic [4:0] count;
  logic [15:0] q [$];
  int nfull = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int bias;
      @(negedge clk);
      `CHECK(count == 5'(q.size()) && empty == (q.size() == 0) && full == (q.size() == 16),
             $sformatf("count %0d model %0d", count, q.size()))
      if (q.size() > 0) `CHECK(rdata == q[0], "head data")
      if (full) nfull++;
      bias = (cyc / 500) % 2 ? 3 : 1;     // alternate filling and draining
      push = ($urandom_range(0, 3) < bias) && !full;
      pop  = ($urandom_range(0, 3) >= bias) && !empty;
      wdata = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    `CHECK(nfull > 0, "FIFO reached full")
    `TB_FINISH
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
