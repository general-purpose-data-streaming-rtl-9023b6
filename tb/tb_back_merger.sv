`timescale 1ns/1ps
// Testbench of the back merger (and the merger core inside it) with four
// inputs that are FIFO heads emulated here.
//
// Each input carries heartbeat frames: a random number of data words
// (tagged with input number, frame number and sequence number) followed by
// a delimiter with that frame number and random flag bits. The checks:
//   - every data word leaves exactly once, in per-input order, in its own
//     frame: after the delimiter of the previous frame and before the
//     delimiter of its frame;
//   - one delimiter leaves per frame, with the frame number and the OR of
//     the input delimiters' flags, only after all data of that frame;
//   - with all inputs pre-loaded and out_ready high the merger moves one
//     word per cycle (8 Gbps at 125 MHz), counted over the busy phase;
//   - with out_ready toggling randomly (back-pressure) nothing is lost.
module tb_back_merger;
  import str_tdc_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  localparam int N = 4;
  localparam int FRAMES = 40;

  logic [N-1:0] in_valid, in_pop;
  logic [WORD_W-1:0] in_data [N];
  logic out_valid, out_ready, delim_out;
  logic [WORD_W-1:0] out_data;

  back_merger #(.N_IN(N)) dut (.*);

  logic [WORD_W-1:0] src [N][$];     // words not yet offered
  logic [WORD_W-1:0] head [N][$];    // words offered (FIFO contents)
  int next_seq [N];                  // next expected sequence per input
  int exp_cnt [FRAMES];              // data words per frame
  logic [7:0] exp_flags [FRAMES];
  int got_cnt, cur_frame, n_words, busy_cycles, busy_words, n_stall;
  bit feed_all;

  function automatic logic [WORD_W-1:0] dword(int i, int f, int seq);
    logic [WORD_W-1:0] w;
    w = '0;
    w[63:60] = 4'hB;
    w[59:53] = 7'(i);
    w[50:29] = 22'(f);
    w[28:0]  = 29'(seq);
    return w;
  endfunction

  // the emulated FIFO heads are updated explicitly after every change
  task automatic refresh();
    for (int i = 0; i < N; i++) begin
      in_valid[i] = head[i].size() > 0;
      in_data[i]  = in_valid[i] ? head[i][0] : '0;
    end
  endtask

  logic [N-1:0] pops;

  initial begin
    int seq [N];
    for (int f = 0; f < FRAMES; f++) begin exp_cnt[f] = 0; exp_flags[f] = 0; end
    for (int i = 0; i < N; i++) begin
      seq[i] = 0; next_seq[i] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        int n;
        logic [7:0] fl;
        n = (f == 7) ? 0 : $urandom_range(0, 40);    // one frame empty on every input
        for (int k = 0; k < n; k++) src[i].push_back(dword(i, f, seq[i]++));
        exp_cnt[f] += n;
        fl = ($urandom_range(0, 9) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
        exp_flags[f] |= fl;
        src[i].push_back(make_hbd(24'(f + 100), fl));
      end
    end
    got_cnt = 0; cur_frame = 0; n_words = 0; busy_cycles = 0; busy_words = 0; n_stall = 0;
    out_ready = 1;
    feed_all = 1;
    // first 10 frames pre-loaded: throughput phase
    for (int i = 0; i < N; i++)
      while (src[i].size() > 0 && (is_hbd(src[i][0]) ? src[i][0][23:0] < 110 : 1)) begin
        logic [WORD_W-1:0] w;
        w = src[i].pop_front();
        head[i].push_back(w);
        if (is_hbd(w) && w[23:0] == 109) break;
      end
    refresh();
    repeat (3) @(posedge clk);
    rst <= 0;
    pops = '0;
    for (int cyc = 0; cyc < 20000 && cur_frame < FRAMES; cyc++) begin
      logic take;
      logic [WORD_W-1:0] w;
      @(negedge clk);
      // pops decided in the previous cycle take effect now, away from the
      // clock edge
      for (int i = 0; i < N; i++) if (pops[i]) void'(head[i].pop_front());
      if (cur_frame >= 10) begin
        feed_all = 0;
        out_ready = ($urandom_range(0, 3) != 0);
        for (int i = 0; i < N; i++)
          if (src[i].size() > 0 && $urandom_range(0, 2) == 0) head[i].push_back(src[i].pop_front());
      end
      refresh();
      #1;
      pops = in_pop;
      take = out_valid && out_ready;
      w    = out_data;
      if (feed_all) begin busy_cycles++; if (take) busy_words++; end
      if (out_valid && !out_ready) n_stall++;
      @(posedge clk);
      if (take) begin
        if (is_hbd(w)) begin
          `CHECK(w[23:0] == 24'(cur_frame + 100), $sformatf("delimiter frame %0d exp %0d", w[23:0], cur_frame + 100))
          `CHECK(got_cnt == exp_cnt[cur_frame], $sformatf("frame %0d: %0d words, exp %0d", cur_frame, got_cnt, exp_cnt[cur_frame]))
          `CHECK(w[59:52] == exp_flags[cur_frame], $sformatf("frame %0d flags %h exp %h", cur_frame, w[59:52], exp_flags[cur_frame]))
          cur_frame++;
          got_cnt = 0;
        end else begin
          int i;
          i = int'(w[59:53]);
          `CHECK(int'(w[50:29]) == cur_frame, $sformatf("word of frame %0d in frame %0d", w[50:29], cur_frame))
          `CHECK(int'(w[28:0]) == next_seq[i], $sformatf("input %0d seq %0d exp %0d", i, w[28:0], next_seq[i]))
          next_seq[i] = int'(w[28:0]) + 1;
          got_cnt++;
          n_words++;
        end
      end
    end
    `CHECK(cur_frame == FRAMES, $sformatf("frames completed %0d", cur_frame))
    $display("busy phase: %0d words in %0d cycles; stalls %0d", busy_words, busy_cycles, n_stall);
    `CHECK(busy_words * 100 >= busy_cycles * 97, "throughput one word per cycle")
    `CHECK(n_stall > 0, "back-pressure exercised")
    `TB_FINISH
  end

  initial begin
    repeat (21000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
