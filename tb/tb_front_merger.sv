`timescale 1ns/1ps
// Testbench of the front merger: four channels (reduced from 32), small
// channel FIFOs so that they overflow under back-pressure.
//
// Channels write heartbeat frames (tagged data words, then a delimiter).
// The reader pops the output FIFO with random gaps; in some frames it
// stops for a long time so that channel FIFOs overflow. Checks:
//   - one merged delimiter per frame, with the right frame number, and
//     never lost even when data are dropped;
//   - data words of each channel leave in order, in their own frame, as a
//     subsequence of what was written;
//   - a frame that lost words carries HBD_FLAG_LOST, a frame that did not
//     lose any does not, and at least one frame of each kind occurs.
module tb_front_merger;
  import str_tdc_pkg::*;
  `include "tb_check.svh"
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  localparam int N = 4;
  localparam int FRAMES = 16;

  logic [N-1:0] ch_valid, ch_overflow;
  logic [WORD_W-1:0] ch_data [N];
  logic out_valid, out_pop;
  logic [WORD_W-1:0] out_data;

  front_merger #(.N_IN(N), .CH_FIFO_DEPTH(8), .OUT_FIFO_DEPTH(16)) dut (.*);

  int written [FRAMES], got [FRAMES];
  int next_seq [N];
  int cur_frame, n_lost_frames, n_clean_frames;

  function automatic logic [WORD_W-1:0] dword(int i, int f, int seq);
    logic [WORD_W-1:0] w;
    w = '0;
    w[63:60] = 4'hB; w[59:53] = 7'(i); w[50:29] = 22'(f); w[28:0] = 29'(seq);
    return w;
  endfunction

  // writers: frame f lasts 300 cycles on every channel
  initial begin
    int seq [N];
    for (int f = 0; f < FRAMES; f++) begin written[f] = 0; got[f] = 0; end
    for (int i = 0; i < N; i++) seq[i] = 0;
    ch_valid = '0;
    for (int i = 0; i < N; i++) ch_data[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          ch_valid[i] = (c == 299) || ($urandom_range(0, 9) == 0);
          if (c == 299) ch_data[i] = make_hbd(24'(f), 8'h00);
          else if (ch_valid[i]) begin
            ch_data[i] = dword(i, f, seq[i]++);
            written[f]++;
          end
        end
      end
    end
    @(negedge clk);
    ch_valid = '0;
  end

  // reader
  initial begin
    cur_frame = 0; n_lost_frames = 0; n_clean_frames = 0;
    for (int i = 0; i < N; i++) next_seq[i] = 0;
    out_pop = 0;
    wait (!rst);
    while (cur_frame < FRAMES) begin
      logic [WORD_W-1:0] w;
      logic take;
      @(negedge clk);
      // frames 3, 8 and 9 see a long stall of the reader
      out_pop = out_valid && !(cur_frame inside {3, 8, 9} && got[cur_frame] > 5 && got[cur_frame] < 60 && $urandom_range(0, 19) != 0)
                && ($urandom_range(0, 3) != 0);
      take = out_pop;
      w = out_data;
      if (take) begin
        if (is_hbd(w)) begin
          bit lost_words;
          lost_words = got[cur_frame] < written[cur_frame];
          `CHECK(w[23:0] == 24'(cur_frame), $sformatf("delimiter frame %0d exp %0d", w[23:0], cur_frame))
          `CHECK(((w[59:52] & HBD_FLAG_LOST) != 0) == lost_words,
                 $sformatf("frame %0d: %0d of %0d words, flags %h", cur_frame, got[cur_frame], written[cur_frame], w[59:52]))
          if (lost_words) n_lost_frames++; else n_clean_frames++;
          cur_frame++;
        end else begin
          int i;
          i = int'(w[59:53]);
          `CHECK(int'(w[50:29]) == cur_frame, $sformatf("word of frame %0d in frame %0d", w[50:29], cur_frame))
          `CHECK(int'(w[28:0]) >= next_seq[i], $sformatf("channel %0d order", i))
          next_seq[i] = int'(w[28:0]) + 1;
          got[cur_frame]++;
        end
      end
    end
    `CHECK(n_lost_frames > 0 && n_clean_frames > 0, $sformatf("lost frames %0d clean frames %0d", n_lost_frames, n_clean_frames))
    `TB_FINISH
  end

  initial begin
    repeat (FRAMES * 300 + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
