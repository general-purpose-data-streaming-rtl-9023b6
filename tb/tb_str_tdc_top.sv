`timescale 1ns/1ps
// End-to-end testbench of the streaming TDC top level at its default size
// (2 x 32 channels, 2 us delay buffer, default FIFO depths).
//
// Set-up: a root module (heartbeat unit + LACCP primary, written here)
// drives the top's upstream port through a link model (20 cycles down,
// 21 up); the top's downstream port drives a second link model (15/16
// cycles) and a further LACCP secondary + heartbeat unit ("leaf"). Root,
// top and leaf leave reset at different times, so their counters differ
// until LACCP aligns them.
//
// After the top has loaded its counter, pulses are sent to random
// channels in phases:
//   C  tot_en low, one 6 us pulse: flushed unpaired after the TOT range;
//   B  triggered mode with the gate closed: all pulses removed;
//   L  the leading-edge table of channel 3 is written with a constant;
//      afterwards channel 3 words carry exactly that fine value;
//   A  normal pulses and 4 ns noise pulses (removed by the TOT filter),
//      a reader that stalls now and then and once for 20 us, across a
//      heartbeat frame boundary.
// Expected words are computed here per channel from the applied pulses.
// Checks: LACCP results (round trip, coarse and accumulated fine offset,
// counter relations root-top and top-leaf, frame numbers), every word
// expected, in channel order, TOT within 250 ps of the pulse width,
// timestamp minus true time constant within 250 ps over all channels,
// delimiter frame numbers equal to the root's, no LOST or MISMATCH flag,
// UNPAIRED flag in the frame of phase C, pulses without word only where
// they cross a frame boundary. Each mechanism is counted and must occur.
module tb_str_tdc_top;
  import str_tdc_pkg::*;
  import laccp_pkg::OFS_W;
  import laccp_pkg::RTT_W;
  import laccp_pkg::pulse_type_e;
  import laccp_pkg::msg_t;
  `include "tb_check.svh"
  int checks = 0, failures = 0;

  logic clk, clk_fast;
  logic rst_root = 1, rst = 1;
  initial forever begin clk = 1; #4; clk = 0; #4; end
  initial forever begin clk_fast = 1; #1; clk_fast = 0; #1; end

  localparam int  NCH = 64;
  localparam real P_PS = 65536.0 * 8000.0;          // frame length in ps
  localparam real PS_PER_FINE = 8000.0 / 8192.0;
  // link parameters: A root->top, B top->leaf
  localparam int A_DOWN = 20, A_UP = 21, A_TAP_S = 26, A_OFS_S = 0, A_TAP_P = 0, A_OFS_P = 0;
  localparam int B_DOWN = 15, B_UP = 16, B_TAP_S = 26, B_OFS_S = 0, B_TAP_P = 0, B_OFS_P = 0;
  localparam logic [12:0] LUT_CONST = 13'd4096;

  // ---------------- root ----------------
  logic [CNT_W-1:0]   r_cnt;
  logic [FRAME_W-1:0] r_frame;
  logic r_hb, r_lock, r_err, r_ptx, r_prx, r_mv, r_mr;
  pulse_type_e r_ptt;
  logic [1:0]  r_prt;
  msg_t        r_msg;

  heartbeat_unit u_root_hb (.clk, .rst(rst_root), .load(1'b0), .load_value('0), .frame_load(1'b0),
    .frame_in('0), .counter(r_cnt), .frame(r_frame), .heartbeat(r_hb), .locked(r_lock), .sync_err(r_err));

  laccp_primary u_root_pri (.clk, .rst(rst_root), .link_up(1'b1), .local_synced(1'b1),
    .heartbeat(r_hb), .frame(r_frame), .idelay_tap(5'(A_TAP_P)), .serdes_ofs(4'(A_OFS_P)),
    .fine_offset_acc('0), .pulse_tx(r_ptx), .pulse_tx_type(r_ptt), .pulse_rx(r_prx),
    .pulse_rx_type(pulse_type_e'(r_prt)), .msg_tx_valid(r_mv), .msg_tx(r_msg), .msg_tx_ready(r_mr));

  logic up_ptx, up_prx, up_mv;
  logic [1:0] up_ptt, up_prt;
  logic [63:0] up_msg;

  mikumari_link_model #(.DOWN_LAT(A_DOWN), .UP_LAT(A_UP)) u_link_a (.clk, .rst(rst_root),
    .p_pulse_tx(r_ptx), .p_pulse_tx_type(r_ptt), .p_pulse_rx(r_prx), .p_pulse_rx_type(r_prt),
    .p_msg_tx_valid(r_mv), .p_msg_tx(r_msg), .p_msg_tx_ready(r_mr),
    .s_pulse_tx(up_ptx), .s_pulse_tx_type(up_ptt), .s_pulse_rx(up_prx), .s_pulse_rx_type(up_prt),
    .s_msg_rx_valid(up_mv), .s_msg_rx(up_msg));

  // ---------------- top ----------------
  logic [NCH-1:0] hit = '0;
  logic dn_ptx, dn_prx, dn_mv, dn_mr;
  logic [1:0] dn_ptt, dn_prt;
  logic [63:0] dn_msg;
  logic trig_mode = 0, trig_gate = 0, tot_en = 1;
  logic lut_wr_en = 0;
  logic [7:0] lut_wr_addr = '0;
  logic out_valid, out_ready = 1;
  logic [WORD_W-1:0] out_data;
  logic synced, heartbeat, sync_err;
  logic [RTT_W-1:0] rtt_cycles;
  logic [CNT_W-1:0] coarse_offset, hb_counter;
  logic signed [OFS_W-1:0] fine_offset_local, fine_offset_acc;
  logic [FRAME_W-1:0] hb_frame;
  logic [NCH-1:0] ch_lost;

  str_tdc_top dut (
    .clk, .clk_fast, .rst, .root_mode(1'b0), .hit, .cal_clk(1'b0), .cal_sel(1'b0),
    .up_link_up(1'b1), .up_idelay_tap(5'(A_TAP_S)), .up_serdes_ofs(4'(A_OFS_S)),
    .up_pulse_tx(up_ptx), .up_pulse_tx_type(up_ptt), .up_pulse_rx(up_prx), .up_pulse_rx_type(up_prt),
    .up_msg_rx_valid(up_mv), .up_msg_rx(up_msg),
    .dn_link_up(1'b1), .dn_idelay_tap(5'(B_TAP_P)), .dn_serdes_ofs(4'(B_OFS_P)),
    .dn_pulse_tx(dn_ptx), .dn_pulse_tx_type(dn_ptt), .dn_pulse_rx(dn_prx), .dn_pulse_rx_type(dn_prt),
    .dn_msg_tx_valid(dn_mv), .dn_msg_tx(dn_msg), .dn_msg_tx_ready(dn_mr),
    .trig_mode, .trig_gate, .tot_en, .tot_min(22'd8192), .tot_max('1),
    .lut_wr_en, .lut_wr_ch(7'd3), .lut_wr_trail(1'b0), .lut_wr_addr, .lut_wr_data(LUT_CONST),
    .out_valid, .out_data, .out_ready,
    .synced, .rtt_cycles, .coarse_offset, .fine_offset_local, .fine_offset_acc,
    .hb_counter, .hb_frame, .heartbeat, .sync_err, .ch_lost);

  // ---------------- leaf ----------------
  logic l_ptx, l_prx, l_mv, l_load, l_fload, l_synced, l_lock, l_err, l_hb;
  pulse_type_e l_ptt;
  logic [1:0]  l_prt;
  logic [63:0] l_msg;
  logic [CNT_W-1:0] l_lval, l_coarse, l_cnt;
  logic [FRAME_W-1:0] l_fval, l_frame;
  logic [RTT_W-1:0] l_rtt;
  logic signed [OFS_W-1:0] l_floc, l_facc;

  mikumari_link_model #(.DOWN_LAT(B_DOWN), .UP_LAT(B_UP)) u_link_b (.clk, .rst,
    .p_pulse_tx(dn_ptx), .p_pulse_tx_type(dn_ptt), .p_pulse_rx(dn_prx), .p_pulse_rx_type(dn_prt),
    .p_msg_tx_valid(dn_mv), .p_msg_tx(dn_msg), .p_msg_tx_ready(dn_mr),
    .s_pulse_tx(l_ptx), .s_pulse_tx_type(l_ptt), .s_pulse_rx(l_prx), .s_pulse_rx_type(l_prt),
    .s_msg_rx_valid(l_mv), .s_msg_rx(l_msg));

  laccp_secondary u_leaf_sec (.clk, .rst, .link_up(1'b1), .idelay_tap(5'(B_TAP_S)),
    .serdes_ofs(4'(B_OFS_S)), .pulse_tx(l_ptx), .pulse_tx_type(l_ptt), .pulse_rx(l_prx),
    .pulse_rx_type(pulse_type_e'(l_prt)), .msg_rx_valid(l_mv), .msg_rx(msg_t'(l_msg)),
    .hb_load(l_load), .hb_load_value(l_lval), .frame_load(l_fload), .frame_value(l_fval),
    .synced(l_synced), .rtt_cycles(l_rtt), .coarse_offset(l_coarse),
    .fine_offset_local(l_floc), .fine_offset_acc(l_facc));

  heartbeat_unit u_leaf_hb (.clk, .rst, .load(l_load), .load_value(l_lval), .frame_load(l_fload),
    .frame_in(l_fval), .counter(l_cnt), .frame(l_frame), .heartbeat(l_hb), .locked(l_lock),
    .sync_err(l_err));

  // ---------------- expected LACCP results ----------------
  // local fine offset = floor((dt_secondary - dt_primary) / 2) + half a
  // period if the net round trip is odd; accumulated = upstream + local,
  // folded into (-8000, 8000) ps with a +-1 correction of the coarse offset
  function automatic int dt_ps(int tap, int ofs);
    return tap * 78 + ofs * 1000;
  endfunction
  function automatic int loc_fine(int down, int up, int tap_s, int ofs_s, int tap_p, int ofs_p);
    return int'($floor(real'(dt_ps(tap_s, ofs_s) - dt_ps(tap_p, ofs_p)) / 2.0)) + (((down + up) % 2 == 1) ? 4000 : 0);
  endfunction
  int a_loc, a_acc, a_corr, b_loc, b_acc, b_corr;
  initial begin
    a_loc = loc_fine(A_DOWN, A_UP, A_TAP_S, A_OFS_S, A_TAP_P, A_OFS_P);
    a_acc = a_loc; a_corr = 0;
    if (a_acc >= 8000) begin a_acc -= 8000; a_corr = 1; end
    else if (a_acc <= -8000) begin a_acc += 8000; a_corr = -1; end
    b_loc = loc_fine(B_DOWN, B_UP, B_TAP_S, B_OFS_S, B_TAP_P, B_OFS_P);
    b_acc = a_acc + b_loc; b_corr = 0;
    if (b_acc >= 8000) begin b_acc -= 8000; b_corr = 1; end
    else if (b_acc <= -8000) begin b_acc += 8000; b_corr = -1; end
  end

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_chain = 0, n_hbload = 0, n_frameload = 0, n_paired = 0, n_noise = 0;
  int n_gated = 0, n_unpaired = 0, n_lut = 0, n_delim = 0, n_stall = 0, n_split = 0;
  int n_unp_flag = 0;
  bit top_loaded = 0, top_frame_loaded = 0;

  always @(posedge clk) begin
    if (dut.hb_load) begin $display("%0t top hb_load", $time); n_hbload++; top_loaded = 1; end
    if (dut.frame_load) begin $display("%0t top frame_load", $time); n_frameload++; top_frame_loaded = 1; end
    if (out_valid && !out_ready) n_stall++;
    if (!rst && (ch_lost != '0)) begin failures++; $display("FAIL: ch_lost %h", ch_lost); end
    if (!rst && sync_err) begin failures++; $display("FAIL: top sync_err"); end
  end

  // root frame number at its latest heartbeat
  logic [FRAME_W-1:0] root_frame_at_hb = '0;
  always @(posedge clk) if (r_hb) root_frame_at_hb <= r_frame;

  // ---------------- pulse generation and expectation ----------------
  typedef enum int {K_NORM, K_LUT, K_UNP} kind_e;
  typedef struct { real lt; real w; kind_e kind; } exp_t;
  exp_t exp_q [NCH][$];
  real  busy_until [NCH];
  bit   lut_written = 0;

  task automatic pulse(int ch, real w, bit expect_word, kind_e kind);
    exp_t e;
    e.lt = $realtime * 1000.0; e.w = w * 1000.0; e.kind = kind;
    if (expect_word) exp_q[ch].push_back(e);
    busy_until[ch] = $realtime + w + 100.0;
    fork
      begin
        hit[ch] = 1'b1;
        #(w);
        hit[ch] = 1'b0;
      end
    join_none
  endtask

  // random pulses for `dur` ns: every 20..60 ns one pulse on a free channel
  task automatic random_phase(real dur, bit expect_word, bit with_noise, bit no_ch3);
    real t_end;
    t_end = $realtime + dur;
    while ($realtime < t_end) begin
      int ch;
      #(20.0 + $urandom_range(0, 40000) / 1000.0);
      ch = $urandom_range(0, NCH - 1);
      if (no_ch3 && ch == 3) continue;
      if (busy_until[ch] > $realtime) continue;
      if (with_noise && $urandom_range(0, 4) == 0) begin
        pulse(ch, 4.0, 1'b0, K_NORM);
        n_noise++;
      end else begin
        if (!expect_word) n_gated++;
        pulse(ch, 10.0 + $urandom_range(0, 140000) / 1000.0, expect_word,
              (ch == 3 && lut_written) ? K_LUT : K_NORM);
      end
    end
    #(200.0);
  endtask

  initial begin
    foreach (busy_until[i]) busy_until[i] = 0.0;
    repeat (5) @(posedge clk);
    rst_root <= 0;
    repeat (1234) @(posedge clk);
    rst <= 0;
    // top: round trip, offsets, counter and frame alignment
    wait (synced);
    $display("%0t top synced", $time);
    @(posedge clk);
    `CHECK(int'(rtt_cycles) == A_DOWN + A_UP + 1, $sformatf("rtt %0d", rtt_cycles))
    `CHECK(int'(coarse_offset) == (A_DOWN + A_UP) / 2 + a_corr, $sformatf("coarse offset %0d", coarse_offset))
    `CHECK(int'(fine_offset_local) == a_loc, $sformatf("local fine %0d exp %0d", fine_offset_local, a_loc))
    `CHECK(int'(fine_offset_acc) == a_acc, $sformatf("acc fine %0d exp %0d", fine_offset_acc, a_acc))
    wait (top_loaded && top_frame_loaded);
    repeat (100) @(negedge clk);
    `CHECK(hb_counter == CNT_W'(int'(r_cnt) + a_corr), $sformatf("top counter %0d root %0d", hb_counter, r_cnt))
    `CHECK(hb_frame == r_frame, $sformatf("top frame %0d root %0d", hb_frame, r_frame))
    n_sync++;
    $display("%0t synced, root counter %0d frame %0d", $time, r_cnt, r_frame);

    // phases start shortly before the next heartbeat
    wait (r_cnt == 16'd61000);
    $display("%0t phase", $time);
    // C: long pulse, TOT filter off while its words pass the filter
    fork
      begin #1000.0; tot_en = 0; #11000.0; tot_en = 1; end
    join_none
    pulse(10, 6000.0, 1'b1, K_UNP);
    random_phase(8000.0, 1'b1, 1'b0, 1'b0);
    #3000.0;
    $display("%0t phase", $time);
    // B: triggered mode, gate closed
    fork
      begin #1000.0; trig_mode = 1; #9500.0; trig_mode = 0; end
    join_none
    random_phase(7000.0, 1'b0, 1'b0, 1'b0);
    #3500.0;
    $display("%0t phase", $time);
    // L: constant leading-edge table for channel 3
    while (busy_until[3] + 2500.0 > $realtime) #100.0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      lut_wr_en = 1; lut_wr_addr = 8'(a);
    end
    @(negedge clk);
    lut_wr_en = 0;
    lut_written = 1;
    $display("%0t phase", $time);
    // A: normal running with noise, stalled reader, across the heartbeat
    fork
      begin
        #5000.0;
        out_ready = 0; #20000.0; out_ready = 1;
      end
    join_none
    random_phase(36000.0, 1'b1, 1'b1, 1'b0);
    $display("%0t phase", $time);
    // leaf: chained synchronisation
    wait (l_lock);
    repeat (100) @(negedge clk);
    `CHECK(int'(l_facc) == b_acc, $sformatf("leaf acc fine %0d exp %0d", l_facc, b_acc))
    `CHECK(int'(l_floc) == b_loc, $sformatf("leaf local fine %0d exp %0d", l_floc, b_loc))
    `CHECK(int'(l_coarse) == (B_DOWN + B_UP) / 2 + b_corr, $sformatf("leaf coarse %0d", l_coarse))
    `CHECK(l_cnt == CNT_W'(int'(hb_counter) + b_corr), $sformatf("leaf counter %0d top %0d", l_cnt, hb_counter))
    `CHECK(!l_err, "leaf sync error")
    n_chain++;
    #4000.0;
    // all expected words must have arrived or be explained
    for (int c = 0; c < NCH; c++) begin
      `CHECK(exp_q[c].size() == 0, $sformatf("channel %0d: %0d pulses without word", c, exp_q[c].size()))
    end
    $display("sync %0d chain %0d hb_load %0d frame_load %0d paired %0d noise %0d gated %0d unpaired %0d lut %0d delimiters %0d stall %0d split %0d",
             n_sync, n_chain, n_hbload, n_frameload, n_paired, n_noise, n_gated, n_unpaired, n_lut, n_delim, n_stall, n_split);
    $display("timestamp spread %0.1f ps, latency %0.1f ns", ofs_max - ofs_min, ofs_min / 1000.0);
    `CHECK(n_sync > 0 && n_chain > 0 && n_hbload > 0 && n_frameload > 0, "synchronisation mechanisms")
    `CHECK(n_paired > 100 && n_noise > 0 && n_gated > 0 && n_unpaired > 0 && n_lut > 0, "data mechanisms")
    `CHECK(n_delim > 0 && n_stall > 1000 && n_unp_flag > 0, "merger mechanisms")
    `CHECK(ofs_max - ofs_min < 250.0, $sformatf("timestamp spread %0.1f ps", ofs_max - ofs_min))
    `TB_FINISH
  end

  // ---------------- output checking ----------------
  real ofs_min = 1e30, ofs_max = -1e30, ofs_ref = 0.0;
  bit  have_ref = 0;
  int  last_frame = -1;

  function automatic real mod_p(real d);
    while (d < 0.0) d += P_PS;
    while (d >= P_PS) d -= P_PS;
    return d;
  endfunction

  // a pulse may lack its word only if it crosses a frame boundary
  function automatic bit crosses_boundary(exp_t e);
    real a, b;
    a = e.lt + ofs_ref - 8000.0;
    b = e.lt + e.w + ofs_ref + 8000.0;
    return $floor(a / P_PS) != $floor(b / P_PS);
  endfunction

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    tdc_word_t t;
    t = out_data;
    if (is_hbd(out_data)) begin
      logic [7:0] flags;
      flags = out_data[59:52];
      if (top_frame_loaded) begin
        `CHECK(out_data[23:0] == root_frame_at_hb, $sformatf("delimiter frame %0d root %0d", out_data[23:0], root_frame_at_hb))
        `CHECK((flags & (HBD_FLAG_LOST | HBD_FLAG_MISMATCH)) == 8'h00, $sformatf("delimiter flags %h", flags))
        if (last_frame >= 0) `CHECK(int'(out_data[23:0]) == last_frame + 1, "consecutive frames")
        if (n_unpaired > 0 && (flags & HBD_FLAG_UNPAIRED) != 0) n_unp_flag++;
        last_frame = int'(out_data[23:0]);
        n_delim++;
      end
    end else begin
      int c;
      real meas, d;
      c = int'(t.ch);
      meas = real'(t.coarse) * 8000.0 + real'(t.fine) * PS_PER_FINE;
      `CHECK(t.dtype == DT_TDC && c < NCH, "TDC word")
      // drop expectations of pulses that were cut by a frame boundary
      while (have_ref && exp_q[c].size() > 1 && mod_p(meas - exp_q[c][0].lt - ofs_ref + P_PS / 2) - P_PS / 2 > 50000.0) begin
        `CHECK(crosses_boundary(exp_q[c][0]), $sformatf("channel %0d pulse at %0.0f ps lost", c, exp_q[c][0].lt))
        void'(exp_q[c].pop_front());
        n_split++;
      end
      if (exp_q[c].size() == 0) begin
        failures++; $display("FAIL: unexpected word on channel %0d: %h", c, out_data);
      end else begin
        exp_t e;
        e = exp_q[c].pop_front();
        d = mod_p(meas - e.lt);
        if (!have_ref) begin ofs_ref = d; have_ref = 1; end
        d = ofs_ref + (mod_p(d - ofs_ref + P_PS / 2) - P_PS / 2);
        case (e.kind)
          K_UNP: begin
            `CHECK(t.rsv[0] && t.tot == '0, "unpaired word")
            n_unpaired++;
          end
          K_LUT: begin
            `CHECK(t.fine == LUT_CONST && !t.rsv[0], $sformatf("written table: fine %0d", t.fine))
            n_lut++;
          end
          default: begin
            real tot_ps;
            tot_ps = real'(t.tot) * PS_PER_FINE;
            `CHECK(!t.rsv[0] && tot_ps > e.w - 250.0 && tot_ps < e.w + 250.0,
                   $sformatf("channel %0d TOT %0.0f ps width %0.0f ps", c, tot_ps, e.w))
            if (d < ofs_min) ofs_min = d;
            if (d > ofs_max) ofs_max = d;
            n_paired++;
          end
        endcase
      end
    end
  end

  initial begin
    #2000000.0;
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end
endmodule
