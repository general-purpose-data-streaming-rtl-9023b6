`timescale 1ns/1ps
// Testbench of the LACCP primary and secondary blocks, together with two
// heartbeat units and a fixed-latency link model.
//
// Three independent links run side by side with different one-way
// latencies, link delays dt/dt' and upstream accumulated fine offsets:
//   g=0: symmetric 20/20 cycles, no correction
//   g=1: 20 down / 21 up cycles (odd round trip, +4000 ps) and an upstream
//        fine offset that pushes the sum over one period (+1 correction)
//   g=2: symmetric 15/15, sum below minus one period (-1 correction)
// For each, the expected round-trip time, coarse offset, local and
// accumulated fine offsets and the counter relation between primary and
// secondary are computed here from the link parameters and compared. The
// frame number must also arrive at the secondary.
module tb_laccp;
  import laccp_pkg::*;
  `include "tb_check.svh"

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  localparam int NCFG = 3;
  localparam int DOWN [NCFG] = '{20, 20, 15};
  localparam int UP   [NCFG] = '{20, 21, 15};
  localparam int TAP_S[NCFG] = '{10, 0, 0};
  localparam int OFS_S[NCFG] = '{1, 0, -3};
  localparam int TAP_P[NCFG] = '{3, 31, 31};
  localparam int OFS_P[NCFG] = '{-1, 2, 3};
  localparam int FOFS [NCFG] = '{0, 7000, -5000};

  logic [NCFG-1:0] synced;
  logic [NCFG-1:0] done;
  logic [CNT_W-1:0] pcnt [NCFG], scnt [NCFG];
  logic [FRAME_W-1:0] pfr [NCFG], sfr [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_link
    logic p_hb, p_ptx, p_prx, p_mv, p_mr, s_ptx, s_prx, s_mv, p_lock, p_err, s_lock, s_err;
    pulse_type_e p_ptt, s_ptt;
    logic [1:0] p_prt, s_prt;
    msg_t p_msg;
    logic [63:0] s_msg;
    logic s_load, s_fload;
    logic [CNT_W-1:0] s_lval, s_coarse;
    logic [FRAME_W-1:0] s_fval;
    logic [RTT_W-1:0] s_rtt;
    logic signed [OFS_W-1:0] s_floc, s_facc;
    logic s_hb;

    heartbeat_unit u_phb (.clk, .rst, .load(1'b0), .load_value('0), .frame_load(1'b0),
      .frame_in('0), .counter(pcnt[g]), .frame(pfr[g]), .heartbeat(p_hb), .locked(p_lock),
      .sync_err(p_err));

    laccp_primary u_pri (.clk, .rst, .link_up(1'b1), .local_synced(1'b1), .heartbeat(p_hb),
      .frame(pfr[g]), .idelay_tap(5'(TAP_P[g])), .serdes_ofs(4'(OFS_P[g])),
      .fine_offset_acc(OFS_W'(FOFS[g])), .pulse_tx(p_ptx), .pulse_tx_type(p_ptt),
      .pulse_rx(p_prx), .pulse_rx_type(pulse_type_e'(p_prt)), .msg_tx_valid(p_mv),
      .msg_tx(p_msg), .msg_tx_ready(p_mr));

    mikumari_link_model #(.DOWN_LAT(DOWN[g]), .UP_LAT(UP[g])) u_link (.clk, .rst,
      .p_pulse_tx(p_ptx), .p_pulse_tx_type(p_ptt), .p_pulse_rx(p_prx), .p_pulse_rx_type(p_prt),
      .p_msg_tx_valid(p_mv), .p_msg_tx(p_msg), .p_msg_tx_ready(p_mr),
      .s_pulse_tx(s_ptx), .s_pulse_tx_type(s_ptt), .s_pulse_rx(s_prx), .s_pulse_rx_type(s_prt),
      .s_msg_rx_valid(s_mv), .s_msg_rx(s_msg));

    laccp_secondary u_sec (.clk, .rst, .link_up(1'b1), .idelay_tap(5'(TAP_S[g])),
      .serdes_ofs(4'(OFS_S[g])), .pulse_tx(s_ptx), .pulse_tx_type(s_ptt), .pulse_rx(s_prx),
      .pulse_rx_type(pulse_type_e'(s_prt)), .msg_rx_valid(s_mv), .msg_rx(msg_t'(s_msg)),
      .hb_load(s_load), .hb_load_value(s_lval), .frame_load(s_fload), .frame_value(s_fval),
      .synced(synced[g]), .rtt_cycles(s_rtt), .coarse_offset(s_coarse),
      .fine_offset_local(s_floc), .fine_offset_acc(s_facc));

    heartbeat_unit u_shb (.clk, .rst, .load(s_load), .load_value(s_lval), .frame_load(s_fload),
      .frame_in(s_fval), .counter(scnt[g]), .frame(sfr[g]), .heartbeat(s_hb), .locked(s_lock),
      .sync_err(s_err));

    // independent expectation
    int exp_rtt, t_net, exp_coarse, corr, dts, dtp, exp_loc, exp_acc;
    initial begin
      exp_rtt = DOWN[g] + UP[g] + 1;
      t_net   = DOWN[g] + UP[g];
      dts     = TAP_S[g] * 78 + OFS_S[g] * 1000;
      dtp     = TAP_P[g] * 78 + OFS_P[g] * 1000;
      exp_loc = int'($floor(real'(dts - dtp) / 2.0)) + ((t_net % 2 == 1) ? 4000 : 0);
      exp_acc = exp_loc + FOFS[g];
      corr    = 0;
      if (exp_acc >= 8000) begin exp_acc -= 8000; corr = 1; end
      else if (exp_acc <= -8000) begin exp_acc += 8000; corr = -1; end
      exp_coarse = t_net / 2 + corr;
      done[g] = 1'b0;
      @(posedge synced[g]);
      `CHECK(int'(s_rtt) == exp_rtt, $sformatf("link %0d rtt %0d exp %0d", g, s_rtt, exp_rtt))
      `CHECK(int'(s_coarse) == exp_coarse, $sformatf("link %0d coarse %0d exp %0d", g, s_coarse, exp_coarse))
      `CHECK(int'(s_floc) == exp_loc, $sformatf("link %0d local fine %0d exp %0d", g, s_floc, exp_loc))
      `CHECK(int'(s_facc) == exp_acc, $sformatf("link %0d acc fine %0d exp %0d", g, s_facc, exp_acc))
      // wait for the next heartbeat to arrive and be applied
      @(posedge s_load);
      @(posedge clk);
      repeat (3) begin
        repeat (1000 + $urandom_range(0, 20000)) @(posedge clk);
        `CHECK(scnt[g] == CNT_W'(int'(pcnt[g]) + corr),
               $sformatf("link %0d counter %0d primary %0d corr %0d", g, scnt[g], pcnt[g], corr))
      end
      // frame number: after the next frame message both agree away from the edge
      wait (pcnt[g] == 16'd30000);
      @(negedge clk);
      `CHECK(sfr[g] == pfr[g] && pfr[g] != 0, $sformatf("link %0d frame %0d primary %0d", g, sfr[g], pfr[g]))
      `CHECK(!s_err, $sformatf("link %0d sync error", g))
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (&done);
    `TB_FINISH
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_FINISH
  end

endmodule
