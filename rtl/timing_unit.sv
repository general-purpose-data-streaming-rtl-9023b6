`timescale 1ns/1ps
// Timing unit: finds one edge type in the sampled delay-line code and turns
// it into a calibrated fine time on the system clock.
//
// 500 MHz part: the 64-bit code from tdl_sampler is used as is for the
// leading edge (TRAILING = 0) or bit-inverted for the trailing edge
// (TRAILING = 1). An edge is found when effective tap 0 is set now and was
// clear one sampling cycle before. Its binary value is the tap index
// 64 - (number of set taps), 0..63: a small index means the edge arrived
// late, just before the sampling edge. Counting set taps rather than
// locating the first 0 is a choice of this implementation that tolerates
// left-over bubbles.
//
// Clock-domain crossing: every 500 MHz edge writes its result (or "no
// edge") into one of four slots, chosen by a 2-bit phase. The phase is
// aligned to the 125 MHz clock by watching a register that toggles on every
// 125 MHz edge: the 500 MHz edge that coincides with a 125 MHz edge writes
// slot 0, the next three write slots 1..3. On each 125 MHz edge the four
// slots hold the last four sampling cycles in order, and the earliest edge
// found among them is taken; its slot number is the 2-bit phase region that
// is prepended to the tap index (the "additional 2 bits" of the published
// design). Only one edge per 8 ns cycle is kept (a choice of this
// implementation).
//
// 125 MHz part: {phase, tap} addresses the 4 x 64 calibration table.
// `valid`/`fine` appear a fixed number of cycles after the hit; the fine
// time counts from the start of a fixed 8 ns window, so the overall
// latency is a constant removed with the rest of the fixed latency.
module timing_unit #(
  parameter bit TRAILING = 1'b0,
  parameter int EFF_TAPS = 64,
  parameter int FINE_W   = 13
) (
  input  logic                clk,        // 125 MHz system clock
  input  logic                clk_fast,   // 500 MHz sampling clock
  input  logic                rst,
  input  logic [EFF_TAPS-1:0] code,       // from tdl_sampler (clk_fast)
  output logic                valid,
  output logic [FINE_W-1:0]   fine,
  output logic [7:0]          raw_code,   // {phase, tap} of the output
  // calibration table write port (clk)
  input  logic                lut_wr_en,
  input  logic [7:0]          lut_wr_addr,
  input  logic [FINE_W-1:0]   lut_wr_data
);

  localparam int TAP_W = $clog2(EFF_TAPS);

  // ---------------- 500 MHz domain ----------------
  logic [EFF_TAPS-1:0] c;
  logic                c0_q;
  logic                ev;
  logic [TAP_W:0]      ones;
  logic [TAP_W-1:0]    tap;
  logic                ev_q;
  logic [TAP_W-1:0]    tap_q;
  logic                tgl_q;
  logic [1:0]          wr_idx, wr_idx_q;
  logic                rst_f;
  logic [3:0]          slot_v;
  logic [TAP_W-1:0]    slot_tap [4];
  logic                tgl;

  assign c  = TRAILING ? ~code : code;
  assign ev = c[0] && !c0_q;

  always_comb begin
    ones = '0;
    for (int i = 0; i < EFF_TAPS; i++) ones = ones + (TAP_W+1)'(c[i]);
    tap = TAP_W'((TAP_W+1)'(EFF_TAPS) - ones);
  end

  // slot 0 is written on the 500 MHz edge that coincides with a 125 MHz
  // edge: the toggle is seen changed on the edge after it
  assign wr_idx = (tgl != tgl_q) ? 2'd1 : wr_idx_q + 2'd1;

  always_ff @(posedge clk_fast) begin
    rst_f    <= rst;
    c0_q     <= c[0];
    ev_q     <= ev;
    tap_q    <= tap;
    tgl_q    <= tgl;
    wr_idx_q <= wr_idx;
    slot_v[wr_idx]   <= ev_q && !rst_f;
    slot_tap[wr_idx] <= tap_q;
  end

  // ---------------- 125 MHz domain ----------------
  logic            hit_v;
  logic [1:0]      hit_ph;
  logic [TAP_W-1:0] hit_tap;
  logic            v_q;
  logic [7:0]      code_q;

  always_ff @(posedge clk) tgl <= rst ? 1'b0 : !tgl;

  always_comb begin
    hit_v   = 1'b0;
    hit_ph  = '0;
    hit_tap = '0;
    for (int s = 3; s >= 0; s--)
      if (slot_v[s]) begin
        hit_v   = 1'b1;
        hit_ph  = 2'(s);
        hit_tap = slot_tap[s];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q   <= 1'b0;
      valid <= 1'b0;
    end else begin
      v_q   <= hit_v;
      valid <= v_q;
    end
    code_q   <= 8'({hit_ph, hit_tap});
    raw_code <= code_q;
  end

  calib_lut #(.ADDR_W(8), .FINE_W(FINE_W)) u_lut (
    .clk     (clk),
    .addr    (code_q),
    .fine    (fine),
    .wr_en   (lut_wr_en),
    .wr_addr (lut_wr_addr),
    .wr_data (lut_wr_data)
  );

  initial assert (EFF_TAPS == 64) else $error("phase/tap code assumes 64 effective taps");

endmodule
