`timescale 1ns/1ps
// Delay buffer: holds every slot of the merged data path for a fixed
// DELAY_CYCLES system clock cycles (250 x 8 ns = 2 us by default, the
// published buffer length), long enough for an external trigger decision
// to arrive before the data reach the trigger gate.
//
// It is a circular buffer of 2**ADDR_W words: the write pointer advances
// every cycle and the read address trails it by DELAY_CYCLES - 1, with a
// registered read, so `dout` is `din` exactly DELAY_CYCLES cycles later.
// Until the buffer has been filled once after reset the output is forced
// to zero (no valid data), so the uninitialised memory is never seen.
module delay_buffer #(
  parameter int WIDTH        = 32,
  parameter int DELAY_CYCLES = 250,
  parameter int ADDR_W       = $clog2(DELAY_CYCLES)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0]  mem [1 << ADDR_W];
  logic [ADDR_W-1:0] wp;
  logic [ADDR_W-1:0] rp;
  logic [ADDR_W:0]   fill;
  logic              primed;

  assign rp     = wp - ADDR_W'(DELAY_CYCLES - 1);
  assign primed = (fill >= (ADDR_W+1)'(DELAY_CYCLES - 1));

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    if (rst) begin
      wp   <= '0;
      fill <= '0;
      dout <= '0;
    end else begin
      wp   <= wp + 1'b1;
      if (!primed) fill <= fill + 1'b1;
      dout <= primed ? mem[rp] : '0;
    end
  end

  initial assert (DELAY_CYCLES >= 2 && DELAY_CYCLES <= (1 << ADDR_W))
    else $error("DELAY_CYCLES out of range");

endmodule
