`timescale 1ns/1ps
// Synchronous first-word-fall-through FIFO, used in front of the front
// merger (one per channel), after each merger and before the network
// core. The published design places FIFOs at these points but gives no
// depths; DEPTH is a choice of this implementation.
//
// `rdata` shows the oldest word whenever `empty` is low; `pop` removes it
// at the clock edge. A `push` while full and a `pop` while empty are
// ignored (and flagged by assertions). `count` is the fill level.
module sync_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 64,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");

  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(push && full))  else $error("push into full FIFO");
      assert (!(pop && empty))  else $error("pop from empty FIFO");
    end

endmodule
