// Sender register bank Sreg_0 .. Sreg_{NUM_R-1}.
//
// Words of a burst are written in turn, word j going to Sreg_{j mod NUM_R},
// so that a word stays in place for NUM_R sender clock cycles: long enough
// for the slower self-timed side to copy it into Areg before it is
// overwritten. All registers are visible at once on q; the self-timed side
// picks one with its own multiplexer. With NUM_R = 1 this is the single Sreg
// of the basic interface.
//
// Interface: we/widx/din write one register on the rising clk edge.
// Timing: q[widx] holds din from the edge after we is sampled high. Reset
// (active-low, asynchronous, to zero) is this design's choice.
`timescale 1ns / 1ps
module sreg_bank
  import bstoa_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NUM_R  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [cnt_w(NUM_R)-1:0]    widx,
  input  logic [DATA_W-1:0]          din,
  output logic [DATA_W-1:0]          q [NUM_R]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NUM_R); k++) q[k] <= '0;
    end else if (we) begin
      q[widx] <= din;
    end
  end

  a_widx_range: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (int'(widx) < int'(NUM_R)));

endmodule
