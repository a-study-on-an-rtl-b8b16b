// Synchronous half of the BStoA interface, clocked by the sender's clock.
//
// It holds Sfsm with its burst counter Scount, the sender register bank
// Sreg_k, and the two-flop synchronizer A1/A2 that brings the self-timed
// acknowledge ack_0 into the clock domain (Sfsm's XOR gate turns its
// transitions into an end-of-burst event). The incoming request req_0 of the
// self-timed side is not synchronized: it is bundled with the Sreg_k data
// by a matched delay on the self-timed side.
//
// Interface: LS side  - clk, sreq, sdata, sack (four-phase, see sfsm)
//            internal - req_0 (two-phase request), sreg[NUM_R] (data),
//                       ack_0 (two-phase end-of-burst acknowledge)
// Timing: word j is written on the j-th clock edge of the burst; sack rises
// the cycle after the last word and falls 2-3 cycles after ack_0 toggles
// (synchronizer) once sreq is low.
`timescale 1ns / 1ps
module sync_interface
  import bstoa_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned NUM_R     = 2,
  parameter mode_e       MODE      = MODE_SYNC_FAST
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sreq,
  input  logic [DATA_W-1:0] sdata,
  output logic              sack,
  output logic              req0,
  output logic [DATA_W-1:0] sreg [NUM_R],
  input  logic              ack0
);

  logic                    ack_sync;
  logic                    we;
  logic [cnt_w(NUM_R)-1:0] widx;

  sync_2ff u_sync (
    .clk     (clk),
    .rst_n   (rst_n),
    .d_async (ack0),
    .d_sync  (ack_sync)
  );

  sfsm #(
    .BURST_LEN (BURST_LEN),
    .NUM_R     (NUM_R),
    .MODE      (MODE)
  ) u_sfsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .sreq     (sreq),
    .sack     (sack),
    .ack_sync (ack_sync),
    .req0     (req0),
    .we       (we),
    .widx     (widx)
  );

  sreg_bank #(
    .DATA_W (DATA_W),
    .NUM_R  (NUM_R)
  ) u_sreg (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (we),
    .widx  (widx),
    .din   (sdata),
    .q     (sreg)
  );

endmodule
