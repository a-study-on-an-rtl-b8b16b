// Sfsm: the sender-side controller of the BStoA interface, with the burst
// counter Scount.
//
// Handshake towards the clocked sender LS is four-phase: LS raises sreq with
// the first word and keeps presenting one word per clock cycle; after
// BURST_LEN words have been taken Sfsm raises sack (Sack+). LS then lowers
// sreq. Sfsm lowers sack (Sack-) once the self-timed side has reported, by a
// transition of ack_0, that the whole burst has been handed to the receiver,
// and sreq is low. Only then is a new burst accepted.
//
// Towards the self-timed side Sfsm drives the two-phase request req_0:
//  * MODE_SYNC_SLOW (SCT >= ACT): req_0 toggles with every word.
//  * MODE_SYNC_FAST (SCT <  ACT): req_0 toggles once, with the first word;
//    the self-timed side generates the remaining requests itself.
// Each accepted word is written to Sreg_{j mod NUM_R} through we/widx.
// The synchronized acknowledge ack_sync (output of A2) is compared with the
// last value seen by an XOR gate; a difference is the end-of-burst event.
//
// Timing: word j of a burst is sampled on the j-th rising clk edge counted
// from the edge that first sees sreq high (the words come in consecutive
// cycles); sack rises on the cycle after the last word. The state encoding,
// the point at which sack falls (after both sreq- and the end-of-burst event)
// and the active-low asynchronous reset are this design's choices.
`timescale 1ns / 1ps
module sfsm
  import bstoa_pkg::*;
#(
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned NUM_R     = 2,
  parameter mode_e       MODE      = MODE_SYNC_FAST
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sreq,
  output logic                         sack,
  input  logic                         ack_sync,
  output logic                         req0,
  output logic                         we,
  output logic [cnt_w(NUM_R)-1:0]      widx
);

  localparam int unsigned CW = cnt_w(BURST_LEN);
  localparam int unsigned RW = cnt_w(NUM_R);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,  // waiting for sreq, sack low
    S_RECV = 2'd1,  // taking words 1 .. BURST_LEN-1
    S_WAIT = 2'd2   // sack high, waiting for end of burst and sreq low
  } state_e;

  state_e          state;
  logic [CW-1:0]   scount;
  logic [RW-1:0]   widx_q;
  logic            ack_seen;
  logic            done;
  logic            ack_evt;

  assign ack_evt = ack_sync ^ ack_seen;  // XOR edge detector on ack_0

  // Write strobe and index for the register bank.
  always_comb begin
    we   = 1'b0;
    widx = widx_q;
    unique case (state)
      S_IDLE:  begin we = sreq; widx = '0; end
      S_RECV:  we = 1'b1;
      default: we = 1'b0;
    endcase
  end

  assign sack = (state == S_WAIT);

  function automatic logic [RW-1:0] next_idx(input logic [RW-1:0] i);
    return (int'(i) == int'(NUM_R) - 1) ? '0 : RW'(i + 1'b1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      scount   <= '0;
      widx_q   <= '0;
      req0     <= 1'b0;
      ack_seen <= 1'b0;
      done     <= 1'b0;
    end else begin
      if (ack_evt) ack_seen <= ack_sync;
      unique case (state)
        S_IDLE: begin
          if (sreq) begin
            req0   <= ~req0;                 // first word: request in both modes
            widx_q <= next_idx('0);
            done   <= 1'b0;
            if (BURST_LEN == 1) begin
              scount <= '0;
              state  <= S_WAIT;
            end else begin
              scount <= CW'(1);
              state  <= S_RECV;
            end
          end
        end
        S_RECV: begin
          if (MODE == MODE_SYNC_SLOW) req0 <= ~req0;  // one request per word
          widx_q <= next_idx(widx_q);
          if (int'(scount) == int'(BURST_LEN) - 1) begin
            scount <= '0;
            state  <= S_WAIT;
          end else begin
            scount <= CW'(scount + 1'b1);
          end
        end
        S_WAIT: begin
          if (ack_evt) done <= 1'b1;
          if ((done || ack_evt) && !sreq) begin
            done  <= 1'b0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Four-phase rule on the sender side: sreq may only fall once sack is high.
  a_sreq_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RECV) |-> sreq);

endmodule
