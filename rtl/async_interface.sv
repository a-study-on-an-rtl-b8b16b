// Asynchronous (self-timed) half of the BStoA interface.
//
// Its controller ctrl_0 is one Click Element with matched delays. Every rising
// edge of the local clock lclk_0 copies one word into Areg through a
// NUM_R-input multiplexer, toggles the outgoing request areq (the Click
// phase), and advances the word counter Acount. On the last word of a burst
// a flip-flop toggles ack_0, which reaches the clocked side through the hold
// delay hd_0.
//
// How lclk_0 is requested depends on the mode:
//  * MODE_SYNC_SLOW (SCT >= ACT): req_0 toggles once per word. It reaches the
//    Click Element through the setup delay sd_0_0.
//  * MODE_SYNC_FAST (SCT <  ACT): req_0 toggles once per burst. A flip-flop
//    toggles nreq_0 on every lclk_0 except the burst's last, and the Click
//    Element's request is req_0 XOR nreq_0 (nreq_0 delayed by sd_0_1). Each
//    word therefore re-arms the next request by itself, and lclk_0 fires
//    BURST_LEN times from a single req_0 transition.
// The receiver LA acknowledges each word by toggling aack; no word is taken
// before the previous one has been acknowledged.
//
// Timing: SD00_PS must cover the Sreg_k-to-Areg data path (setup). SD01_PS
// must satisfy SCT <= SD01_PS < ACT so that Sreg_k holds the next word when
// nreq_0 re-arms the controller. HD0_PS delays ack_0 to the synchronizer.
// The structure (Click, nreq_0 flip-flop and XOR, Acount, ack_0 flip-flop,
// multiplexer, Areg) follows the design; the delay values, the selector
// counter driving the multiplexer and the active-low asynchronous reset are
// this implementation's choices.
`timescale 1ns / 1ps
module async_interface
  import bstoa_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned NUM_R     = 2,
  parameter mode_e       MODE      = MODE_SYNC_FAST,
  parameter int unsigned SD00_PS   = 2000,
  parameter int unsigned SD01_PS   = 15000,
  parameter int unsigned HD0_PS    = 1000
) (
  input  logic              rst_n,
  input  logic              req0,
  input  logic [DATA_W-1:0] sreg [NUM_R],
  output logic              ack0,
  output logic              areq,
  input  logic              aack,
  output logic [DATA_W-1:0] adata
);

  localparam int unsigned CW = cnt_w(BURST_LEN);
  localparam int unsigned RW = cnt_w(NUM_R);

  logic          req0_d;     // req_0 after sd_0_0
  logic          nreq0;      // self-generated request
  logic          nreq0_d;    // nreq_0 after sd_0_1
  logic          creq;       // request seen by the Click Element
  logic          lclk;
  logic          ack0_q;
  logic          last;
  logic [CW-1:0] acount;
  logic [RW-1:0] sel;

  delay_element #(.DELAY_PS(SD00_PS)) u_sd_0_0 (.din(req0),   .dout(req0_d));
  delay_element #(.DELAY_PS(SD01_PS)) u_sd_0_1 (.din(nreq0),  .dout(nreq0_d));
  delay_element #(.DELAY_PS(HD0_PS))  u_hd_0   (.din(ack0_q), .dout(ack0));

  assign creq = (MODE == MODE_SYNC_FAST) ? (req0_d ^ nreq0_d) : req0_d;

  click_element u_click (
    .rst_n (rst_n),
    .req   (creq),
    .ack   (aack),
    .lclk  (lclk),
    .phase (areq)
  );

  assign last = (int'(acount) == int'(BURST_LEN) - 1);

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) begin
      adata  <= '0;
      acount <= '0;
      sel    <= '0;
      ack0_q <= 1'b0;
      nreq0  <= 1'b0;
    end else begin
      adata <= sreg[sel];
      if (last) begin
        acount <= '0;
        sel    <= '0;
        ack0_q <= ~ack0_q;                       // end of burst
      end else begin
        acount <= CW'(acount + 1'b1);
        sel    <= (int'(sel) == int'(NUM_R) - 1) ? '0 : RW'(sel + 1'b1);
        if (MODE == MODE_SYNC_FAST) nreq0 <= ~nreq0;  // re-arm for next word
      end
    end
  end

endmodule
