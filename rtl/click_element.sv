// Click Element: the two-phase handshake controller of one self-timed stage.
//
// A single flip-flop holds the stage phase. The local clock lclk rises when
// a new request is pending (req differs from phase) and the following stage
// has acknowledged the previous token (ack equals phase). The rising lclk
// toggles the phase, which both removes the firing condition (lclk falls
// again after the flip-flop's clock-to-output time) and forms the outgoing
// request / incoming acknowledge of this stage. The same lclk edge clocks
// the stage's data register outside this module.
//
// Interface: req  - two-phase request from the previous stage
//            ack  - two-phase acknowledge from the next stage
//            lclk - local clock pulse for the stage registers
//            phase- stage phase = ack to the previous stage = req to the next
// Timing: lclk is a pulse as wide as the flip-flop's clock-to-output delay;
// in a zero-delay simulation it is a zero-width pulse that still clocks all
// registers on its rising edge. Reset clears the phase, so req and ack must
// be low at reset. The firing rule follows the Click template; the active-low
// asynchronous reset is this design's choice.
`timescale 1ns / 1ps
module click_element (
  input  logic rst_n,
  input  logic req,
  input  logic ack,
  output logic lclk,
  output logic phase
);

  assign lclk = (req ^ phase) & ~(ack ^ phase);

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

endmodule
