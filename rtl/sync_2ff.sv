// Two-flop synchronizer (A1, A2) bringing the self-timed side's two-phase
// acknowledge ack_0 into the sender's clock domain.
//
// The first flop may go metastable when ack_0 changes near a clock edge; the
// second gives it a full clock period to settle. Output d_sync follows d_async
// two to three clock edges later. Reset clears both flops (active-low,
// asynchronous); the reset style is this design's choice.
`timescale 1ns / 1ps
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d_async,
  output logic d_sync
);

  logic a1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1     <= 1'b0;
      d_sync <= 1'b0;
    end else begin
      a1     <= d_async;
      d_sync <= a1;
    end
  end

endmodule
