// Behavioural model of the self-timed receiver LA, for testbenches.
//
// Two-phase bundled-data sink: every transition of areq delivers one word on
// adata. The model takes the word 1 ps after the transition, counts it on
// rx_cnt (rx_data holds it) and returns the transition on aack ACK_PS
// picoseconds after areq changed, which sets the handshake cycle ACT of the
// self-timed side. Transitions before the first reset has ended are ignored.
`timescale 1ns / 1ps
module la_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ACK_PS = 17000
) (
  input  logic              rst_n,
  input  logic              areq,
  input  logic [DATA_W-1:0] adata,
  output logic              aack,
  output logic [DATA_W-1:0] rx_data,
  output int unsigned       rx_cnt
);

  initial begin
    aack    = 1'b0;
    rx_data = '0;
    rx_cnt  = 0;
  end

  bit seen_reset = 1'b0;
  always @(negedge rst_n) seen_reset = 1'b1;

  always @(areq) begin
    if (rst_n && seen_reset) begin
      aack <= #(ACK_PS * 1ps) areq;
      #1ps;
      rx_data = adata;
      rx_cnt  = rx_cnt + 1;
    end
  end

endmodule
