// Receiver model built as a bundled-data pipeline of Click Elements, for
// testbenches.
//
// Stage i has a Click Element ctrl_i, a data register reg_i clocked by its
// local clock lclk_i, a setup delay sd on its incoming request and a hold
// delay hd on the acknowledge it returns to stage i-1. Stage 0 takes its
// request and word from the interface (in_req/in_data) and acknowledges on
// in_ack; the last stage offers its word on out_req/out_data to a sink that
// acknowledges on out_ack. The local cycle of a stage is the larger of its
// forward path (sd) and its backward path (through hd of the next stage),
// so the handshake cycle seen by the interface is about SD_PS + HD_PS.
`timescale 1ns / 1ps
module la_click_pipeline #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned STAGES = 3,
  parameter int unsigned SD_PS  = 12000,
  parameter int unsigned HD_PS  = 5000
) (
  input  logic              rst_n,
  input  logic              in_req,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ack,
  output logic              out_req,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ack
);

  logic              req_d [STAGES];   // request after sd_i
  logic              ack_d [STAGES];   // acknowledge into stage i
  logic              phase [STAGES];
  logic              lclk  [STAGES];
  logic [DATA_W-1:0] regs  [STAGES];
  logic              ack_back;

  for (genvar i = 0; i < int'(STAGES); i++) begin : g_stage
    if (i == 0) begin : g_first
      delay_element #(.DELAY_PS(SD_PS)) u_sd (.din(in_req), .dout(req_d[i]));
    end else begin : g_next
      delay_element #(.DELAY_PS(SD_PS)) u_sd (.din(phase[i-1]), .dout(req_d[i]));
    end
    if (i == int'(STAGES) - 1) begin : g_last
      assign ack_d[i] = out_ack;
    end else begin : g_mid
      delay_element #(.DELAY_PS(HD_PS)) u_hd (.din(phase[i+1]), .dout(ack_d[i]));
    end

    click_element u_ctrl (.rst_n(rst_n), .req(req_d[i]), .ack(ack_d[i]),
                          .lclk(lclk[i]), .phase(phase[i]));

    always_ff @(posedge lclk[i] or negedge rst_n) begin
      if (!rst_n)      regs[i] <= '0;
      else if (i == 0) regs[i] <= in_data;
      else             regs[i] <= regs[(i == 0) ? 0 : i - 1];
    end
  end

  delay_element #(.DELAY_PS(HD_PS)) u_hd_in (.din(phase[0]), .dout(ack_back));
  assign in_ack   = ack_back;
  assign out_req  = phase[STAGES-1];
  assign out_data = regs[STAGES-1];

endmodule
