// BStoA: burst interface from a clocked sender (LS) to a self-timed,
// bundled-data receiver (LA).
//
// A burst of BURST_LEN words is passed in one handshake cycle on each side:
// LS raises sreq and presents one word per clock cycle; the interface raises
// sack once it holds all words, forwards them to LA as BURST_LEN two-phase
// areq/aack handshakes with the word on adata, and lowers sack when the last
// word has been handed over (and LS has lowered sreq).
//
// The structure is chosen from the two design-time cycle times:
//   SCT_PS - clock period of LS
//   ACT_PS - handshake cycle of the self-timed side (set by LA and the delays)
// When SCT >= ACT every word raises its own internal request. When SCT < ACT
// a single internal request starts the burst, the self-timed controller
// re-arms itself for each following word, and NUM_R sender registers keep
// words until they are taken (see bstoa_pkg for the rule). The latency from
// the first sreq edge to the last areq transition is about
// BURST_LEN*SCT + ACT (SCT >= ACT) or SCT + BURST_LEN*ACT (SCT < ACT).
//
// Defaults: burst length 8, SCT = 15 ns and ACT = 17 ns, giving NUM_R = 2,
// as in the evaluated configurations. The data width (32) and the delay
// element values are this implementation's choices. SD01_PS defaults to
// SCT_PS, the smallest value that meets SCT <= sd_0_1 < ACT.
`timescale 1ns / 1ps
module bstoa
  import bstoa_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned SCT_PS    = 15000,
  parameter int unsigned ACT_PS    = 17000,
  parameter int unsigned SD00_PS   = 2000,
  parameter int unsigned SD01_PS   = SCT_PS,
  parameter int unsigned HD0_PS    = 1000
) (
  // LS side (clock domain of clk)
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sreq,
  input  logic [DATA_W-1:0] sdata,
  output logic              sack,
  // LA side (two-phase bundled data)
  output logic              areq,
  input  logic              aack,
  output logic [DATA_W-1:0] adata
);

  localparam mode_e       MODE  = calc_mode(SCT_PS, ACT_PS);
  localparam int unsigned NUM_R = calc_num_r(SCT_PS, ACT_PS, BURST_LEN);

  // Burst length is a power of two; the nreq_0 delay must lie in [SCT, ACT).
  if ((BURST_LEN & (BURST_LEN - 1)) != 0 || BURST_LEN == 0) begin : g_bad_burst
    $error("BURST_LEN must be a power of two");
  end
  if (MODE == MODE_SYNC_FAST && (SD01_PS < SCT_PS || SD01_PS >= ACT_PS)) begin : g_bad_sd01
    $error("SD01_PS must satisfy SCT_PS <= SD01_PS < ACT_PS");
  end

  logic              req0;
  logic              ack0;
  logic [DATA_W-1:0] sreg [NUM_R];

  sync_interface #(
    .DATA_W    (DATA_W),
    .BURST_LEN (BURST_LEN),
    .NUM_R     (NUM_R),
    .MODE      (MODE)
  ) u_sync_if (
    .clk   (clk),
    .rst_n (rst_n),
    .sreq  (sreq),
    .sdata (sdata),
    .sack  (sack),
    .req0  (req0),
    .sreg  (sreg),
    .ack0  (ack0)
  );

  async_interface #(
    .DATA_W    (DATA_W),
    .BURST_LEN (BURST_LEN),
    .NUM_R     (NUM_R),
    .MODE      (MODE),
    .SD00_PS   (SD00_PS),
    .SD01_PS   (SD01_PS),
    .HD0_PS    (HD0_PS)
  ) u_async_if (
    .rst_n (rst_n),
    .req0  (req0),
    .sreg  (sreg),
    .ack0  (ack0),
    .areq  (areq),
    .aack  (aack),
    .adata (adata)
  );

endmodule
