// Test environment for one BStoA configuration: its own sender clock
// (period SCT_PS), reset, an LS sender model, the BStoA interface and an LA
// receiver model whose acknowledge delay equals ACT_PS.
//
// Checks, per burst:
//  * every word reaches LA, in order and unchanged (scoreboard);
//  * sack rises exactly BURST_LEN clock cycles after sreq rose (the whole
//    burst is taken in consecutive cycles, one sender handshake);
//  * the time from sreq rising to LA acknowledging the burst's last word
//    equals the latency L of the design rule plus the setup delay sd_0_0
//    (L = BURST_LEN*SCT + ACT if SCT >= ACT, SCT + BURST_LEN*ACT otherwise);
//  * sack falls only after the last word was handed to LA, and no more than
//    four clock cycles after that once sreq is low.
// It also counts how often each mechanism was used, for the caller.
`timescale 1ns / 1ps
module bstoa_env
  import bstoa_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned SCT_PS    = 15000,
  parameter int unsigned ACT_PS    = 17000,
  parameter int unsigned N_BURSTS  = 3,
  parameter int unsigned LS_HOLD   = 2    // longest extra sreq hold after sack
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_rearm,      // lclk_0 requests made by nreq_0 (SCT < ACT)
  output int   n_word_req,   // req_0 transitions after a burst's first word
  output int   n_wrap,       // Sreg_k write index wrapping inside a burst
  output int   n_sack_wait,  // cycles the end of burst waited for sreq low
  output int   n_bursts
);

  localparam int unsigned SD00_PS = 2000;
  localparam mode_e       MODE    = calc_mode(SCT_PS, ACT_PS);
  localparam int unsigned NUM_R   = calc_num_r(SCT_PS, ACT_PS, BURST_LEN);
  localparam realtime     LAT_NS  = real'(calc_latency(SCT_PS, ACT_PS, BURST_LEN) + SD00_PS) / 1000.0;

  logic              clk;
  logic              rst_n;
  logic              sreq, sack, areq, aack, put, ls_done;
  logic [DATA_W-1:0] sdata, adata, rx_data;
  int unsigned       rx_cnt;

  initial clk = 1'b0;
  always #(SCT_PS * 1ps / 2) clk = ~clk;

  // Reset is pulsed (high, low, high) so that every flip-flop sees an edge.
  initial begin
    rst_n = 1'b1;
    #1ps;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  ls_model #(.DATA_W(DATA_W), .BURST_LEN(BURST_LEN), .N_BURSTS(N_BURSTS), .MAX_HOLD(LS_HOLD)) u_ls (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
    .put(put), .done(ls_done));

  bstoa #(
    .DATA_W(DATA_W), .BURST_LEN(BURST_LEN), .SCT_PS(SCT_PS), .ACT_PS(ACT_PS),
    .SD00_PS(SD00_PS)
  ) u_dut (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
    .areq(areq), .aack(aack), .adata(adata));

  la_model #(.DATA_W(DATA_W), .ACK_PS(ACT_PS)) u_la (
    .rst_n(rst_n), .areq(areq), .adata(adata), .aack(aack),
    .rx_data(rx_data), .rx_cnt(rx_cnt));

  initial begin
    checks = 0; failures = 0;
    n_rearm = 0; n_word_req = 0; n_wrap = 0; n_sack_wait = 0; n_bursts = 0;
  end

  // Scoreboard.
  logic [DATA_W-1:0] exp_q[$];
  always @(posedge clk) if (put) exp_q.push_back(sdata);

  always @(rx_cnt) begin
    if (rx_cnt != 0) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("[%0t] B%0d/A%0d: word %0d arrived with nothing sent", $time, BURST_LEN, ACT_PS, rx_cnt);
      end else begin
        logic [DATA_W-1:0] e;
        e = exp_q.pop_front();
        if (rx_data !== e) begin
          failures++;
          $display("[%0t] B%0d/A%0d: word %0d got %h expected %h", $time, BURST_LEN, ACT_PS, rx_cnt, rx_data, e);
        end
      end
    end
  end

  // Sender-side timing: sack rises BURST_LEN cycles after sreq.
  realtime t_sreq, t_last_word;
  bit      last_seen;
  always @(posedge sreq) begin
    t_sreq    = $realtime;
    last_seen = 1'b0;
  end
  always @(posedge sack) begin
    checks++;
    if ($realtime - t_sreq != real'(BURST_LEN) * real'(SCT_PS) / 1000.0) begin
      failures++;
      $display("[%0t] B%0d/A%0d: sack rose %0.3f ns after sreq, expected %0d cycles", $time,
               BURST_LEN, ACT_PS, $realtime - t_sreq, BURST_LEN);
    end
  end

  // Latency to the acknowledge of the last word of a burst.
  always @(aack) begin
    if (rst_n && rx_cnt != 0 && rx_cnt % BURST_LEN == 0) begin
      realtime lat;
      lat         = $realtime - t_sreq;
      t_last_word = $realtime;
      last_seen   = 1'b1;
      n_bursts++;
      checks++;
      if (lat < LAT_NS - 0.01 || lat > LAT_NS + 0.01) begin
        failures++;
        $display("[%0t] B%0d/A%0d: burst latency %0.3f ns, expected %0.3f ns", $time,
                 BURST_LEN, ACT_PS, lat, LAT_NS);
      end
    end
  end

  always @(negedge sack) begin
    if (rst_n) begin
      checks++;
      if (!last_seen || rx_cnt % BURST_LEN != 0) begin
        failures++;
        $display("[%0t] B%0d/A%0d: sack fell before the burst was delivered", $time, BURST_LEN, ACT_PS);
      end
    end
  end

  // Mechanism counters.
  always @(posedge u_dut.u_async_if.lclk)
    if (MODE == MODE_SYNC_FAST && u_dut.u_async_if.acount != 0) n_rearm++;
  always @(posedge clk)
    if (rst_n && u_dut.u_sync_if.u_sfsm.state == 2'd1 && u_dut.u_sync_if.u_sfsm.req0 != $past(u_dut.u_sync_if.u_sfsm.req0))
      n_word_req++;
  always @(posedge clk)
    if (rst_n && NUM_R > 1 && u_dut.u_sync_if.we && u_dut.u_sync_if.widx == 0 &&
        u_dut.u_sync_if.u_sfsm.state == 2'd1)
      n_wrap++;
  always @(posedge clk)
    if (rst_n && sack && sreq && u_dut.u_sync_if.u_sfsm.done) n_sack_wait++;

  initial begin
    done = 1'b0;
    @(posedge rst_n);
    wait (ls_done === 1'b1);
    repeat (4) @(posedge clk);
    checks++;
    if (rx_cnt != N_BURSTS * BURST_LEN || exp_q.size() != 0) begin
      failures++;
      $display("B%0d/A%0d: %0d words received, %0d expected", BURST_LEN, ACT_PS, rx_cnt, N_BURSTS * BURST_LEN);
    end
    done = 1'b1;
  end

endmodule
