// Self-checking test of the asynchronous half in both modes, each with its
// own LA receiver model and a behavioural stand-in for the clocked side
// (15 ns clock, word j written to Sreg_{j mod NUM_R} on edge j):
//  * fast sender (ACT 17 ns, 2 registers): req_0 toggles once per burst;
//  * slow sender (ACT 13 ns, 1 register): req_0 toggles once per word.
// Checks: every word reaches LA in order; the k-th areq transition of a
// burst happens sd_0_0 after the burst's first edge plus k*ACT (fast) or
// sd_0_0 after edge k (slow); ack_0 makes exactly one transition per burst,
// hd_0 after the last areq transition.
`timescale 1ns / 1ps
module tb_async_interface;
  import bstoa_pkg::*;

  localparam int unsigned W     = 32;
  localparam int unsigned B     = 8;
  localparam int unsigned SCT   = 15000;
  localparam int unsigned SD00  = 2000;
  localparam int unsigned HD0   = 1000;
  localparam int unsigned NB    = 3;

  logic clk, rst_n;
  int   checks, failures;

  initial clk = 1'b0;
  always #(SCT * 1ps / 2) clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- one lane per mode ----------------
  for (genvar m = 0; m < 2; m++) begin : g_lane
    localparam mode_e       MODE = (m == 0) ? MODE_SYNC_FAST : MODE_SYNC_SLOW;
    localparam int unsigned ACT  = (m == 0) ? 17000 : 13000;
    localparam int unsigned R    = calc_num_r(SCT, ACT, B);

    logic         req0, ack0, areq, aack;
    logic [W-1:0] sreg [R];
    logic [W-1:0] adata, rx_data;
    int unsigned  rx_cnt;
    logic [W-1:0] sent [$];
    realtime      t_first, t_edge [B];
    int           nack0;
    bit           lane_done;

    async_interface #(.DATA_W(W), .BURST_LEN(B), .NUM_R(R), .MODE(MODE),
                      .SD00_PS(SD00), .SD01_PS(SCT), .HD0_PS(HD0)) u_dut (
      .rst_n(rst_n), .req0(req0), .sreg(sreg), .ack0(ack0),
      .areq(areq), .aack(aack), .adata(adata));

    la_model #(.DATA_W(W), .ACK_PS(ACT)) u_la (
      .rst_n(rst_n), .areq(areq), .adata(adata), .aack(aack),
      .rx_data(rx_data), .rx_cnt(rx_cnt));

    // Clocked-side stand-in.
    initial begin
      req0 = 1'b0; lane_done = 1'b0; nack0 = 0;
      for (int k = 0; k < int'(R); k++) sreg[k] = '0;
      @(negedge rst_n); @(posedge rst_n);
      for (int b = 0; b < int'(NB); b++) begin
        repeat (2) @(posedge clk);
        for (int j = 0; j < int'(B); j++) begin
          logic [W-1:0] w;
          @(posedge clk);
          w = $urandom();
          sreg[j % int'(R)] <= w;
          sent.push_back(w);
          t_edge[j] = $realtime;
          if (j == 0 || MODE == MODE_SYNC_SLOW) req0 <= ~req0;
        end
        wait (rx_cnt == (b + 1) * B);
        #(ACT * 1ps + 5ns);
        check(nack0 == b + 1, "one ack_0 transition per burst");
      end
      lane_done = 1'b1;
    end

    // Receiver side: data and timing of every areq transition.
    always @(rx_cnt) begin
      if (rx_cnt != 0) begin
        int      k;
        realtime exp_t;
        logic [W-1:0] e;
        k = (rx_cnt - 1) % B;
        e = sent.pop_front();
        check(rx_data === e, $sformatf("lane %0d word %0d data", m, rx_cnt));
        exp_t = (MODE == MODE_SYNC_FAST) ? t_edge[0] + (SD00 + k * ACT) / 1000.0
                                         : t_edge[k] + SD00 / 1000.0;
        // rx_cnt moves 1 ps after the areq transition
        check($realtime - 0.001 > exp_t - 0.01 && $realtime - 0.001 < exp_t + 0.01,
              $sformatf("lane %0d word %0d time %0.3f expected %0.3f", m, rx_cnt, $realtime - 0.001, exp_t));
        if (k == int'(B) - 1) t_first = $realtime - 0.001;
      end
    end

    always @(ack0) begin
      if (rst_n && $realtime > 1.0) begin
        nack0++;
        check($realtime > t_first + HD0 / 1000.0 - 0.01 && $realtime < t_first + HD0 / 1000.0 + 0.01,
              $sformatf("lane %0d ack_0 hd_0 after the last word", m));
      end
    end
  end

  initial begin
    checks = 0; failures = 0;
    rst_n = 1'b1; #1ps; rst_n = 1'b0; #30ns; rst_n = 1'b1;
    wait (g_lane[0].lane_done && g_lane[1].lane_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
