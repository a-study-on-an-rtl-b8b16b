// End-to-end test with a self-timed receiver built from Click Elements
// (la_click_pipeline, three stages) instead of an abstract receiver. The
// receiver's handshake cycle follows from its delays: sd 12 ns + hd 5 ns
// = 17 ns for the default build (SCT 15 ns < ACT 17 ns, two registers), and
// sd 8 ns + hd 5 ns = 13 ns for a build with ACT_PS = 13000 (one register,
// one request per word). Checks every word at the pipeline's far end, and
// the spacing of areq transitions inside a burst: ACT when the sender is
// faster, SCT when it is slower.
`timescale 1ns / 1ps
module tb_bstoa_pipeline;

  localparam int unsigned W  = 32;
  localparam int unsigned B  = 8;
  localparam int unsigned NB = 3;

  int checks, failures;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  logic lane_done [2];

  for (genvar m = 0; m < 2; m++) begin : g_lane
    localparam int unsigned ACT = (m == 0) ? 17000 : 13000;
    localparam int unsigned SD  = ACT - 5000;
    localparam realtime     GAP = ((m == 0) ? ACT : 15000) / 1000.0;

    logic         clk, rst_n, sreq, sack, areq, aack, put, ls_done;
    logic         oreq, oack;
    logic [W-1:0] sdata, adata, odata, rx_data;
    int unsigned  rx_cnt;
    logic [W-1:0] exp_q[$];
    realtime      t_prev;
    int           n_areq;

    initial clk = 1'b0;
    always #7.5ns clk = ~clk;

    initial begin
      rst_n = 1'b1; #1ps; rst_n = 1'b0; #40ns; rst_n = 1'b1;
    end

    ls_model #(.DATA_W(W), .BURST_LEN(B), .N_BURSTS(NB)) u_ls (
      .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
      .put(put), .done(ls_done));

    bstoa #(.ACT_PS(ACT)) u_dut (
      .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
      .areq(areq), .aack(aack), .adata(adata));

    la_click_pipeline #(.DATA_W(W), .STAGES(3), .SD_PS(SD), .HD_PS(5000)) u_la (
      .rst_n(rst_n), .in_req(areq), .in_data(adata), .in_ack(aack),
      .out_req(oreq), .out_data(odata), .out_ack(oack));

    la_model #(.DATA_W(W), .ACK_PS(10000)) u_sink (
      .rst_n(rst_n), .areq(oreq), .adata(odata), .aack(oack),
      .rx_data(rx_data), .rx_cnt(rx_cnt));

    always @(posedge clk) if (put) exp_q.push_back(sdata);

    always @(rx_cnt) begin
      if (rx_cnt != 0) begin
        check(exp_q.size() != 0 && rx_data === exp_q[0], $sformatf("lane %0d word %0d", m, rx_cnt));
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
    end

    initial n_areq = 0;
    always @(areq) begin
      if (rst_n && $realtime > 1.0) begin
        if (n_areq % B != 0)
          check($realtime - t_prev > GAP - 0.01 && $realtime - t_prev < GAP + 0.01,
                $sformatf("lane %0d areq spacing %0.3f ns, expected %0.3f", m, $realtime - t_prev, GAP));
        t_prev = $realtime;
        n_areq++;
      end
    end

    initial begin
      lane_done[m] = 1'b0;
      #10ns;
      wait (ls_done === 1'b1);
      #500ns;
      check(rx_cnt == NB * B && exp_q.size() == 0, $sformatf("lane %0d all words through the pipeline", m));
      lane_done[m] = 1'b1;
    end
  end

  initial begin
    checks = 0; failures = 0;
    #20ns;
    wait (lane_done[0] === 1'b1 && lane_done[1] === 1'b1);
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
