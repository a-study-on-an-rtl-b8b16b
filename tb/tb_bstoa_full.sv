// Full-size test of the BStoA interface at its default configuration
// (32-bit words, bursts of 8, SCT = 15 ns, ACT = 17 ns, two sender
// registers). LS sends three bursts of random words; LA acknowledges each
// word 17 ns after its request. Checks every word, that sack rises 8 cycles
// after sreq, that the last word of each burst is acknowledged
// L + sd_0_0 = (15 + 8*17 + 2) ns after sreq rose, and that sack falls only
// after that.
`timescale 1ns / 1ps
module tb_bstoa_full;

  localparam int unsigned W      = 32;
  localparam int unsigned B      = 8;
  localparam int unsigned NB     = 3;
  localparam realtime     SCT_NS = 15.0;
  localparam realtime     LAT_NS = 15.0 + 8 * 17.0 + 2.0;

  logic         clk, rst_n, sreq, sack, areq, aack, put, ls_done;
  logic [W-1:0] sdata, adata, rx_data;
  int unsigned  rx_cnt;
  int           checks, failures;

  initial clk = 1'b0;
  always #(SCT_NS / 2.0) clk = ~clk;

  ls_model #(.DATA_W(W), .BURST_LEN(B), .N_BURSTS(NB)) u_ls (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
    .put(put), .done(ls_done));

  bstoa u_dut (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
    .areq(areq), .aack(aack), .adata(adata));

  la_model #(.DATA_W(W), .ACK_PS(17000)) u_la (
    .rst_n(rst_n), .areq(areq), .adata(adata), .aack(aack),
    .rx_data(rx_data), .rx_cnt(rx_cnt));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  logic [W-1:0] exp_q[$];
  realtime      t_sreq;
  bit           burst_acked;

  always @(posedge clk) if (put) exp_q.push_back(sdata);
  always @(posedge sreq) begin t_sreq = $realtime; burst_acked = 1'b0; end

  always @(rx_cnt) begin
    if (rx_cnt != 0) begin
      check(exp_q.size() != 0, "word expected");
      if (exp_q.size() != 0) check(rx_data === exp_q.pop_front(), $sformatf("word %0d data", rx_cnt));
    end
  end

  always @(posedge sack)
    check($realtime - t_sreq == B * SCT_NS, "sack rises BURST_LEN cycles after sreq");

  always @(aack) begin
    if (rst_n && rx_cnt != 0 && rx_cnt % B == 0) begin
      check($realtime - t_sreq > LAT_NS - 0.01 && $realtime - t_sreq < LAT_NS + 0.01,
            $sformatf("burst latency %0.3f ns, expected %0.3f", $realtime - t_sreq, LAT_NS));
      burst_acked = 1'b1;
    end
  end

  always @(negedge sack) if (rst_n) check(burst_acked, "sack falls after the burst was delivered");

  initial begin
    checks = 0; failures = 0;
    rst_n = 1'b1; #1ps; rst_n = 1'b0; #40ns; rst_n = 1'b1;
    wait (ls_done === 1'b1);
    repeat (4) @(posedge clk);
    check(rx_cnt == NB * B && exp_q.size() == 0, "all words delivered");
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
