// Self-checking test of Sfsm in both modes (two instances share the sender
// inputs). For each burst it checks: the write strobe and register index of
// every word (j mod NUM_R), the req_0 transitions (one per burst when the
// sender is faster, one per word when it is slower), sack rising exactly
// BURST_LEN edges after the first word, and sack falling only once both
// sreq is low and ack_sync has toggled, whichever comes last.
`timescale 1ns / 1ps
module tb_sfsm;
  import bstoa_pkg::*;

  localparam int unsigned B = 4;
  localparam int unsigned R = 3;

  logic       clk, rst_n, sreq, ack_sync;
  logic       sack_f, req0_f, we_f, sack_s, req0_s, we_s;
  logic [1:0] widx_f, widx_s;
  int         checks, failures;

  sfsm #(.BURST_LEN(B), .NUM_R(R), .MODE(MODE_SYNC_FAST)) u_fast (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sack(sack_f), .ack_sync(ack_sync),
    .req0(req0_f), .we(we_f), .widx(widx_f));
  sfsm #(.BURST_LEN(B), .NUM_R(1), .MODE(MODE_SYNC_SLOW)) u_slow (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sack(sack_s), .ack_sync(ack_sync),
    .req0(req0_s), .we(we_s), .widx(widx_s[0:0]));
  assign widx_s[1] = 1'b0;

  initial clk = 1'b0;
  always #5ns clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    logic rf0, rs0;
    checks = 0; failures = 0;
    sreq = 1'b0; ack_sync = 1'b0;
    rst_n = 1'b1; #1ns; rst_n = 1'b0; #22ns; rst_n = 1'b1;
    for (int b = 0; b < 6; b++) begin
      @(negedge clk);
      sreq = 1'b1;
      rf0  = req0_f; rs0 = req0_s;
      for (int j = 0; j < int'(B); j++) begin
        #1ns;
        check(we_f && we_s, "write strobe for every word");
        check(int'(widx_f) == j % int'(R), "fast-mode register index j mod NUM_R");
        check(widx_s == 0, "slow-mode register index 0");
        check(!sack_f && !sack_s, "sack low while words arrive");
        @(negedge clk);
        check(req0_f == ~rf0, "one req_0 transition per burst (fast)");
        check(req0_s == ((j % 2 == 0) ? ~rs0 : rs0), "one req_0 transition per word (slow)");
      end
      #1ns;
      check(sack_f && sack_s, "sack high after BURST_LEN words");
      check(!we_f && !we_s, "no write after the burst");
      if (b % 2 == 0) begin
        // sreq falls first, end-of-burst comes later
        repeat (2) @(negedge clk);
        sreq = 1'b0;
        repeat (3) @(negedge clk);
        check(sack_f && sack_s, "sack held until end of burst");
        ack_sync = ~ack_sync;
        @(negedge clk);
        check(!sack_f && !sack_s, "sack falls one edge after ack_sync toggles");
      end else begin
        // end-of-burst comes first, sreq is still high
        @(negedge clk);
        ack_sync = ~ack_sync;
        repeat (3) @(negedge clk);
        check(sack_f && sack_s, "sack held while sreq is high");
        sreq = 1'b0;
        @(negedge clk);
        check(!sack_f && !sack_s, "sack falls one edge after sreq falls");
      end
      repeat (2) @(negedge clk);
      check(!sack_f && !sack_s && !we_f && !we_s, "idle after burst");
    end
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
