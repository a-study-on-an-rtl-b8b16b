// Self-checking test of the synchronous half (sender faster than receiver:
// BURST_LEN 4, three sender registers). Per burst it checks that word j lands
// in Sreg_{j mod 3} and stays there until overwritten, that req_0 makes one
// transition, that sack rises after the last word, and that an ack_0
// transition arriving between clock edges lowers sack at the third rising
// edge after it (two synchronizer flops, then the state register).
`timescale 1ns / 1ps
module tb_sync_interface;
  import bstoa_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned B = 4;
  localparam int unsigned R = 3;

  logic         clk, rst_n, sreq, sack, req0, ack0;
  logic [W-1:0] sdata;
  logic [W-1:0] sreg  [R];
  logic [W-1:0] ref_q [R];
  int           checks, failures;

  sync_interface #(.DATA_W(W), .BURST_LEN(B), .NUM_R(R), .MODE(MODE_SYNC_FAST)) u_dut (
    .clk(clk), .rst_n(rst_n), .sreq(sreq), .sdata(sdata), .sack(sack),
    .req0(req0), .sreg(sreg), .ack0(ack0));

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
    logic r0;
    checks = 0; failures = 0;
    sreq = 1'b0; sdata = '0; ack0 = 1'b0;
    for (int k = 0; k < int'(R); k++) ref_q[k] = '0;
    rst_n = 1'b1; #1ns; rst_n = 1'b0; #22ns; rst_n = 1'b1;
    for (int b = 0; b < 5; b++) begin
      @(negedge clk);
      r0 = req0;
      for (int j = 0; j < int'(B); j++) begin
        sreq  = 1'b1;
        sdata = $urandom();
        @(posedge clk);
        ref_q[j % int'(R)] = sdata;
        #1ps;
        for (int k = 0; k < int'(R); k++)
          check(sreg[k] === ref_q[k], $sformatf("Sreg_%0d after word %0d", k, j));
        check(req0 == ~r0, "single req_0 transition");
        @(negedge clk);
        sdata = $urandom();
      end
      check(sack, "sack after last word");
      sreq = 1'b0;
      repeat ($urandom_range(3, 1)) @(negedge clk);
      #($urandom_range(4000, 1000) * 1ps);
      ack0 = ~ack0;                       // end of burst from the self-timed side
      @(posedge clk); #1ps; check(sack, "sack high 1 edge after ack_0");
      @(posedge clk); #1ps; check(sack, "sack high 2 edges after ack_0");
      @(posedge clk); #1ps; check(!sack, "sack low 3 edges after ack_0");
      for (int k = 0; k < int'(R); k++)
        check(sreg[k] === ref_q[k], "Sreg_k unchanged after burst");
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
