// Self-checking test of the two-flop synchronizer: a change of d_async
// between two clock edges appears on d_sync at the second rising edge after
// it, not earlier and not later.
`timescale 1ns / 1ps
module tb_sync_2ff;

  logic clk, rst_n, d_async, d_sync;
  int   checks, failures;

  sync_2ff u_dut (.clk(clk), .rst_n(rst_n), .d_async(d_async), .d_sync(d_sync));

  initial clk = 1'b0;
  always #5ns clk = ~clk;

  initial begin
    checks = 0; failures = 0;
    d_async = 1'b0;
    rst_n = 1'b1; #1ns; rst_n = 1'b0; #20ns; rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = ~d_async;
      @(posedge clk); #($urandom_range(9, 1) * 1ns);
      d_async = v;
      @(posedge clk); #1ps;
      checks++;
      if (d_sync === v) begin failures++; $display("FAIL: passed after one edge"); end
      @(posedge clk); #1ps;
      checks++;
      if (d_sync !== v) begin failures++; $display("FAIL: not passed after two edges"); end
      repeat ($urandom_range(2, 0)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
