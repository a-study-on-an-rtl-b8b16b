// Self-checking test of the sender register bank: random writes to random
// registers, every register compared with a reference array after each edge.
`timescale 1ns / 1ps
module tb_sreg_bank;

  localparam int unsigned W = 16;
  localparam int unsigned R = 3;

  logic         clk, rst_n, we;
  logic [1:0]   widx;
  logic [W-1:0] din;
  logic [W-1:0] q   [R];
  logic [W-1:0] ref_q [R];
  int           checks, failures;

  sreg_bank #(.DATA_W(W), .NUM_R(R)) u_dut (
    .clk(clk), .rst_n(rst_n), .we(we), .widx(widx), .din(din), .q(q));

  initial clk = 1'b0;
  always #5ns clk = ~clk;

  initial begin
    checks = 0; failures = 0;
    we = 1'b0; widx = '0; din = '0;
    for (int k = 0; k < int'(R); k++) ref_q[k] = '0;
    rst_n = 1'b1; #1ns; rst_n = 1'b0; #20ns; rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we   = ($urandom_range(3, 0) != 0);
      widx = 2'($urandom_range(R - 1, 0));
      din  = W'($urandom());
      @(posedge clk);
      if (we) ref_q[widx] = din;
      #1ps;
      for (int k = 0; k < int'(R); k++) begin
        checks++;
        if (q[k] !== ref_q[k]) begin
          failures++;
          $display("FAIL cycle %0d: q[%0d]=%h expected %h", i, k, q[k], ref_q[k]);
        end
      end
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
