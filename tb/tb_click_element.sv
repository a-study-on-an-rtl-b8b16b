// Self-checking test of the Click Element.
// Drives two-phase req/ack by hand and checks that lclk fires exactly when
// a request is pending and the previous token has been acknowledged, that
// every firing toggles the phase, and that nothing fires otherwise.
`timescale 1ns / 1ps
module tb_click_element;

  logic rst_n, req, ack, lclk, phase;
  int   checks, failures, fires;

  click_element u_dut (.rst_n(rst_n), .req(req), .ack(ack), .lclk(lclk), .phase(phase));

  always @(posedge lclk) if (rst_n) fires++;

  task automatic expect_state(input int exp_fires, input logic exp_phase, input string what);
    #1ns;
    checks++;
    if (fires != exp_fires || phase !== exp_phase) begin
      failures++;
      $display("FAIL %s: fires=%0d (exp %0d) phase=%b (exp %b)", what, fires, exp_fires, phase, exp_phase);
    end
  endtask

  initial begin
    checks = 0; failures = 0; fires = 0;
    req = 1'b0; ack = 1'b0;
    rst_n = 1'b1; #1ns; rst_n = 1'b0; #5ns; rst_n = 1'b1;
    expect_state(0, 1'b0, "after reset");
    // Token 1: req+ with ack equal to phase -> fire.
    req = 1'b1;           expect_state(1, 1'b1, "req+ fires");
    // Token 2 offered before the next stage acknowledged: must wait.
    req = 1'b0;           expect_state(1, 1'b1, "req- waits for ack");
    ack = 1'b1;           expect_state(2, 1'b0, "ack+ releases pending req");
    // Ack without a new request: no firing.
    ack = 1'b0;           expect_state(2, 1'b0, "ack- alone does nothing");
    // Four more tokens, each acknowledged in turn.
    for (int i = 0; i < 4; i++) begin
      req = ~req;         expect_state(3 + i, ~phase, "token fires");
      ack = phase;        expect_state(3 + i, phase, "ack returns");
    end
    // Reset in the middle clears the phase.
    rst_n = 1'b0; #1ns; rst_n = 1'b1;
    checks++;
    if (phase !== 1'b0) begin failures++; $display("FAIL reset"); end
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
