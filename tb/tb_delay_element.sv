// Self-checking test of the delay element model: every transition of din
// appears on dout DELAY_PS later; a pulse shorter than the delay is
// swallowed (inertial delay), a longer one passes whole.
`timescale 1ns / 1ps
module tb_delay_element;

  localparam int unsigned D_PS = 3000;

  logic din, dout;
  int   checks, failures;

  delay_element #(.DELAY_PS(D_PS)) u_dut (.din(din), .dout(dout));

  task automatic expect_out(input logic v, input string what);
    checks++;
    if (dout !== v) begin
      failures++;
      $display("FAIL at %0t %s: dout=%b expected %b", $time, what, dout, v);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    din = 1'b0;
    #10ns;
    expect_out(1'b0, "idle");
    din = 1'b1;                      // rising edge at t
    #2.9ns expect_out(1'b0, "before delay");
    #0.2ns expect_out(1'b1, "after delay");
    #10ns;
    din = 1'b0;                      // falling edge
    #2.9ns expect_out(1'b1, "before delay (fall)");
    #0.2ns expect_out(1'b0, "after delay (fall)");
    #10ns;
    din = 1'b1; #1ns din = 1'b0;     // 1 ns pulse, shorter than the delay
    #1.5ns expect_out(1'b0, "short pulse not yet out");
    #1ns   expect_out(1'b0, "short pulse swallowed");
    #10ns;
    din = 1'b1; #4ns din = 1'b0;     // 4 ns pulse, longer than the delay
    #0.5ns expect_out(1'b1, "long pulse out");
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
