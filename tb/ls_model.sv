// Behavioural model of the clocked sender LS, for testbenches.
//
// It sends N_BURSTS bursts of BURST_LEN random words. For each burst it
// raises sreq together with the first word, presents one word per clock
// cycle, keeps sreq high until sack rises, holds sreq for 0..MAX_HOLD more
// cycles, lowers it and waits for sack to fall (four-phase handshake).
// Between bursts it idles 0..MAX_GAP cycles. Every word it drives is flagged
// by a one-cycle pulse on put, for the scoreboard. done rises after the last
// burst's sack has fallen.
`timescale 1ns / 1ps
module ls_model #(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned BURST_LEN = 8,
  parameter int unsigned N_BURSTS  = 3,
  parameter int unsigned MAX_GAP   = 3,
  parameter int unsigned MAX_HOLD  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              sreq,
  output logic [DATA_W-1:0] sdata,
  input  logic              sack,
  output logic              put,
  output logic              done
);

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int i = 0; i < int'(DATA_W); i += 32) w = {w, $urandom()};
    return w;
  endfunction

  initial begin
    sreq  = 1'b0;
    sdata = '0;
    put   = 1'b0;
    done  = 1'b0;
    @(negedge rst_n);
    @(posedge rst_n);
    @(posedge clk);
    for (int unsigned b = 0; b < N_BURSTS; b++) begin
      repeat ($urandom_range(MAX_GAP, 0)) @(posedge clk);
      for (int unsigned j = 0; j < BURST_LEN; j++) begin
        sreq  <= 1'b1;
        sdata <= rand_word();
        put   <= 1'b1;
        @(posedge clk);
      end
      put   <= 1'b0;
      sdata <= rand_word();               // not part of the burst
      while (!sack) @(posedge clk);
      repeat ($urandom_range(MAX_HOLD, 0)) @(posedge clk);
      sreq <= 1'b0;
      @(posedge clk);
      while (sack) @(posedge clk);
    end
    done <= 1'b1;
  end

endmodule
