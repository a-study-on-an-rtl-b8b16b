// End-to-end test of the BStoA interface over the evaluated configurations:
// burst lengths 8, 16 and 32 words, sender cycle SCT = 15 ns and receiver
// cycle ACT = 13 ns (sender slower: one request per word, one register) and
// 17 ns (sender faster: one request per burst, self re-armed controller,
// 2, 3 and 5 sender registers). Each configuration runs several bursts of
// random data in its own environment; see bstoa_env for the checks.
// The test also requires each mechanism to have been used at least once.
`timescale 1ns / 1ps
module tb_bstoa;

  localparam int NCFG = 6;
  localparam int unsigned BL [NCFG] = '{8, 16, 32, 8, 16, 32};
  localparam int unsigned AC [NCFG] = '{17000, 17000, 17000, 13000, 13000, 13000};

  logic done [NCFG];
  int   chk  [NCFG], fail [NCFG], rearm [NCFG], wreq [NCFG], wrap [NCFG], swait [NCFG], nb [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    bstoa_env #(.BURST_LEN(BL[g]), .SCT_PS(15000), .ACT_PS(AC[g]), .N_BURSTS(4), .LS_HOLD(40)) u_env (
      .done(done[g]), .checks(chk[g]), .failures(fail[g]), .n_rearm(rearm[g]),
      .n_word_req(wreq[g]), .n_wrap(wrap[g]), .n_sack_wait(swait[g]), .n_bursts(nb[g]));
  end

  int checks, failures;

  task automatic mech(input string name, input int n);
    checks++;
    $display("mechanism %-28s used %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  initial begin
    int s_rearm, s_wreq, s_wrap, s_swait, s_nb;
    bit all;
    checks = 0; failures = 0;
    do begin
      #100ns;
      all = 1'b1;
      for (int i = 0; i < NCFG; i++) if (done[i] !== 1'b1) all = 1'b0;
    end while (!all);
    s_rearm = 0; s_wreq = 0; s_wrap = 0; s_swait = 0; s_nb = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fail[i];
      s_rearm  += rearm[i];
      s_wreq   += wreq[i];
      s_wrap   += wrap[i];
      s_swait  += swait[i];
      s_nb     += nb[i];
      $display("config %0d: burst %0d ACT %0d ps: %0d checks, %0d failures", i, BL[i], AC[i], chk[i], fail[i]);
    end
    mech("burst completed", s_nb);
    mech("nreq_0 self re-arm", s_rearm);
    mech("req_0 per word", s_wreq);
    mech("Sreg_k index wrap", s_wrap);
    mech("Sack- waits for Sreq-", s_swait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
