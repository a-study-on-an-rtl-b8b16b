// Shared types and sizing rules of the BStoA burst interface.
//
// The interface moves a burst of BURST_LEN = 2^n words from a clocked
// sender to a self-timed receiver in a single request/acknowledge cycle.
// How it is built depends on two cycle times that are fixed at design time:
// the sender's clock period SCT and the receiver's handshake cycle ACT.
//
//  * SCT >= ACT (MODE_SYNC_SLOW): the self-timed side is fast enough to take
//    every word as it arrives. One sender register is enough, and the sender
//    toggles the internal request req_0 once per word.
//  * SCT <  ACT (MODE_SYNC_FAST): words arrive faster than they are consumed.
//    The sender toggles req_0 once per burst, the self-timed side re-arms its
//    own request (nreq_0) until the whole burst is taken, and num_r sender
//    registers hold words until they are read:
//        L   = SCT + 2^n * ACT          (latency, first request to last Areq)
//        WT  = L - 2^n * SCT            (extra waiting time)
//        num_r = ceil(WT / ACT), at most 2^n
//
// The mode split, the latency and the num_r rule are those of the design;
// the picosecond integer representation is this implementation's choice.
`timescale 1ns / 1ps
package bstoa_pkg;

  typedef enum logic {
    MODE_SYNC_SLOW = 1'b0,  // SCT >= ACT: one req_0 transition per word
    MODE_SYNC_FAST = 1'b1   // SCT <  ACT: one req_0 transition per burst
  } mode_e;

  // Operating mode for a pair of cycle times (picoseconds).
  function automatic mode_e calc_mode(input int unsigned sct_ps, input int unsigned act_ps);
    return (sct_ps >= act_ps) ? MODE_SYNC_SLOW : MODE_SYNC_FAST;
  endfunction

  // Latency L of one burst (picoseconds).
  function automatic int unsigned calc_latency(input int unsigned sct_ps,
                                               input int unsigned act_ps,
                                               input int unsigned burst_len);
    if (sct_ps >= act_ps) return burst_len * sct_ps + act_ps;
    else                  return burst_len * act_ps + sct_ps;
  endfunction

  // Number of sender registers Sreg_k.
  function automatic int unsigned calc_num_r(input int unsigned sct_ps,
                                             input int unsigned act_ps,
                                             input int unsigned burst_len);
    int unsigned wt;
    int unsigned r;
    if (sct_ps >= act_ps) return 1;
    wt = calc_latency(sct_ps, act_ps, burst_len) - burst_len * sct_ps;
    r  = (wt + act_ps - 1) / act_ps;
    if (r > burst_len) r = burst_len;
    return r;
  endfunction

  // Width of a counter that counts 0 .. n-1 (at least one bit).
  function automatic int unsigned cnt_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
