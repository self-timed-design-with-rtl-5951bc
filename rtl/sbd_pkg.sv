// sbd_pkg: shared types and timing constants of the semi-bundled-delay (SBD)
// self-timed adder.
//
// The asynchronous circuit is simulated in discrete time: every module is
// clocked by a fast time-base clock `clk`, and one clock tick stands for
// 10 ps of circuit time. Gate, latch and domino delays are integer tick
// counts. The document gives delays only for the ADD3 component (470-680 ps
// domino core, 1465-1741 ps REQ to ACK, about 450-500 ps wrapper overhead);
// every constant below is this design's own choice, picked so that the ADD3
// component lands in that range. The INC3 matched delays are computed from
// the carry-chain hop time so that the bundling constraint holds for any
// operands.
package sbd_pkg;

  typedef logic [11:0] tick_t;

  // Delay of one generalized C-element stage (gC plus output inverter).
  localparam int unsigned GC_TICKS = 15;
  // TSPC latch including its completion detection.
  localparam int unsigned LATCH_TICKS = 55;
  // Pre-charge of a domino node and the worst-case pre-charge matched delay.
  localparam int unsigned PRE_TICKS = 10;
  localparam int unsigned PC_MD_TICKS = 20;

  // ADD3 domino gate: evaluation time of each output, counted from PC rising.
  localparam int unsigned ADD3_EVAL_S0 = 35;
  localparam int unsigned ADD3_EVAL_S1 = 42;
  localparam int unsigned ADD3_EVAL_S2 = 47;
  localparam int unsigned ADD3_EVAL_C = 47;
  // ADD3 worst-case matched delays, counted from REQ rising (they include
  // the REQ-to-PC gC stage): GC + {40, 50, 58, 68}.
  localparam int unsigned ADD3_MD_S0 = 55;
  localparam int unsigned ADD3_MD_S1 = 65;
  localparam int unsigned ADD3_MD_S2 = 73;
  localparam int unsigned ADD3_MD_C = 83;

  // INC3 domino gates: carry gate and sum gates.
  localparam int unsigned INC3_EVAL_CO = 20;
  localparam int unsigned INC3_EVAL_SUM = 47;

  // Largest spread between the ACKs of two ADD3 components (core time
  // 47..68 ticks), plus a margin on every matched delay.
  localparam int unsigned ADD3_SKEW = 25;
  localparam int unsigned MD_MARGIN = 10;
  // Time from a carry-in arriving at an INC3 carry gate (PC already high)
  // to the latched carry-out being valid at the next stage.
  localparam int unsigned CARRY_HOP = INC3_EVAL_CO + GC_TICKS + LATCH_TICKS + 4;

  // Worst-case matched delay, from PACK rising, of INC3 stage k (k = 0 is the
  // stage that receives the adder's Cin).
  function automatic tick_t inc3_md_co(int unsigned k);
    return tick_t'(GC_TICKS + ADD3_SKEW + k * CARRY_HOP + INC3_EVAL_CO + MD_MARGIN);
  endfunction

  function automatic tick_t inc3_md_sum(int unsigned k);
    return tick_t'(GC_TICKS + ADD3_SKEW + k * CARRY_HOP + INC3_EVAL_SUM + MD_MARGIN);
  endfunction

endpackage
