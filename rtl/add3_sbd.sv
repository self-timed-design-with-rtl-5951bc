// add3_sbd: three-bit adder slice (ADD3) as a self-timed SBD component.
//
// One domino gate computes {c, s[2:0]} = a + b for a three-bit slice; the
// gate sits inside its own SBD wrapper, so the slice has a four-phase
// REQ/ACK interface and latched outputs s and c, valid from ACK rising
// until the next capture. a and b are bundled data: they must be steady
// from REQ rising until ACK falls.
//
// Each of the four single-rail outputs has its own evaluation time and its
// own worst-case matched delay. An output that evaluates to 1 discharges its
// dynamic node and ends its own wait early; an output that stays 0 waits for
// its matched delay. The slowest output, c, therefore finishes early exactly
// when the slice produces a carry. With the sbd_pkg defaults the domino core
// takes 47..68 ticks and REQ to ACK takes about 150..170 ticks (1.5..1.7 ns
// at 10 ps per tick), the span the document reports for its ADD3. The
// evaluation times and matched delays themselves are this design's choices.
module add3_sbd
  import sbd_pkg::*;
#(
  parameter int unsigned GC      = GC_TICKS,
  parameter tick_t       LATCH   = tick_t'(LATCH_TICKS),
  parameter tick_t       PRE     = tick_t'(PRE_TICKS),
  parameter tick_t       PC_MD   = tick_t'(PC_MD_TICKS),
  parameter tick_t       EVAL_S0 = tick_t'(ADD3_EVAL_S0),
  parameter tick_t       EVAL_S1 = tick_t'(ADD3_EVAL_S1),
  parameter tick_t       EVAL_S2 = tick_t'(ADD3_EVAL_S2),
  parameter tick_t       EVAL_C  = tick_t'(ADD3_EVAL_C),
  parameter tick_t       MD_S0   = tick_t'(ADD3_MD_S0),
  parameter tick_t       MD_S1   = tick_t'(ADD3_MD_S1),
  parameter tick_t       MD_S2   = tick_t'(ADD3_MD_S2),
  parameter tick_t       MD_C    = tick_t'(ADD3_MD_C)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic       ack,
  output logic [2:0] s,
  output logic       c
);

  logic       pc;
  logic [3:0] f;      // {c, s2, s1, s0} as the domino gate's logic functions
  logic [3:0] y;      // domino outputs
  logic [3:0] q;
  logic       valid;

  assign f = {1'b0, a} + {1'b0, b};

  domino_eval #(.W(1), .EVAL(EVAL_S0), .PRE(PRE)) u_s0 (.clk, .rst_n, .pc, .f(f[0]), .y(y[0]));
  domino_eval #(.W(1), .EVAL(EVAL_S1), .PRE(PRE)) u_s1 (.clk, .rst_n, .pc, .f(f[1]), .y(y[1]));
  domino_eval #(.W(1), .EVAL(EVAL_S2), .PRE(PRE)) u_s2 (.clk, .rst_n, .pc, .f(f[2]), .y(y[2]));
  domino_eval #(.W(1), .EVAL(EVAL_C),  .PRE(PRE)) u_c  (.clk, .rst_n, .pc, .f(f[3]), .y(y[3]));

  sbd_wrapper #(
    .N    (4),
    .DW   (4),
    .GC   (GC),
    .LATCH(LATCH),
    .PC_MD(PC_MD),
    .MD   ({MD_C, MD_S2, MD_S1, MD_S0})
  ) u_wrap (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req),
    .pc     (pc),
    .ch_done(y),
    .data_in(y),
    .data_q (q),
    .valid  (valid),
    .ack    (ack)
  );

  assign s = q[2:0];
  assign c = q[3];

  // ACK only rises once the latch holds the result.
  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) $rose(ack) |-> valid)
    else $error("add3_sbd: ACK rose before the result was latched");

endmodule
