// inc3_sbd: carry-increment slice (INC3reg) as a self-timed SBD component.
//
// It adds the carry coming from the slice below to the latched result of the
// ADD3 slice above it: sum = s + cin, cout = c | (s == 3'b111 & cin). The
// carry travels between slices on two rails, ci_t/ci_f (true/false), both 0
// until the carry is known, so a domino gate can wait for it. Two SBD
// wrappers share the request PACK (the ADD3 slice's ACK):
//   - the carry wrapper evaluates the carry-out gate. It needs no carry-in
//     when the ADD3 slice generates (c = 1) or kills (s != 111) the carry,
//     so those slices finish without waiting for the chain; only s = 111
//     waits. Either rail rising ends its matched-delay wait. The latched
//     rails are passed on as co_t/co_f while the latch holds them, and
//     return to 0 when PACK falls; ack_co is this wrapper's ACK.
//   - the sum wrapper evaluates three single-rail sum gates
//     sum[i] = s[i] ^ (cin & s[i-1:0] all ones); a sum bit that rises ends
//     its wait early, one that stays 0 waits for the matched delay. ack is
//     this wrapper's ACK.
// MD_SUM and MD_CO must cover the latest carry-in arrival, which grows with
// the slice's position in the chain (sbd_pkg::inc3_md_*). The dual-rail
// carry, the split into two wrappers and all delays are this design's
// reading of the document's block diagram.
module inc3_sbd
  import sbd_pkg::*;
#(
  parameter int unsigned GC       = GC_TICKS,
  parameter tick_t       LATCH    = tick_t'(LATCH_TICKS),
  parameter tick_t       PRE      = tick_t'(PRE_TICKS),
  parameter tick_t       PC_MD    = tick_t'(PC_MD_TICKS),
  parameter tick_t       EVAL_SUM = tick_t'(INC3_EVAL_SUM),
  parameter tick_t       EVAL_CO  = tick_t'(INC3_EVAL_CO),
  parameter tick_t       MD_SUM   = inc3_md_sum(0),
  parameter tick_t       MD_CO    = inc3_md_co(0)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pack,
  input  logic [2:0] s,
  input  logic       c,
  input  logic       ci_t,
  input  logic       ci_f,
  output logic       ack,
  output logic [2:0] sum,
  output logic       ack_co,
  output logic       co_t,
  output logic       co_f
);

  // ---------------- carry-out ----------------
  logic       pc_co;
  logic [1:0] f_co, y_co, q_co;
  logic       valid_co;
  logic       all1;

  assign all1    = &s;
  assign f_co[0] = c | (all1 & ci_t);          // carry-out is 1
  assign f_co[1] = ~c & (~all1 | ci_f);        // carry-out is 0

  domino_eval #(.W(2), .EVAL(EVAL_CO), .PRE(PRE)) u_dom_co (
    .clk, .rst_n, .pc(pc_co), .f(f_co), .y(y_co)
  );

  sbd_wrapper #(
    .N(1), .DW(2), .GC(GC), .LATCH(LATCH), .PC_MD(PC_MD), .MD({MD_CO})
  ) u_wrap_co (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (pack),
    .pc     (pc_co),
    .ch_done(|y_co),
    .data_in(y_co),
    .data_q (q_co),
    .valid  (valid_co),
    .ack    (ack_co)
  );

  assign co_t = q_co[0] & valid_co;
  assign co_f = q_co[1] & valid_co;

  // ---------------- sum ----------------
  logic       pc_s;
  logic [2:0] prop;     // all lower bits of s are 1: the carry-in reaches bit i
  logic [2:0] f_s, y_s, q_s;
  logic       valid_s;

  assign prop = {s[1] & s[0], s[0], 1'b1};

  for (genvar i = 0; i < 3; i++) begin : g_sum
    assign f_s[i] = (s[i] & (~prop[i] | ci_f)) | (~s[i] & prop[i] & ci_t);
  end

  domino_eval #(.W(3), .EVAL(EVAL_SUM), .PRE(PRE)) u_dom_s (
    .clk, .rst_n, .pc(pc_s), .f(f_s), .y(y_s)
  );

  sbd_wrapper #(
    .N(3), .DW(3), .GC(GC), .LATCH(LATCH), .PC_MD(PC_MD), .MD({3{MD_SUM}})
  ) u_wrap_s (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (pack),
    .pc     (pc_s),
    .ch_done(y_s),
    .data_in(y_s),
    .data_q (q_s),
    .valid  (valid_s),
    .ack    (ack)
  );

  assign sum = q_s;

  a_ack_valid: assert property (@(posedge clk) disable iff (!rst_n) $rose(ack) |-> valid_s)
    else $error("inc3_sbd: ACK rose before the sum was latched");

  // The carry-in rails are never both high.
  a_ci_rails: assert property (@(posedge clk) disable iff (!rst_n) !(ci_t && ci_f))
    else $error("inc3_sbd: both carry-in rails high");

endmodule
