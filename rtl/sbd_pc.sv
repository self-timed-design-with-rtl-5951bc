// sbd_pc: pre-charge/evaluate control of the SBD wrapper.
//
// PC = 1 puts the domino evaluation network into evaluation, PC = 0 into
// pre-charge. PC rises when the environment's request EREQ is high while
// LACK is high (the latch does not hold a result yet), and falls as soon as
// LACK falls, i.e. once the evaluated result has been latched. With EREQ low
// and LACK high the keeper holds PC low. This is the transistor circuit of
// the document read as a gC: the pull-down stack is EREQ in series with
// LACK, the pull-up is LACK low. Timing: GC ticks from the enabling edge.
module sbd_pc #(
  parameter int unsigned GC = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ereq,
  input  logic lack,
  output logic pc
);

  gc_element #(.DELAY(GC)) u_gc (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (ereq & lack),
    .reset(~lack),
    .q    (pc)
  );

endmodule
