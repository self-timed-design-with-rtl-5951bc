// sbd_ack: completion signal (ACK) of the SBD wrapper.
//
// ACK is the wrapper's side of a four-phase handshake. It rises when the
// request EREQ is high and LACK' is high (the latch holds the evaluated
// result, so the outputs are valid). It falls when EREQ is low and the
// delayed pre-charge signal PCd is low (the domino network is pre-charged
// again, so a new request may come). Otherwise the keeper holds it. This is
// the document's transistor circuit read as a gC: pull-down EREQ and LACK' in
// series, pull-up PCd low and EREQ low in series. Timing: GC ticks.
module sbd_ack #(
  parameter int unsigned GC = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ereq,
  input  logic pcd,
  input  logic lack_n,
  output logic ack
);

  gc_element #(.DELAY(GC)) u_gc (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (ereq & lack_n),
    .reset(~ereq & ~pcd),
    .q    (ack)
  );

endmodule
