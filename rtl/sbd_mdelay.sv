// sbd_mdelay: worst-case matched delay with early completion (SBD_MDelay).
//
// MD_ACK tells the wrapper that one output of the domino network is final.
// Its rising edge follows the rising edge of REQ after the worst-case
// matched delay of that output, or earlier, as soon as the output's dynamic
// node has discharged (Din_b low): a domino output is monotonic, so once it
// has switched it cannot switch back during evaluation. The falling edge of
// REQ passes straight through, and the delay chain is reset at once
// (early-reset inverter chain). In the document's circuit the inverted REQ
// drives P1 and N2, the inverter chain drives P2, and Din_b drives P3 in
// parallel with P2; read as a gC: set = REQ & (REQ delayed | ~Din_b),
// reset = ~REQ.
//
// Timing: the delayed REQ rises DELAY ticks after REQ; MD_ACK rises GC ticks
// after its set condition and falls one tick after REQ falls (a single
// pull-down transistor), so the latch releases before ACK can fall.
module sbd_mdelay #(
  parameter sbd_pkg::tick_t DELAY = sbd_pkg::tick_t'(68),
  parameter int unsigned    GC    = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic din_b,
  output logic md_ack
);

  import sbd_pkg::*;

  tick_t cnt;
  logic  req_d;   // end of the even-stage inverter chain

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      req_d <= 1'b0;
    end else if (!req) begin
      cnt   <= '0;
      req_d <= 1'b0;
    end else if (!req_d) begin
      if (cnt + tick_t'(1) >= DELAY) req_d <= 1'b1;
      else                           cnt   <= cnt + tick_t'(1);
    end
  end

  gc_element #(.DELAY(GC), .FALL(1)) u_gc (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (req & (req_d | ~din_b)),
    .reset(~req),
    .q    (md_ack)
  );

endmodule
