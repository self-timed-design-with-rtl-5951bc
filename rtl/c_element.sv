// c_element: N-input Muller C-element.
//
// The output rises once every input is 1 and falls once every input is 0;
// in between it holds. In the adder it joins the sum acknowledges of the
// INC3 stages into the adder's ACK (four inputs, as drawn in the adder's
// block diagram). Built on gc_element with set = AND of the inputs and
// reset = NOR of the inputs; the output follows DELAY ticks after the
// condition holds.
module c_element #(
  parameter int unsigned N     = 4,
  parameter int unsigned DELAY = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  gc_element #(.DELAY(DELAY)) u_gc (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (&in),
    .reset(~|in),
    .q    (out)
  );

endmodule
