// domino_eval: timing model of a dynamic domino evaluation network.
//
// Each of the W outputs is a domino gate output: 0 while PC is low
// (pre-charge) and, while PC is high, rising once its logic function `f`
// has been true for EVAL ticks. Once risen an output stays high until the
// next pre-charge (monotonic behaviour, kept by the keeper). When PC falls
// the outputs return to 0 after PRE ticks. The caller supplies `f` from its
// inputs; the inputs must be monotonic during evaluation (static data held
// steady, or dual-rail signals that only rise), as for any domino logic.
// The document does not give the transistor networks; function plus delays
// is this design's model of them.
module domino_eval #(
  parameter int unsigned    W    = 1,
  parameter sbd_pkg::tick_t EVAL = sbd_pkg::tick_t'(47),
  parameter sbd_pkg::tick_t PRE  = sbd_pkg::tick_t'(10)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pc,
  input  logic [W-1:0] f,
  output logic [W-1:0] y
);

  import sbd_pkg::*;

  tick_t ecnt [W];
  tick_t pcnt;

  // Pre-charge counter, shared by all outputs of the network.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       pcnt <= '0;
    else if (pc)                      pcnt <= '0;
    else if (pcnt < PRE)              pcnt <= pcnt + tick_t'(1);
  end

  for (genvar i = 0; i < W; i++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y[i]    <= 1'b0;
        ecnt[i] <= '0;
      end else if (!pc) begin
        ecnt[i] <= '0;
        if (pcnt + tick_t'(1) >= PRE) y[i] <= 1'b0;
      end else if (!y[i]) begin
        if (!f[i])                              ecnt[i] <= '0;
        else if (ecnt[i] + tick_t'(1) >= EVAL)  y[i]    <= 1'b1;
        else                                    ecnt[i] <= ecnt[i] + tick_t'(1);
      end
    end
  end

endmodule
