// sbd_latch: output latch with completion detection (SBD_latch).
//
// In the document this is a standard TSPC latch extended with completion
// detection. Here it is a W-bit register: when `en` (all outputs of the
// domino network complete) has been high for LATCH ticks, `q` takes `d` and
// `done` (LACK') rises; LACK = ~LACK' drives the pre-charge control. When
// `en` falls (REQ withdrawn), `done` falls on the next tick and `q` keeps its
// value until the next capture. `d` must be steady while `en` is high, which
// the wrapper guarantees by keeping the network in evaluation until `done`.
module sbd_latch #(
  parameter int unsigned    W     = 4,
  parameter sbd_pkg::tick_t LATCH = sbd_pkg::tick_t'(55)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         done,
  output logic         lack
);

  import sbd_pkg::*;

  tick_t cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      done <= 1'b0;
      cnt  <= '0;
    end else if (!en) begin
      done <= 1'b0;
      cnt  <= '0;
    end else if (!done) begin
      if (cnt + tick_t'(1) >= LATCH) begin
        q    <= d;
        done <= 1'b1;
      end else begin
        cnt <= cnt + tick_t'(1);
      end
    end
  end

  assign lack = ~done;

endmodule
