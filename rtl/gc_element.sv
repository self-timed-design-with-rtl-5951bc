// gc_element: generalized C-element (gC) with an inertial gate delay.
//
// A gC has a set function (its pull-down stack in the dynamic form) and a
// reset function (its pull-up stack); when neither conducts, a keeper holds
// the output. Here the output moves to 1 when `set` is high, to 0 when
// `reset` is high, and otherwise keeps its value. A rising change only
// reaches `q` once the new target has been steady for DELAY ticks of `clk`,
// a falling change after FALL ticks (FALL defaults to DELAY), so a pulse
// shorter than the gate delay is swallowed, as in a real gate. Both functions
// high at once would be a short circuit; an assertion flags it.
//
// The gC as the state-holding element of every wrapper control block follows
// the document; the discrete-time delay model is this design's own.
module gc_element #(
  parameter int unsigned DELAY = 15,
  parameter int unsigned FALL  = DELAY,
  parameter logic        INIT  = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic reset,
  output logic q
);

  logic        target;
  logic [15:0] cnt;

  always_comb begin
    if (set)        target = 1'b1;
    else if (reset) target = 1'b0;
    else            target = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= INIT;
      cnt <= '0;
    end else if (target != q) begin
      if (32'(cnt) + 1 >= (target ? DELAY : FALL)) begin
        q   <= target;
        cnt <= '0;
      end else begin
        cnt <= cnt + 16'd1;
      end
    end else begin
      cnt <= '0;
    end
  end

  a_no_fight: assert property (@(posedge clk) disable iff (!rst_n) !(set && reset))
    else $error("gc_element: set and reset active together");

endmodule
