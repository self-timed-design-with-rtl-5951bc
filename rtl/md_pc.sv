// md_pc: pre-charge matched delay (MD_PC) of the SBD wrapper.
//
// PCd is a copy of PC whose falling edge is held back until the domino
// network has finished pre-charging, so that ACK does not fall (inviting a
// new request) while dynamic nodes are still being restored. The document
// says only that this circuit is similar to the worst-case matched delay;
// it is built here as that circuit's mirror image: the rising edge of PC
// passes through, the falling edge waits for a pre-charge delay chain of
// DELAY ticks, or less when every evaluation output is already back at its
// pre-charged level (`precharged` high). Read as a gC: set = PC,
// reset = ~PC & (PC-low delayed | precharged). Timing: GC ticks per edge.
module md_pc #(
  parameter sbd_pkg::tick_t DELAY = sbd_pkg::tick_t'(20),
  parameter int unsigned    GC    = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pc,
  input  logic precharged,
  output logic pcd
);

  import sbd_pkg::*;

  tick_t cnt;
  logic  pcl_d;   // delayed "PC is low"

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      pcl_d <= 1'b1;
    end else if (pc) begin
      cnt   <= '0;
      pcl_d <= 1'b0;
    end else if (!pcl_d) begin
      if (cnt + tick_t'(1) >= DELAY) pcl_d <= 1'b1;
      else                           cnt   <= cnt + tick_t'(1);
    end
  end

  gc_element #(.DELAY(GC)) u_gc (
    .clk  (clk),
    .rst_n(rst_n),
    .set  (pc),
    .reset(~pc & (pcl_d | precharged)),
    .q    (pcd)
  );

endmodule
