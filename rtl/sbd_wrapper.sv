// sbd_wrapper: semi-bundled delay (SBD) handshaking wrapper around a domino
// evaluation network.
//
// The wrapper turns a dynamic (domino) function block into a self-timed
// component with a four-phase REQ/ACK interface:
//   1. REQ rises (data inputs already steady). SBD_PC raises PC and the
//      network evaluates.
//   2. Each of the N network outputs has its own completion detector
//      (SBD_MDelay): it reports completion after that output's worst-case
//      matched delay MD[i], counted from REQ, or as soon as the output has
//      switched, whichever comes first. This early exit is what makes the
//      delay "semi-bundled".
//   3. When every output is complete the latch captures `data_in` and raises
//      LACK' (`valid`). SBD_PC drops PC and the network pre-charges, while
//      SBD_ACK raises ACK.
//   4. REQ falls. The completion detectors and the latch release at once;
//      ACK falls when the pre-charge matched delay (MD_PC) says that the
//      network is pre-charged again.
// `ch_done[i]` is the inverse of the document's Din_b for output i: high once
// that output has evaluated. `data_q` keeps the last result until the next
// capture; it is valid while `valid` is high.
//
// The five sub-blocks and their roles follow the document. Joining the
// per-output completion signals with an AND, and all delay values, are this
// design's choices. Delays are in ticks of `clk` (see sbd_pkg).
module sbd_wrapper #(
  parameter int unsigned                N     = 4,
  parameter int unsigned                DW    = 4,
  parameter int unsigned                GC    = 15,
  parameter sbd_pkg::tick_t             LATCH = sbd_pkg::tick_t'(55),
  parameter sbd_pkg::tick_t             PC_MD = sbd_pkg::tick_t'(20),
  parameter sbd_pkg::tick_t [N-1:0]     MD    = '{default: sbd_pkg::tick_t'(68)}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  output logic          pc,
  input  logic [N-1:0]  ch_done,
  input  logic [DW-1:0] data_in,
  output logic [DW-1:0] data_q,
  output logic          valid,
  output logic          ack
);

  logic [N-1:0] md_ack;
  logic         complete;
  logic         lack;
  logic         pcd;

  sbd_pc #(.GC(GC)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .ereq (req),
    .lack (lack),
    .pc   (pc)
  );

  for (genvar i = 0; i < N; i++) begin : g_md
    sbd_mdelay #(.DELAY(MD[i]), .GC(GC)) u_md (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (req),
      .din_b (~ch_done[i]),
      .md_ack(md_ack[i])
    );
  end

  assign complete = &md_ack;

  sbd_latch #(.W(DW), .LATCH(LATCH)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (complete),
    .d    (data_in),
    .q    (data_q),
    .done (valid),
    .lack (lack)
  );

  md_pc #(.DELAY(PC_MD), .GC(GC)) u_mdpc (
    .clk       (clk),
    .rst_n     (rst_n),
    .pc        (pc),
    .precharged(~|ch_done),
    .pcd       (pcd)
  );

  sbd_ack #(.GC(GC)) u_ack (
    .clk   (clk),
    .rst_n (rst_n),
    .ereq  (req),
    .pcd   (pcd),
    .lack_n(valid),
    .ack   (ack)
  );

  // Four-phase handshake, wrapper side: ACK only rises while REQ is high and
  // only falls while REQ is low.
  a_ack_rise: assert property (@(posedge clk) disable iff (!rst_n) $rose(ack) |-> $past(req))
    else $error("sbd_wrapper: ACK rose without REQ");
  a_ack_fall: assert property (@(posedge clk) disable iff (!rst_n) $fell(ack) |-> !$past(req))
    else $error("sbd_wrapper: ACK fell while REQ high");
  // The latch must only capture while the network is still evaluating.
  a_capture_eval: assert property (@(posedge clk) disable iff (!rst_n) $rose(valid) |-> $past(pc))
    else $error("sbd_wrapper: result latched after pre-charge started");

endmodule
