// sbd_adder12: 12-bit self-timed adder built from SBD domino components.
//
// The operands are cut into three-bit slices. Every slice has an ADD3
// component that adds its slice of a and b in one domino gate, all slices
// at once, and an INC3reg component below it that adds the carry from the
// slice underneath. The carry ripples from slice to slice on a dual-rail
// pair; a slice whose ADD3 result generates or kills the carry passes it on
// without waiting, so the chain is only as long as the longest run of
// propagating slices. A C-element joins the sum acknowledges of all INC3reg
// components into ACK. The carry-out of the top slice comes out on two
// rails (cout, cout_n) with its own acknowledge ack_co.
//
// Interface (four-phase, return to zero): set a, b, cin, then raise req;
// sum is valid once ack rises, cout/cout_n once ack_co rises. Lower req
// only after ack rises; raise it again only after ack and ack_co have
// fallen. Operands must stay steady until ack falls. All timing is in ticks
// of clk (10 ps each); see sbd_pkg.
//
// The structure (ADD3 over INC3reg slices, Cin inverted into the false
// carry rail of the first slice, the C-element on the acknowledges, signal
// names) follows the document's 12-bit adder figure. WIDTH may be any
// multiple of three, as the document notes the adder extends to larger
// widths.
module sbd_adder12
  import sbd_pkg::*;
#(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned GROUP = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             ack,
  output logic [WIDTH-1:0] sum,
  output logic             ack_co,
  output logic             cout,
  output logic             cout_n
);

  localparam int unsigned NS = WIDTH / GROUP;

  logic [NS-1:0] add_ack;
  logic [NS-1:0] add_c;
  logic [NS-1:0] inc_ack;
  logic [NS-1:0] inc_ack_co;
  logic [NS:0]   car_t, car_f;
  logic [WIDTH-1:0] add_s;

  assign car_t[0] = cin;
  assign car_f[0] = ~cin;

  for (genvar k = 0; k < NS; k++) begin : g_slice
    add3_sbd u_add3 (
      .clk  (clk),
      .rst_n(rst_n),
      .req  (req),
      .a    (a[GROUP*k +: GROUP]),
      .b    (b[GROUP*k +: GROUP]),
      .ack  (add_ack[k]),
      .s    (add_s[GROUP*k +: GROUP]),
      .c    (add_c[k])
    );

    inc3_sbd #(
      .MD_SUM(inc3_md_sum(k)),
      .MD_CO (inc3_md_co(k))
    ) u_inc3 (
      .clk   (clk),
      .rst_n (rst_n),
      .pack  (add_ack[k]),
      .s     (add_s[GROUP*k +: GROUP]),
      .c     (add_c[k]),
      .ci_t  (car_t[k]),
      .ci_f  (car_f[k]),
      .ack   (inc_ack[k]),
      .sum   (sum[GROUP*k +: GROUP]),
      .ack_co(inc_ack_co[k]),
      .co_t  (car_t[k+1]),
      .co_f  (car_f[k+1])
    );
  end

  c_element #(.N(NS), .DELAY(GC_TICKS)) u_cel (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (inc_ack),
    .out  (ack)
  );

  assign ack_co = inc_ack_co[NS-1];
  assign cout   = car_t[NS];
  assign cout_n = car_f[NS];

endmodule
