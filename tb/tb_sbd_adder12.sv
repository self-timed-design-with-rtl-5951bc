// tb_sbd_adder12: end-to-end test of the 12-bit self-timed adder with every
// parameter at its default. The environment runs four-phase handshakes:
// it sets a, b and cin, raises req, waits for ack and ack_co, checks sum,
// cout and cout_n against a + b + cin, lowers req and waits for both
// acknowledges to fall. Operands are directed corner cases followed by
// random ones, including operands built to propagate the carry through
// every slice.
// It counts, from the operands, how often each mechanism of the design is
// exercised and fails if one never is: an ADD3 slice finishing early
// (carry out 1) and by its worst-case delay; an INC3 slice generating,
// killing and propagating the carry; a carry rippling through all four
// slices; an INC3 slice whose sum bits all rise (early completion) and one
// that waits for its matched delay; cin = 1; cout = 1.
// It also checks the REQ-to-ACK time against the worst-case bound of the
// matched delays and reports the shortest and longest ones seen.
module tb_sbd_adder12;
  import sbd_pkg::*;
  localparam int unsigned W = 12, NS = 4;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, cin = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic ack, ack_co, cout, cout_n;
  int checks = 0, failures = 0;
  int n_add_early = 0, n_add_worst = 0, n_gen = 0, n_kill = 0, n_prop = 0;
  int n_ripple4 = 0, n_sum_early = 0, n_sum_worst = 0, n_cin = 0, n_cout = 0;
  int lat_min = 100000, lat_max = 0;

  sbd_adder12 dut (.clk, .rst_n, .req, .a, .b, .cin, .ack, .sum, .ack_co, .cout, .cout_n);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%03h b=%03h cin=%0b sum=%03h cout=%0b at %0t", what, a, b, cin, sum, cout, $time);
    end
  endtask

  // Worst-case REQ-to-ACK bound: slowest ADD3, then the last INC3 slice's
  // matched delay, its latch and ACK, then the C-element.
  localparam int unsigned BOUND = ADD3_MD_C + 2 * GC_TICKS + LATCH_TICKS
                                + inc3_md_sum(NS - 1) + 2 * GC_TICKS + LATCH_TICKS + GC_TICKS;

  task automatic op(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    int t, run;
    logic [W:0] r;
    logic [2:0] sa, sb;
    logic [3:0] a3;
    logic       carry;
    @(negedge clk);
    a = va; b = vb; cin = vc;
    r = {1'b0, va} + {1'b0, vb} + (W + 1)'(vc);
    // mechanisms, from the operands
    carry = vc; run = 0;
    if (vc) n_cin++;
    for (int k = 0; k < NS; k++) begin
      sa = va[3*k +: 3]; sb = vb[3*k +: 3];
      a3 = 4'(int'(sa) + int'(sb));
      if (a3[3]) n_add_early++; else n_add_worst++;
      if (a3[3])               begin n_gen++;  run = 0; end
      else if (a3[2:0] != 3'b111) begin n_kill++; run = 0; end
      else                     begin n_prop++; if (carry) run++; end
      if (r[3*k +: 3] == 3'b111) n_sum_early++; else n_sum_worst++;
      carry = r[3*k + 3] ^ va[3*k + 3] ^ vb[3*k + 3];
      if (k == NS - 1) carry = r[W];
    end
    if (run == NS) n_ripple4++;
    if (r[W]) n_cout++;
    req = 1'b1;
    t = 0;
    while (!(ack && ack_co) && t < 5000) begin
      @(posedge clk); #1; t++;
      if (ack && t < lat_min) lat_min = t;
    end
    if (t > lat_max) lat_max = t;
    check(t <= int'(BOUND), "REQ to ACK within the worst-case bound");
    check(sum == r[W-1:0], "sum");
    check(cout == r[W] && cout_n == !r[W], "carry-out rails");
    repeat ($urandom_range(1, 8)) @(posedge clk);
    @(negedge clk); req = 1'b0;
    t = 0;
    while ((ack || ack_co) && t < 5000) begin @(posedge clk); #1; t++; end
    check(!ack && !ack_co, "acknowledges return to zero");
    check(!cout && !cout_n, "carry-out rails return to zero");
    repeat ($urandom_range(0, 8)) @(posedge clk);
  endtask

  initial begin
    logic [W-1:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    op(12'h000, 12'h000, 1'b0);
    op(12'hFFF, 12'h000, 1'b1);    // carry ripples through every slice
    op(12'hFFF, 12'hFFF, 1'b1);
    op(12'h924, 12'h6DB, 1'b1);    // every slice propagates
    op(12'h800, 12'h800, 1'b0);
    op(12'h555, 12'h2AA, 1'b0);
    op(12'h007, 12'h000, 1'b1);
    for (int i = 0; i < 600; i++) begin
      case ($urandom_range(0, 3))
        0: begin x = 12'($urandom); op(x, ~x, 1'($urandom)); end   // all-propagate slices
        default: op(12'($urandom), 12'($urandom), 1'($urandom));
      endcase
    end
    check(n_add_early > 0, "ADD3 early completion");
    check(n_add_worst > 0, "ADD3 worst-case completion");
    check(n_gen > 0 && n_kill > 0 && n_prop > 0, "carry generate, kill, propagate");
    check(n_ripple4 > 0, "carry through all slices");
    check(n_sum_early > 0 && n_sum_worst > 0, "INC3 sum early and worst-case");
    check(n_cin > 0 && n_cout > 0, "cin and cout");
    $display("ADD3 early=%0d worst=%0d | carry gen=%0d kill=%0d prop=%0d ripple4=%0d | sum early=%0d worst=%0d | cin=%0d cout=%0d",
             n_add_early, n_add_worst, n_gen, n_kill, n_prop, n_ripple4, n_sum_early, n_sum_worst, n_cin, n_cout);
    $display("REQ to ACK: %0d..%0d ticks (bound %0d)", lat_min, lat_max, BOUND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
