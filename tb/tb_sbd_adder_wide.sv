// tb_sbd_adder_wide: the adder extended to 24 bits (eight slices), the
// extension the slice structure allows. The INC3 matched delays grow with
// the slice position, so the carry may ripple through all eight slices.
// Runs directed full-ripple cases and random additions through four-phase
// handshakes and checks sum, carry-out rails and return to zero. Counts
// additions whose carry ripples through all eight slices; it must happen.
module tb_sbd_adder_wide;
  localparam int unsigned W = 24, NS = W / 3;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, cin = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic ack, ack_co, cout, cout_n;
  int checks = 0, failures = 0, n_ripple = 0;

  sbd_adder12 #(.WIDTH(W)) dut (.clk, .rst_n, .req, .a, .b, .cin, .ack, .sum, .ack_co, .cout, .cout_n);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%06h b=%06h cin=%0b sum=%06h cout=%0b", what, a, b, cin, sum, cout);
    end
  endtask

  task automatic op(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    int t;
    logic [W:0] r;
    @(negedge clk);
    a = va; b = vb; cin = vc;
    r = {1'b0, va} + {1'b0, vb} + (W + 1)'(vc);
    if (vc && ((va ^ vb) == '1)) n_ripple++;
    req = 1'b1;
    t = 0;
    while (!(ack && ack_co) && t < 10000) begin @(posedge clk); #1; t++; end
    check(ack && ack_co, "handshake completes");
    check(sum == r[W-1:0], "sum");
    check(cout == r[W] && cout_n == !r[W], "carry-out rails");
    @(negedge clk); req = 1'b0;
    t = 0;
    while ((ack || ack_co) && t < 10000) begin @(posedge clk); #1; t++; end
    check(!ack && !ack_co && !cout && !cout_n, "return to zero");
  endtask

  initial begin
    logic [W-1:0] x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    op('1, '0, 1'b1);
    op(24'h924924, 24'h6DB6DB, 1'b1);
    op('1, '1, 1'b0);
    for (int i = 0; i < 200; i++) begin
      x = W'($urandom);
      if (i % 4 == 0) op(x, ~x, 1'($urandom));
      else            op(W'($urandom), W'($urandom), 1'($urandom));
    end
    check(n_ripple > 0, "carry through all slices");
    $display("full ripples: %0d", n_ripple);
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
