// tb_md_pc: checks the pre-charge matched delay. PCd must rise GC ticks
// after PC rises; after PC falls it must fall DELAY + GC ticks later when
// the network never reports "precharged", or k + GC ticks later when it
// does so k ticks after PC fell, whichever is earlier.
module tb_md_pc;
  localparam int unsigned DELAY = 15, GC = 2;
  logic clk = 1'b0, rst_n = 1'b0, pc = 1'b0, precharged = 1'b1, pcd;
  int checks = 0, failures = 0, n_early = 0, n_worst = 0;

  md_pc #(.DELAY(12'(DELAY)), .GC(GC)) dut (.clk, .rst_n, .pc, .precharged, .pcd);

  always #5 clk = ~clk;

  task automatic one(int k);
    int t, exp;
    if (k == 0) k = 1;  // the earliest observable switch is one tick after the edge
    @(negedge clk); pc = 1'b1; precharged = 1'b0;
    t = 0;
    while (pcd !== 1'b1 && t < 100) begin @(posedge clk); #1; t++; end
    checks++;
    if (t != GC) begin failures++; $display("FAIL PCd rose after %0d", t); end
    repeat (5) @(posedge clk);
    exp = (k >= 0 && k < DELAY) ? k + GC : DELAY + GC;
    @(negedge clk); pc = 1'b0;
    t = 0;
    while (pcd !== 1'b0 && t < 100) begin
      @(posedge clk); #1; t++;
      if (t == k) precharged = 1'b1;
    end
    checks++;
    if (t != exp) begin
      failures++;
      $display("FAIL k=%0d: PCd fell after %0d, expected %0d", k, t, exp);
    end else if (exp < DELAY + GC) n_early++;
    else n_worst++;
    @(negedge clk); precharged = 1'b1;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(-1);
    one(3);
    one(DELAY + 2);
    for (int i = 0; i < 40; i++) one(int'($urandom_range(0, 2 * DELAY)) - 1);
    checks++;
    if (n_early == 0 || n_worst == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
