// tb_gc_element: checks the generalized C-element model.
// Set drives the output to 1 and reset to 0, each only after the set or
// reset condition has held for DELAY ticks; with neither active the output
// holds; a pulse shorter than DELAY is swallowed.
module tb_gc_element;
  localparam int unsigned DELAY = 4;
  logic clk = 1'b0, rst_n = 1'b0, set = 1'b0, reset = 1'b0, q;
  int checks = 0, failures = 0;

  gc_element #(.DELAY(DELAY)) dut (.clk, .rst_n, .set, .reset, .q);

  always #5 clk = ~clk;

  task automatic expect_q(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, exp, $time);
    end
  endtask

  // Apply set/reset for `n` ticks and check q each tick against the model:
  // q follows only once the condition has held DELAY ticks.
  task automatic apply(logic s, logic r, int n, logic q0, string what);
    for (int i = 1; i <= n; i++) begin
      @(negedge clk); set = s; reset = r;
      @(posedge clk); #1;
      if (s && i >= DELAY)      expect_q(1'b1, what);
      else if (r && i >= DELAY) expect_q(1'b0, what);
      else                      expect_q(q0, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    expect_q(1'b0, "reset value");
    rst_n = 1'b1;
    apply(1'b0, 1'b0, 5, 1'b0, "hold 0");
    apply(1'b1, 1'b0, 6, 1'b0, "set");
    apply(1'b0, 1'b0, 5, 1'b1, "hold 1");
    apply(1'b0, 1'b1, 2, 1'b1, "short reset pulse");
    apply(1'b0, 1'b0, 5, 1'b1, "pulse swallowed");
    apply(1'b0, 1'b1, 6, 1'b1, "reset");
    apply(1'b1, 1'b0, 3, 1'b0, "short set pulse");
    apply(1'b0, 1'b0, 4, 1'b0, "hold after short set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
