// tb_domino_eval: checks the domino evaluation-network model. Outputs are 0
// while PC is low; with PC high an output rises EVAL ticks after its
// function becomes true and stays high (monotonic) even if the function
// drops; outputs whose function stays false stay 0; after PC falls the
// outputs return to 0 after PRE ticks.
module tb_domino_eval;
  localparam int unsigned W = 3, EVAL = 7, PRE = 4;
  logic clk = 1'b0, rst_n = 1'b0, pc = 1'b0;
  logic [W-1:0] f = '0, y;
  int checks = 0, failures = 0;

  domino_eval #(.W(W), .EVAL(12'(EVAL)), .PRE(12'(PRE))) dut (.clk, .rst_n, .pc, .f, .y);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t y=%b", what, $time, y); end
  endtask

  initial begin
    logic [W-1:0] v;
    int t, late;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      v = W'($urandom);
      late = $urandom_range(1, 5);
      // Function true before pre-charge ends: nothing may evaluate.
      @(negedge clk); f = v;
      repeat (3) @(posedge clk); #1;
      check(y == '0, "no output while pre-charging");
      // Bit 0 of the function arrives `late` ticks after PC.
      @(negedge clk); pc = 1'b1; f = v & ~W'(1);
      for (t = 1; t <= EVAL + late + 2; t++) begin
        @(posedge clk); #1;
        if (t == late) f = v;
        for (int b = 1; b < W; b++)
          check(y[b] == (v[b] && t >= EVAL), "evaluation timing");
        check(y[0] == (v[0] && t >= EVAL + late), "late input timing");
      end
      // Monotonic: the output holds when its function drops.
      @(negedge clk); f = '0;
      repeat (2) @(posedge clk); #1;
      check(y == v, "output held during evaluation");
      @(negedge clk); pc = 1'b0;
      for (t = 1; t <= PRE + 1; t++) begin
        @(posedge clk); #1;
        check(y == ((t >= PRE) ? '0 : v), "pre-charge timing");
      end
    end
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
