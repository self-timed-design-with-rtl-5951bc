// tb_sbd_latch: checks the completion-detecting latch. After `en` rises,
// `done` (LACK') must rise exactly LATCH ticks later with `q` equal to `d`
// and LACK low; `q` must not change while `d` changes afterwards; `done`
// must fall one tick after `en` falls while `q` keeps the value.
module tb_sbd_latch;
  localparam int unsigned W = 8, LATCH = 6;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, done, lack;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0;

  sbd_latch #(.W(W), .LATCH(12'(LATCH))) dut (.clk, .rst_n, .en, .d, .q, .done, .lack);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [W-1:0] v;
    int t;
    repeat (3) @(posedge clk);
    check(q == '0 && !done && lack, "reset state");
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) begin
      v = W'($urandom);
      @(negedge clk); d = v; en = 1'b1;
      t = 0;
      while (!done && t < 100) begin @(posedge clk); #1; t++; end
      check(t == LATCH, "latch delay");
      check(q == v, "captured value");
      check(lack == 1'b0, "LACK low when done");
      @(negedge clk); d = ~v;
      repeat (3) @(posedge clk);
      check(q == v, "q held while en high");
      @(negedge clk); en = 1'b0;
      @(posedge clk); #1;
      check(!done && lack, "done falls with en");
      check(q == v, "q held after en falls");
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
