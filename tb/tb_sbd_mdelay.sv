// tb_sbd_mdelay: checks the worst-case matched delay with early completion.
// With the output never switching (Din_b high) MD_ACK must rise exactly
// DELAY + GC ticks after REQ; with Din_b falling k ticks after REQ it must
// rise k + GC ticks after REQ when that is earlier; in every case it must
// fall one tick after REQ falls, and a new REQ must see a fresh delay chain.
module tb_sbd_mdelay;
  localparam int unsigned DELAY = 20, GC = 3;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0, din_b = 1'b1, md_ack;
  int checks = 0, failures = 0, n_early = 0, n_worst = 0;

  sbd_mdelay #(.DELAY(12'(DELAY)), .GC(GC)) dut (.clk, .rst_n, .req, .din_b, .md_ack);

  always #5 clk = ~clk;

  // One request; the output switches `k` ticks after REQ (k < 0: never).
  task automatic one(int k);
    int t, exp;
    if (k == 0) k = 1;  // the earliest observable switch is one tick after the edge
    exp = (k >= 0 && k < DELAY) ? k + GC : DELAY + GC;
    @(negedge clk); req = 1'b1;
    t = 0;
    while (md_ack !== 1'b1 && t < 200) begin
      @(posedge clk); #1; t++;
      if (t == k) din_b = 1'b0;
    end
    checks++;
    if (t != exp) begin
      failures++;
      $display("FAIL k=%0d: MD_ACK after %0d ticks, expected %0d", k, t, exp);
    end else if (exp < DELAY + GC) n_early++;
    else n_worst++;
    repeat (3) @(posedge clk);
    @(negedge clk); req = 1'b0; din_b = 1'b1;
    t = 0;
    while (md_ack !== 1'b0 && t < 200) begin @(posedge clk); #1; t++; end
    checks++;
    if (t != 1) begin
      failures++;
      $display("FAIL k=%0d: MD_ACK fell after %0d ticks, expected 1", k, t);
    end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one(-1);
    one(5);
    one(1);
    one(DELAY - 1);
    one(DELAY + 5);
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
