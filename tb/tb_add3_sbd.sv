// tb_add3_sbd: runs all 64 operand pairs through the ADD3 SBD component
// with its default timing, twice each. Checks the latched sum and carry,
// and the REQ-to-ACK time against an independent timing reference:
//   latency = max over outputs (output is 1 ? GC + EVAL_i : MD_i)
//             + GC (MD_ACK) + LATCH + GC (ACK).
// Every latency must also lie in 147..174 ticks, i.e. 1465..1741 ps at
// 10 ps per tick, the span reported for this component. Counts operations
// whose carry output ended the wait early and ones that waited for the
// full matched delay.
module tb_add3_sbd;
  import sbd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [2:0] a = '0, b = '0, s;
  logic ack, c;
  int checks = 0, failures = 0, n_early = 0, n_worst = 0;
  int lat_min = 1000, lat_max = 0;

  add3_sbd dut (.clk, .rst_n, .req, .a, .b, .ack, .s, .c);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s a=%0d b=%0d at %0t", what, a, b, $time); end
  endtask

  initial begin
    int t, exp, ti;
    int unsigned ev [4], md [4];
    logic [3:0] r;
    ev = '{ADD3_EVAL_S0, ADD3_EVAL_S1, ADD3_EVAL_S2, ADD3_EVAL_C};
    md = '{ADD3_MD_S0, ADD3_MD_S1, ADD3_MD_S2, ADD3_MD_C};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int v = 0; v < 64; v++) begin
        @(negedge clk);
        a = 3'(v); b = 3'(v >> 3);
        r = 4'(int'(a) + int'(b));
        exp = 0;
        for (int i = 0; i < 4; i++) begin
          ti = r[i] ? int'(GC_TICKS + ev[i]) : int'(md[i]);
          if (ti > exp) exp = ti;
        end
        exp += 2 * GC_TICKS + LATCH_TICKS;
        req = 1'b1;
        t = 0;
        while (!ack && t < 1000) begin @(posedge clk); #1; t++; end
        check(t == exp, "REQ to ACK latency");
        if (t != exp) $display("  latency %0d expected %0d", t, exp);
        check(t >= 147 && t <= 174, "latency inside 1465..1741 ps");
        check({c, s} == r, "sum and carry");
        if (t < lat_min) lat_min = t;
        if (t > lat_max) lat_max = t;
        if (r[3]) n_early++; else n_worst++;
        repeat (5) @(posedge clk);
        @(negedge clk); req = 1'b0;
        t = 0;
        while (ack && t < 1000) begin @(posedge clk); #1; t++; end
        check(t <= 3 * GC_TICKS + PC_MD_TICKS, "ACK falls");
        check({c, s} == r, "outputs held after ACK falls");
      end
    end
    check(n_early > 0 && n_worst > 0, "both completion paths used");
    $display("ADD3 latency %0d..%0d ticks; early=%0d worst=%0d", lat_min, lat_max, n_early, n_worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
