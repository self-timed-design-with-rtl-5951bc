// tb_inc3_sbd: drives one INC3reg component (timed as the second slice of
// the chain) with every ADD3 result {c, s} and both carry-in values, the
// carry-in arriving on its dual rails a random number of ticks after PACK.
// Checks the latched sum, the carry-out rails while ack_co is high, the
// rails returning to 0 after PACK falls, and the exact ACK and ack_co times
// from an independent timing reference: a gate that needs the carry-in
// starts evaluating when both PC and the carry are there, a gate that does
// not need it starts with PC; a sum bit that stays 0 waits for MD_SUM.
// Counts generate, kill and propagate slices; each must occur.
module tb_inc3_sbd;
  import sbd_pkg::*;
  localparam int unsigned K = 1;
  localparam int unsigned MDS = inc3_md_sum(K), MDC = inc3_md_co(K);
  localparam int unsigned GC = GC_TICKS;
  logic clk = 1'b0, rst_n = 1'b0, pack = 1'b0;
  logic [2:0] s = '0, sum;
  logic c = 1'b0, ci_t = 1'b0, ci_f = 1'b0;
  logic ack, ack_co, co_t, co_f;
  int checks = 0, failures = 0, n_gen = 0, n_kill = 0, n_prop = 0;

  inc3_sbd #(.MD_SUM(tick_t'(MDS)), .MD_CO(tick_t'(MDC))) dut (
    .clk, .rst_n, .pack, .s, .c, .ci_t, .ci_f, .ack, .sum, .ack_co, .co_t, .co_f
  );

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s s=%0d c=%0b at %0t", what, s, c, $time); end
  endtask

  int d;          // carry-in arrival, ticks after PACK
  logic cin;

  // Carry-in driver: rails rise d ticks after PACK, fall with PACK.
  initial begin
    forever begin
      @(posedge pack);
      for (int t = 0; t < d; t++) begin @(posedge clk); #1; end
      if (d == 0) #1;
      ci_t = cin; ci_f = ~cin;
      @(negedge pack);
      ci_t = 1'b0; ci_f = 1'b0;
    end
  end

  initial begin
    int t, t_s, t_c, exp_s, exp_c, ti, st, total;
    logic [3:0] r;
    logic needc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 30; v++) begin
        @(negedge clk);
        s = 3'(v % 8); c = 1'(v / 8);
        if (c && s == 3'b111) continue;  // an ADD3 result is at most 14
        cin = 1'((v + rep) % 2);
        d = (rep == 0) ? 0 : $urandom_range(1, 100);
        total = int'({c, s}) + int'(cin);
        r = 4'(total);
        // reference times
        needc = !c && (s == 3'b111);
        exp_c = (needc ? ((d > int'(GC)) ? d : int'(GC)) : int'(GC)) + INC3_EVAL_CO + 2 * GC + LATCH_TICKS;
        exp_s = 0;
        for (int i = 0; i < 3; i++) begin
          logic p;
          p = (i == 0) ? 1'b1 : ((i == 1) ? s[0] : (s[0] & s[1]));
          st = p ? ((d > int'(GC)) ? d : int'(GC)) : int'(GC);
          ti = r[i] ? st + int'(INC3_EVAL_SUM) : int'(MDS);
          if (ti > exp_s) exp_s = ti;
        end
        exp_s += 2 * GC + LATCH_TICKS;
        if (c) n_gen++; else if (s != 3'b111) n_kill++; else n_prop++;
        pack = 1'b1;
        t = 0; t_s = 0; t_c = 0;
        while (!(ack && ack_co) && t < 2000) begin
          @(posedge clk); #1; t++;
          if (ack_co && t_c == 0) begin
            t_c = t;
            check(co_t == r[3] && co_f == !r[3], "carry-out rails");
          end
          if (ack && t_s == 0) t_s = t;
        end
        check(t_c == exp_c, "ack_co time");
        check(t_s == exp_s, "ACK time");
        if (t_c != exp_c || t_s != exp_s)
          $display("  d=%0d cin=%0b ack_co %0d/%0d ack %0d/%0d", d, cin, t_c, exp_c, t_s, exp_s);
        check(sum == r[2:0], "sum");
        repeat (4) @(posedge clk);
        @(negedge clk); pack = 1'b0;
        t = 0;
        while ((ack || ack_co) && t < 2000) begin @(posedge clk); #1; t++; end
        check(!co_t && !co_f, "carry rails return to zero");
        check(sum == r[2:0], "sum held");
        repeat (2) @(posedge clk);
      end
    end
    check(n_gen > 0 && n_kill > 0 && n_prop > 0, "generate, kill and propagate seen");
    $display("generate=%0d kill=%0d propagate=%0d", n_gen, n_kill, n_prop);
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
