// tb_sbd_wrapper: drives the SBD wrapper through four-phase handshakes with
// a behavioural three-output evaluation network in the testbench. For each
// request the network picks, per output, whether the output switches and
// after how many ticks of evaluation. The testbench checks:
//   - PC rises only after REQ and falls once the result is latched,
//   - ACK rises exactly max_i(switches_i ? GC + t_i : MD_i) + GC + LATCH + GC
//     ticks after REQ (early completion or matched delay per output),
//   - the latched data equals the outputs that switched,
//   - ACK falls GC ticks after REQ falls once the network is pre-charged.
// It counts requests completed early and by worst-case delay; both must occur.
module tb_sbd_wrapper;
  localparam int unsigned N = 3, GC = 2, LATCH = 4, PRE = 3;
  localparam logic [N-1:0][11:0] MD = {12'd20, 12'd15, 12'd10};

  logic clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic pc, valid, ack;
  logic [N-1:0] ch_done = '0, data_q;
  int checks = 0, failures = 0, n_early = 0, n_worst = 0;

  // Behaviour of the network for the current request.
  logic [N-1:0] sw;
  int unsigned  te [N];

  sbd_wrapper #(.N(N), .DW(N), .GC(GC), .LATCH(12'(LATCH)), .PC_MD(12'd6), .MD(MD)) dut (
    .clk, .rst_n, .req, .pc, .ch_done, .data_in(ch_done), .data_q, .valid, .ack
  );

  always #5 clk = ~clk;

  // Evaluation network: outputs rise te[i] ticks after PC rises, return to
  // 0 PRE ticks after PC falls.
  initial begin
    forever begin
      int unsigned t;
      @(posedge clk); #1;
      if (pc) begin
        t = 0;
        while (pc) begin
          for (int i = 0; i < N; i++) if (sw[i] && t == te[i]) ch_done[i] = 1'b1;
          @(posedge clk); #1; t++;
        end
        repeat (PRE - 1) @(posedge clk);
        #1 ch_done = '0;
      end
    end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int t, exp, worst;
    logic early;
    sw = '0;
    for (int i = 0; i < N; i++) te[i] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int r = 0; r < 200; r++) begin
      sw = N'($urandom);
      for (int i = 0; i < N; i++) te[i] = $urandom_range(1, MD[i] - GC - 1);
      // reference completion time
      exp = 0; early = 1'b1;
      for (int i = 0; i < N; i++) begin
        int ti;
        ti = sw[i] ? GC + te[i] : int'(MD[i]);
        if (ti > exp) begin exp = ti; early = sw[i]; end
        else if (ti == exp && !sw[i]) early = 1'b0;
      end
      exp = exp + GC + LATCH + GC;
      @(negedge clk); req = 1'b1;
      t = 0;
      while (!ack && t < 500) begin
        @(posedge clk); #1; t++;
        if (t < GC) check(!pc, "PC before GC ticks");
      end
      check(t == exp, "REQ to ACK latency");
      if (t != exp) $display("  latency %0d expected %0d sw=%b", t, exp, sw);
      check(valid, "latch valid at ACK");
      check(data_q == sw, "latched data");
      if (early) n_early++; else n_worst++;
      repeat (GC + 1) @(posedge clk); #1;
      check(!pc, "PC low after latching");
      repeat ($urandom_range(PRE + 12, PRE + 20)) @(posedge clk);
      @(negedge clk); req = 1'b0;
      t = 0;
      while (ack && t < 500) begin @(posedge clk); #1; t++; end
      check(t == GC, "ACK fall latency");
      check(!valid, "latch released");
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    check(n_early > 0, "early completion seen");
    check(n_worst > 0, "worst-case completion seen");
    $display("early=%0d worst=%0d", n_early, n_worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
