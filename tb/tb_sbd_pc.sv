// tb_sbd_pc: checks the pre-charge/evaluate control. PC must rise GC ticks
// after EREQ and LACK are both high, fall GC ticks after LACK falls, and
// stay low while EREQ is low even with LACK high. Random input sequences
// are checked against an independent reference of the same rule.
module tb_sbd_pc;
  localparam int unsigned GC = 2;
  logic clk = 1'b0, rst_n = 1'b0, ereq = 1'b0, lack = 1'b1, pc;
  logic ref_pc = 1'b0;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;

  sbd_pc #(.GC(GC)) dut (.clk, .rst_n, .ereq, .lack, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ereq = 1'($urandom);
      lack = 1'($urandom);
      if (ereq && lack) ref_pc = 1'b1;
      else if (!lack)   ref_pc = 1'b0;
      repeat (GC + 1) @(posedge clk);
      #1;
      checks++;
      if (pc !== ref_pc) begin
        failures++;
        $display("FAIL ereq=%0b lack=%0b pc=%0b expected %0b", ereq, lack, pc, ref_pc);
      end
    end
    // Timing: PC rises exactly GC ticks after the set condition.
    @(negedge clk); ereq = 1'b0; lack = 1'b0;
    repeat (GC + 2) @(posedge clk);
    @(negedge clk); ereq = 1'b1; lack = 1'b1;
    repeat (GC - 1) @(posedge clk);
    #1; checks++; if (pc !== 1'b0) begin failures++; $display("FAIL early PC"); end
    @(posedge clk); #1; checks++; if (pc !== 1'b1) begin failures++; $display("FAIL late PC"); end else n_rise++;
    @(negedge clk); lack = 1'b0;
    repeat (GC) @(posedge clk);
    #1; checks++; if (pc !== 1'b0) begin failures++; $display("FAIL PC did not fall"); end else n_fall++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
