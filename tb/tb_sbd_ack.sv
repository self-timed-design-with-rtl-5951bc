// tb_sbd_ack: checks the completion signal. ACK rises when EREQ and LACK'
// are high, falls when EREQ and PCd are both low, holds otherwise. Random
// sequences are compared with an independent reference; a final sequence
// checks the GC-tick timing of both edges.
module tb_sbd_ack;
  localparam int unsigned GC = 2;
  logic clk = 1'b0, rst_n = 1'b0, ereq = 1'b0, pcd = 1'b0, lack_n = 1'b0, ack;
  logic ref_ack = 1'b0;
  int checks = 0, failures = 0;

  sbd_ack #(.GC(GC)) dut (.clk, .rst_n, .ereq, .pcd, .lack_n, .ack);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ereq = 1'($urandom); pcd = 1'($urandom); lack_n = 1'($urandom);
      if (ereq && lack_n)     ref_ack = 1'b1;
      else if (!ereq && !pcd) ref_ack = 1'b0;
      repeat (GC + 1) @(posedge clk);
      #1;
      checks++;
      if (ack !== ref_ack) begin
        failures++;
        $display("FAIL ereq=%0b pcd=%0b lack_n=%0b ack=%0b expected %0b", ereq, pcd, lack_n, ack, ref_ack);
      end
    end
    // ACK must stay high while PCd is still high after EREQ falls.
    @(negedge clk); ereq = 1'b1; lack_n = 1'b1; pcd = 1'b1;
    repeat (GC + 1) @(posedge clk);
    @(negedge clk); ereq = 1'b0; lack_n = 1'b0;
    repeat (GC + 3) @(posedge clk);
    #1; checks++; if (ack !== 1'b1) begin failures++; $display("FAIL ACK fell before PCd"); end
    @(negedge clk); pcd = 1'b0;
    repeat (GC - 1) @(posedge clk);
    #1; checks++; if (ack !== 1'b1) begin failures++; $display("FAIL ACK fell early"); end
    @(posedge clk); #1; checks++; if (ack !== 1'b0) begin failures++; $display("FAIL ACK did not fall"); end
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
