// tb_c_element: checks the 4-input Muller C-element against a reference
// state machine. Random input vectors are held for longer than the gate
// delay; the output must be 1 after all-ones, 0 after all-zeros, and keep
// its previous value for any mixed vector.
module tb_c_element;
  localparam int unsigned N = 4, DELAY = 3;
  logic clk = 1'b0, rst_n = 1'b0, out;
  logic [N-1:0] in = '0;
  logic ref_q = 1'b0;
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_hold = 0;

  c_element #(.N(N), .DELAY(DELAY)) dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0:       in = '1;
        1:       in = '0;
        default: in = N'($urandom);
      endcase
      if (in == '1)      begin ref_q = 1'b1; n_set++;   end
      else if (in == '0) begin ref_q = 1'b0; n_reset++; end
      else               n_hold++;
      repeat (DELAY + 1) @(posedge clk);
      #1;
      checks++;
      if (out !== ref_q) begin
        failures++;
        $display("FAIL in=%b out=%0b expected %0b", in, out, ref_q);
      end
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_hold == 0) failures++;
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
