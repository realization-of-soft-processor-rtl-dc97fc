// tb_load_reg: checks the loadable register at 8 bits (IR, accumulator,
// a, b) and at 15 bits (y): reset clears it, ld=1 takes d at the clock
// edge, ld=0 holds, over random sequences.
module tb_load_reg;
  logic clk = 0, reset, ld;
  logic [7:0]  d8,  q8;
  logic [14:0] d15, q15;
  int m8, m15;
  int checks = 0, failures = 0;

  load_reg #(.W(8))  dut8  (.clk, .reset, .ld, .d(d8),  .q(q8));
  load_reg #(.W(15)) dut15 (.clk, .reset, .ld, .d(d15), .q(q15));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ld = 1; d8 = 8'hFF; d15 = 15'h7FFF;
    @(negedge clk);
    m8 = 0; m15 = 0;
    for (int c = 0; c < 2000; c++) begin
      checks++;
      if (int'(q8) != m8 || int'(q15) != m15) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d q8=%0h/%0h q15=%0h/%0h", c, q8, m8, q15, m15);
      end
      reset = ($urandom % 50) == 0;
      ld    = ($urandom % 2) == 0;
      d8    = 8'($urandom);
      d15   = 15'($urandom);
      @(negedge clk);
      if (reset) begin m8 = 0; m15 = 0; end
      else if (ld) begin m8 = int'(d8); m15 = int'(d15); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
