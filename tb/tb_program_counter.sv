// tb_program_counter: resets the 10-bit program counter, then applies a
// random increment pattern for more than one full wrap (3FFH -> 000H)
// and compares every cycle against a counter kept modulo 1024; checks
// that reset in mid-count returns to 000H.
module tb_program_counter;
  logic       clk = 0, reset, inc;
  logic [9:0] pc;
  int         model;
  int checks = 0, failures = 0, wraps = 0;

  program_counter dut (.clk, .reset, .inc, .pc);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; inc = 1; model = 0;
    @(negedge clk); reset = 0;
    for (int c = 0; c < 3000; c++) begin
      checks++;
      if (int'(pc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pc=%0h exp=%0h", c, pc, model);
      end
      inc = ($urandom % 4) != 0;
      if (c == 2500) reset = 1; else reset = 0;
      @(negedge clk);
      if (reset) model = 0;
      else if (inc) begin
        if (model == 1023) wraps++;
        model = (model + 1) % 1024;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
