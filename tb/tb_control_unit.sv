// tb_control_unit: drives the instruction register input as the IR
// would hold it and checks the control unit's state sequence and control
// signals cycle by cycle: two-operand instructions (8 cycles), instructions
// with a from the accumulator (6 cycles), no-operations for unused codes
// and unused classes (3 cycles), and HALT, which must hold until reset.
module tb_control_unit;
  import sp_pkg::*;
  logic      clk = 0, reset;
  logic [7:0] ir;
  ctrl_t     ctrl;
  cu_state_e state;
  logic      halted, instr_done;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .reset, .ir, .ctrl, .state, .halted, .instr_done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word for each step of an instruction
  function automatic ctrl_t exp_ctrl(input string step);
    ctrl_t c = '0;
    case (step)
      "rd":   begin c.memrd = 1; c.mem_cs = 1; c.pc_inc = 1; end
      "ir":   c.ir_ld = 1;
      "dec":  ;
      "deca": begin c.a_ld = 1; c.a_from_acc = 1; end
      "la":   c.a_ld = 1;
      "lb":   c.b_ld = 1;
      "ex":   begin c.y_ld = 1; c.acc_ld = 1; c.flags_ld = 1; end
      default: ;
    endcase
    return c;
  endfunction

  // Runs one instruction; ir is set when the IR would load it.
  task automatic run(input logic [7:0] instr, input string steps[]);
    foreach (steps[i]) begin
      checks++;
      if (ctrl !== exp_ctrl(steps[i]) || instr_done !== (steps[i] == "ex") || halted) begin
        failures++;
        $display("FAIL instr %0h step %0d (%s): ctrl=%b done=%0b state=%s", instr, i, steps[i], ctrl, instr_done, state.name());
      end
      @(negedge clk);
      if (steps[i] == "ir") ir = instr;
      #1;
    end
  endtask

  initial begin
    reset = 1; ir = 8'h00;
    @(negedge clk); @(negedge clk); reset = 0;
    for (int op = 0; op < 22; op++)
      run(8'(op), '{"rd", "ir", "dec", "rd", "la", "rd", "lb", "ex"});
    for (int op = 0; op < 22; op += 3)
      run(8'h20 | 8'(op), '{"rd", "ir", "deca", "rd", "lb", "ex"});
    run(8'h16, '{"rd", "ir", "dec"});           // unused selection code
    run(8'h1F, '{"rd", "ir", "dec"});
    run(8'h40, '{"rd", "ir", "dec"});           // unused class
    run(8'hB5, '{"rd", "ir", "dec"});
    run(8'h00, '{"rd", "ir", "dec", "rd", "la", "rd", "lb", "ex"});
    // HALT
    checks++;
    if (ctrl !== exp_ctrl("rd")) failures++;
    @(negedge clk); ir = 8'hE0;
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      checks++;
      if (!halted || ctrl !== '0 || state != S_HALT) begin
        failures++;
        $display("FAIL not halted: state=%s ctrl=%b", state.name(), ctrl);
      end
    end
    reset = 1; @(negedge clk); reset = 0;
    checks++;
    if (halted || state != S_FETCH) begin failures++; $display("FAIL reset from HALT"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
