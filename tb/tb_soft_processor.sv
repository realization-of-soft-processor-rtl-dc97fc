// tb_soft_processor: end-to-end test of the processor at its default
// sizes (1024 x 8 memory, 10-bit PC, 15-bit y). It builds a program in
// the testbench, loads it through the external memory port, releases
// reset and lets the processor run to HALT on a 1 MHz clock (1000 ns
// period). The program executes every one of the 22 operations with
// operands a and b from memory (several times, with random and corner
// operands), chains operations with a taken from the accumulator, and
// contains no-operation bytes and a final HALT. A software model run at
// build time gives the expected y, accumulator, zero and sign flag of each
// instruction; they are compared when the instruction retires, and the
// cycle count of each instruction (8, 6 or 3 clocks) is checked. Each
// mechanism (every operation, accumulator operand, no-operation, HALT,
// zero flag, sign flag) must occur at least once.
`timescale 1ns / 1ps
module tb_soft_processor;
  import sp_ref_pkg::*;

  localparam int YW = 15;

  logic        clk = 0, reset;
  logic        ext_cs, ext_we;
  logic [9:0]  ext_addr;
  logic [7:0]  ext_wdata, ext_rdata;
  logic        memrd, zero, sign, halted, instr_done;
  logic [9:0]  pc;
  logic [7:0]  ir, db, a, b, acc;
  logic [14:0] y;

  soft_processor dut (
    .clk, .reset, .ext_cs, .ext_we, .ext_addr, .ext_wdata, .ext_rdata,
    .memrd, .pc, .ir, .db, .a, .b, .y, .acc, .zero, .sign, .halted, .instr_done
  );

  always #500 clk = ~clk;  // 1 MHz

  int checks = 0, failures = 0;
  byte unsigned prog[$];
  // expected results, one entry per ALU instruction
  int exp_y[$], exp_cycles[$];
  int op_seen[22];
  int n_acc = 0, n_nop = 0, n_zero = 0, n_sign = 0, n_halt = 0;
  int model_acc = 0;
  int nop_cycles = 0;  // no-operation cycles to fold into the next instruction

  function automatic void add_mem(int op, int va, int vb);
    int r;
    prog.push_back(8'(op)); prog.push_back(8'(va)); prog.push_back(8'(vb));
    r = alu_ref(op, va, vb, YW);
    exp_y.push_back(r); exp_cycles.push_back(8 + nop_cycles); nop_cycles = 0;
    model_acc = r % 256;
  endfunction

  function automatic void add_acc(int op, int vb);
    int r;
    prog.push_back(8'h20 | 8'(op)); prog.push_back(8'(vb));
    r = alu_ref(op, model_acc, vb, YW);
    exp_y.push_back(r); exp_cycles.push_back(6 + nop_cycles); nop_cycles = 0;
    model_acc = r % 256;
  endfunction

  function automatic void add_nop(byte unsigned code);
    prog.push_back(code); nop_cycles += 3;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners[5] = '{0, 1, 127, 128, 255};
    int k, cyc, last, e;
    // --- build the program ---
    for (int op = 0; op < 22; op++) begin
      add_mem(op, int'($urandom % 256), int'($urandom % 256));
      add_mem(op, corners[op % 5], corners[(op + 2) % 5]);
    end
    add_mem(0, 0, 0);           // zero result
    add_mem(1, 9, 9);           // zero by subtraction
    add_mem(4, 255, 255);       // product truncated to 15 bits
    add_nop(8'h16);             // unused selection code
    add_nop(8'h40);             // unused class
    for (int op = 0; op < 22; op++) add_acc(op, int'($urandom % 256));
    add_acc(2, 0); add_acc(2, 0); add_acc(12, 0);
    prog.push_back(8'hE0);      // HALT
    $display("program: %0d bytes, %0d ALU instructions", prog.size(), exp_y.size());

    // --- load it through the external port, clear the rest ---
    reset = 1; ext_cs = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      ext_cs = 1; ext_we = 1; ext_addr = 10'(i);
      ext_wdata = (i < prog.size()) ? prog[i] : 8'h00;
    end
    @(negedge clk); ext_cs = 0; ext_we = 0;
    @(negedge clk);
    checks++;
    if (pc !== 0 || y !== 0 || acc !== 0 || ir !== 0) begin
      failures++; $display("FAIL registers not cleared by reset");
    end
    reset = 0;

    // --- run ---
    k = 0; cyc = 0; last = 0;
    while (!halted) begin
      @(posedge clk); cyc++;
      if (instr_done) begin
        // the result is registered at this edge; compare after it
        @(negedge clk);
        if (k < exp_y.size()) begin
          e = exp_y[k];
          checks++;
          if (int'(y) != e || int'(acc) != e % 256 || zero != (e == 0) || sign != ((e / 128) % 2 == 1)) begin
            failures++;
            $display("FAIL instr %0d ir=%0h a=%0h b=%0h: y=%0h acc=%0h z=%0b s=%0b exp y=%0h",
                     k, ir, a, b, y, acc, zero, sign, e);
          end
          checks++;
          if (cyc - last != exp_cycles[k]) begin
            failures++;
            $display("FAIL instr %0d took %0d cycles, expected %0d", k, cyc - last, exp_cycles[k]);
          end
          if (ir[7:5] == 3'b001) n_acc++;
          op_seen[ir[4:0]]++;
          if (zero) n_zero++;
          if (sign) n_sign++;
          if (exp_cycles[k] > 8 || (ir[7:5] == 3'b001 && exp_cycles[k] > 6)) n_nop++;
        end else begin
          failures++; $display("FAIL more instructions than in the program");
        end
        last = cyc; k++;
      end
    end
    n_halt++;
    checks++;
    if (k != exp_y.size()) begin
      failures++; $display("FAIL %0d instructions retired, expected %0d", k, exp_y.size());
    end
    checks++;
    if (int'(pc) != prog.size()) begin
      failures++; $display("FAIL pc=%0d after HALT, expected %0d", pc, prog.size());
    end
    // halted processor stays put
    repeat (5) @(negedge clk);
    checks++;
    if (!halted || int'(pc) != prog.size() || memrd) begin failures++; $display("FAIL not held in HALT"); end
    // program still intact, read back through the external port
    for (int i = 0; i < prog.size(); i += 7) begin
      @(negedge clk); ext_cs = 1; ext_we = 0; ext_addr = 10'(i);
      @(negedge clk); ext_cs = 0;
      checks++;
      if (ext_rdata !== prog[i]) begin failures++; $display("FAIL memory[%0d] changed", i); end
    end

    // --- every mechanism must have happened ---
    for (int op = 0; op < 22; op++) begin
      checks++;
      if (op_seen[op] == 0) begin failures++; $display("FAIL operation %0d never executed", op); end
    end
    $display("mechanisms: acc-operand %0d, no-op %0d, halt %0d, zero flag %0d, sign flag %0d",
             n_acc, n_nop, n_halt, n_zero, n_sign);
    checks++;
    if (n_acc == 0 || n_nop == 0 || n_halt == 0 || n_zero == 0 || n_sign == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
