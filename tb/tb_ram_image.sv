// tb_ram_image: runs the processor, at its default sizes, on a memory
// image in which every word holds the low byte of its own address
// (RAM[i] = i mod 256), the contents shown for the addition example.
// Starting at 000H the processor decodes these bytes as a mix of
// two-operand instructions (00..15), no-operations (16..1F, 40..DF),
// instructions with a from the accumulator (20..35) and finally HALT
// (E0). An instruction-set model in the testbench steps through the
// same image; every retired instruction's y, accumulator and flags and
// the final program counter are compared, and the first instruction,
// ADD with a=01H and b=02H, must give y=03H.
`timescale 1ns / 1ps
module tb_ram_image;
  import sp_ref_pkg::*;

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

  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_y[$];
  int exp_end_pc;

  // Instruction-set model: walks the image from address 0 to HALT.
  function automatic void iss();
    int p = 0, m_acc = 0, op, cls, r, va, vb;
    forever begin
      op = p % 256; p = (p + 1) % 1024;
      cls = op / 32;
      if (cls == 7) break;
      if (cls == 0 && op % 32 < 22) begin
        va = p % 256; p = (p + 1) % 1024;
        vb = p % 256; p = (p + 1) % 1024;
      end else if (cls == 1 && op % 32 < 22) begin
        va = m_acc;
        vb = p % 256; p = (p + 1) % 1024;
      end else continue;
      r = alu_ref(op % 32, va, vb, 15);
      exp_y.push_back(r);
      m_acc = r % 256;
    end
    exp_end_pc = p;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, e;
    iss();
    $display("image runs %0d ALU instructions, halts with pc=%03h", exp_y.size(), exp_end_pc);
    reset = 1; ext_cs = 0; ext_we = 0; ext_addr = 0; ext_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      ext_cs = 1; ext_we = 1; ext_addr = 10'(i); ext_wdata = 8'(i);
    end
    @(negedge clk); ext_cs = 0; ext_we = 0;
    @(negedge clk); reset = 0;
    k = 0;
    while (!halted) begin
      @(posedge clk);
      if (instr_done) begin
        @(negedge clk);
        e = (k < exp_y.size()) ? exp_y[k] : -1;
        checks++;
        if (int'(y) != e || int'(acc) != e % 256 || zero != (e == 0) || sign != ((e / 128) % 2 == 1)) begin
          failures++;
          $display("FAIL instr %0d ir=%0h a=%0h b=%0h: y=%0h exp %0h", k, ir, a, b, y, e);
        end
        if (k == 0) begin
          checks++;
          if (ir != 8'h00 || a != 8'h01 || b != 8'h02 || y != 15'h003) begin
            failures++; $display("FAIL first addition: a=%0h b=%0h y=%0h", a, b, y);
          end
        end
        k++;
      end
    end
    checks++;
    if (k != exp_y.size() || int'(pc) != exp_end_pc) begin
      failures++;
      $display("FAIL retired %0d (exp %0d), pc=%03h (exp %03h)", k, exp_y.size(), pc, exp_end_pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
