// tb_logic_unit: exhaustive check of the logic unit over all (a, b)
// pairs. Bitwise results are checked bit by bit; shifts and rotates are
// checked against values built from integer arithmetic (multiply and
// divide by two, wrap-around bit), not from bit slicing.
module tb_logic_unit;
  import sp_pkg::*;

  logic [7:0]                a, b;
  logic [LU_N-1:0][7:0]      res;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .res(res));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0h b=%0h got=%0h exp=%0h", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, msb, lsb;
    for (ia = 0; ia < 256; ia++) begin
      for (ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib);
        #1;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (res[LU_XOR][k]  !== (a[k] != b[k]))  failures++;
          if (res[LU_XNOR][k] !== (a[k] == b[k]))  failures++;
          if (res[LU_AND][k]  !== (a[k] && b[k]))  failures++;
          if (res[LU_NAND][k] !== !(a[k] && b[k])) failures++;
          if (res[LU_NOR][k]  !== !(a[k] || b[k])) failures++;
          if (res[LU_OR][k]   !== (a[k] || b[k]))  failures++;
          if (res[LU_NOT][k]  !== !a[k])           failures++;
        end
        msb = ia / 128; lsb = ia % 2;
        chk("lsl", int'(res[LU_LSL]), (ia * 2) % 256);
        chk("lsr", int'(res[LU_LSR]), ia / 2);
        chk("rol", int'(res[LU_ROL]), (ia * 2) % 256 + msb);
        chk("ror", int'(res[LU_ROR]), ia / 2 + 128 * lsb);
        chk("asr", int'(res[LU_ASR]), ia / 2 + 128 * msb);
        chk("asl", int'(res[LU_ASL]), ((ia % 128) * 2) % 128 + 128 * msb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
