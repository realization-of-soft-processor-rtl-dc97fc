// tb_arith_unit: exhaustive check of the arithmetic unit over all 65536
// (a, b) pairs. Expected values are computed with 32-bit integer
// arithmetic and reduced to the result widths (9 bits for sums and
// differences, Y_W bits for products, 3 bits for compare).
module tb_arith_unit;
  import sp_pkg::*;
  localparam int YW = 15;

  logic [7:0]               a, b;
  logic [AR_N-1:0][YW-1:0]  res;
  int checks = 0, failures = 0;

  arith_unit #(.Y_W(YW)) dut (.a(a), .b(b), .res(res));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d got=%0h exp=%0h", what, a, b, got, exp);
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
    int ia, ib, m9, my;
    m9 = 512; my = 1 << YW;
    for (ia = 0; ia < 256; ia++) begin
      for (ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib);
        #1;
        chk("add", int'(res[AR_ADD]), (ia + ib) % m9);
        chk("sub", int'(res[AR_SUB]), (ia - ib + m9) % m9);
        chk("inc", int'(res[AR_INC]), (ia + 1) % m9);
        chk("dec", int'(res[AR_DEC]), (ia - 1 + m9) % m9);
        chk("mul", int'(res[AR_MUL]), (ia * ib) % my);
        chk("sqr", int'(res[AR_SQR]), (ia * ia) % my);
        chk("cmp", int'(res[AR_CMP]), ia > ib ? 4 : (ia == ib ? 2 : 1));
        chk("adc", int'(res[AR_ADC]), (ia + ib + 1) % m9);
        chk("sbc", int'(res[AR_SBC]), (ia - ib + 1 + m9) % m9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
