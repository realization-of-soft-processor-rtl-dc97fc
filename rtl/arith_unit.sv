// arith_unit: the arithmetic half of the 8-bit ALU.
// It computes every arithmetic operation of the instruction set at once,
// in parallel, and hands all results to the ALU's 32:1 multiplexer, which
// picks one by the selection code. The operation list (add, subtract,
// increment, decrement, multiply, square, compare, add with carry =
// a+b+1, subtract with carry = a-b+1) follows the instruction table.
// The result widths are this design's choice: sums and differences are
// 9 bits wide with the carry or borrow in bit 8 (a difference that goes
// below zero shows as a 9-bit two's-complement value), products are 16
// bits truncated to Y_W. Compare returns {a>b, a==b, a<b} in bits 2..0.
// Purely combinational; results are zero-extended to Y_W bits.
module arith_unit
  import sp_pkg::*;
#(
  parameter int Y_W = sp_pkg::SP_Y_W
) (
  input  logic [SP_DATA_W-1:0]       a,
  input  logic [SP_DATA_W-1:0]       b,
  output logic [AR_N-1:0][Y_W-1:0] res
);

  logic [SP_DATA_W:0]     sum, diff, inc, dec, adc, sbc;
  logic [2*SP_DATA_W-1:0] prod, sq;
  logic [2:0]          cmp;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    inc  = {1'b0, a} + 9'd1;
    dec  = {1'b0, a} - 9'd1;
    adc  = {1'b0, a} + {1'b0, b} + 9'd1;
    sbc  = {1'b0, a} - {1'b0, b} + 9'd1;
    prod = a * b;
    sq   = a * a;
    cmp  = {a > b, a == b, a < b};

    res         = '0;
    res[AR_ADD] = Y_W'(sum);
    res[AR_SUB] = Y_W'(diff);
    res[AR_INC] = Y_W'(inc);
    res[AR_DEC] = Y_W'(dec);
    res[AR_MUL] = Y_W'(prod);
    res[AR_SQR] = Y_W'(sq);
    res[AR_CMP] = Y_W'(cmp);
    res[AR_ADC] = Y_W'(adc);
    res[AR_SBC] = Y_W'(sbc);
  end

endmodule
