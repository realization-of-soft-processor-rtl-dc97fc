// logic_unit: the logic half of the 8-bit ALU.
// It computes all bitwise operations (XOR, XNOR, AND, NAND, NOR, OR, NOT)
// and the one-position shifts and rotates of operand a at once; the ALU's
// 32:1 multiplexer picks one. The operation list follows the instruction
// table; the exact shift rules are this design's choice, because the
// table only names them:
//   arithmetic shift left  {a[7], a[5:0], 0}  (sign bit D7 kept)
//   arithmetic shift right {a[7], a[7:1]}     (sign bit copied)
//   logical shift left     {a[6:0], 0}
//   logical shift right    {0, a[7:1]}
//   rotate left / right    {a[6:0], a[7]} / {a[0], a[7:1]}
// Purely combinational, 8-bit results.
module logic_unit
  import sp_pkg::*;
(
  input  logic [SP_DATA_W-1:0]            a,
  input  logic [SP_DATA_W-1:0]            b,
  output logic [LU_N-1:0][SP_DATA_W-1:0] res
);

  always_comb begin
    res[LU_XOR]  = a ^ b;
    res[LU_XNOR] = ~(a ^ b);
    res[LU_AND]  = a & b;
    res[LU_NAND] = ~(a & b);
    res[LU_NOR]  = ~(a | b);
    res[LU_OR]   = a | b;
    res[LU_NOT]  = ~a;
    res[LU_ASL]  = {a[SP_DATA_W-1], a[SP_DATA_W-3:0], 1'b0};
    res[LU_ASR]  = {a[SP_DATA_W-1], a[SP_DATA_W-1:1]};
    res[LU_ROL]  = {a[SP_DATA_W-2:0], a[SP_DATA_W-1]};
    res[LU_ROR]  = {a[0], a[SP_DATA_W-1:1]};
    res[LU_LSL]  = {a[SP_DATA_W-2:0], 1'b0};
    res[LU_LSR]  = {1'b0, a[SP_DATA_W-1:1]};
  end

endmodule
