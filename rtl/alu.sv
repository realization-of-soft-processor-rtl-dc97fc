// alu: the 8-bit arithmetic and logic unit.
// Operands a and b go to the arithmetic unit and the logic unit, which
// compute all their operations in parallel; the 32 result slots (22 used)
// go to a 32:1 multiplexer whose selection lines s4..s0 are the
// instruction's 5-bit selection code (sp_pkg::alu_op_e). This structure
// and the flag rules follow the specification: the zero flag is set when
// the result is zero, the sign flag copies bit D7 of the result. The
// zero flag looks at the whole Y_W-bit result (this design's reading).
// Unused codes 10110..11111 give zero. Purely combinational.
module alu
  import sp_pkg::*;
#(
  parameter int Y_W = sp_pkg::SP_Y_W
) (
  input  logic [SP_DATA_W-1:0] a,
  input  logic [SP_DATA_W-1:0] b,
  input  logic [4:0]        sel,
  output logic [Y_W-1:0]    y,
  output logic              zero,
  output logic              sign
);

  logic [AR_N-1:0][Y_W-1:0]    ar;
  logic [LU_N-1:0][SP_DATA_W-1:0] lu;
  logic [31:0][Y_W-1:0]        slots;

  arith_unit #(.Y_W(Y_W)) u_arith (.a(a), .b(b), .res(ar));
  logic_unit              u_logic (.a(a), .b(b), .res(lu));

  always_comb begin
    slots          = '0;
    slots[OP_ADD]  = ar[AR_ADD];
    slots[OP_SUB]  = ar[AR_SUB];
    slots[OP_INC]  = ar[AR_INC];
    slots[OP_DEC]  = ar[AR_DEC];
    slots[OP_MUL]  = ar[AR_MUL];
    slots[OP_SQR]  = ar[AR_SQR];
    slots[OP_CMP]  = ar[AR_CMP];
    slots[OP_ADC]  = ar[AR_ADC];
    slots[OP_SBC]  = ar[AR_SBC];
    slots[OP_XOR]  = Y_W'(lu[LU_XOR]);
    slots[OP_XNOR] = Y_W'(lu[LU_XNOR]);
    slots[OP_AND]  = Y_W'(lu[LU_AND]);
    slots[OP_NAND] = Y_W'(lu[LU_NAND]);
    slots[OP_NOR]  = Y_W'(lu[LU_NOR]);
    slots[OP_OR]   = Y_W'(lu[LU_OR]);
    slots[OP_NOT]  = Y_W'(lu[LU_NOT]);
    slots[OP_ASL]  = Y_W'(lu[LU_ASL]);
    slots[OP_ASR]  = Y_W'(lu[LU_ASR]);
    slots[OP_ROL]  = Y_W'(lu[LU_ROL]);
    slots[OP_ROR]  = Y_W'(lu[LU_ROR]);
    slots[OP_LSL]  = Y_W'(lu[LU_LSL]);
    slots[OP_LSR]  = Y_W'(lu[LU_LSR]);
  end

  alu_mux #(.W(Y_W)) u_mux (.in_data(slots), .sel(sel), .out_data(y));

  assign zero = (y == '0);
  assign sign = y[SP_DATA_W-1];

endmodule
