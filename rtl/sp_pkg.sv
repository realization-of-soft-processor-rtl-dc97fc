// sp_pkg: types and constants shared by the 8-bit soft processor.
// The widths (8-bit data, 10-bit addresses, 1024-word memory) and the
// 5-bit ALU selection codes of alu_op_e are the ones the processor is
// specified with. The instruction classes in IR[7:5], the control-unit
// states and the control-signal bundle are this design's own choices.
package sp_pkg;

  localparam int SP_DATA_W = 8;  // data path, IR, accumulator, a and b
  localparam int SP_ADDR_W = 10;  // program counter and memory address
  localparam int SP_Y_W    = 15;  // y result register, y[14:0]

  // ALU selection lines s4..s0
  typedef enum logic [4:0] {
    OP_ADD  = 5'b00000,  // y = a + b
    OP_SUB  = 5'b00001,  // y = a - b
    OP_INC  = 5'b00010,  // y = a + 1
    OP_DEC  = 5'b00011,  // y = a - 1
    OP_MUL  = 5'b00100,  // y = a * b
    OP_SQR  = 5'b00101,  // y = a * a
    OP_XOR  = 5'b00110,
    OP_XNOR = 5'b00111,
    OP_AND  = 5'b01000,
    OP_NAND = 5'b01001,
    OP_NOR  = 5'b01010,
    OP_OR   = 5'b01011,
    OP_NOT  = 5'b01100,
    OP_ASL  = 5'b01101,
    OP_ASR  = 5'b01110,
    OP_ROL  = 5'b01111,
    OP_ROR  = 5'b10000,
    OP_CMP  = 5'b10001,
    OP_LSL  = 5'b10010,
    OP_LSR  = 5'b10011,
    OP_ADC  = 5'b10100,  // y = a + b + 1
    OP_SBC  = 5'b10101   // y = a - b + 1
  } alu_op_e;

  localparam int NUM_OPS = 22;

  // Results of the arithmetic unit, in this order
  localparam int AR_ADD = 0, AR_SUB = 1, AR_INC = 2, AR_DEC = 3, AR_MUL = 4,
                 AR_SQR = 5, AR_CMP = 6, AR_ADC = 7, AR_SBC = 8;
  localparam int AR_N   = 9;

  // Results of the logic unit, in this order
  localparam int LU_XOR = 0, LU_XNOR = 1, LU_AND = 2, LU_NAND = 3, LU_NOR = 4,
                 LU_OR  = 5, LU_NOT  = 6, LU_ASL = 7, LU_ASR  = 8, LU_ROL = 9,
                 LU_ROR = 10, LU_LSL = 11, LU_LSR = 12;
  localparam int LU_N   = 13;

  // Instruction classes, IR[7:5]
  typedef enum logic [2:0] {
    IC_ALU_MEM = 3'b000,  // opcode, a byte, b byte
    IC_ALU_ACC = 3'b001,  // opcode, b byte; a comes from the accumulator
    IC_HALT    = 3'b111   // stop fetching
  } instr_class_e;        // other patterns: no-operation

  // Control-unit states
  typedef enum logic [3:0] {
    S_FETCH, S_LOAD_IR, S_DECODE, S_READ_A, S_LOAD_A,
    S_READ_B, S_LOAD_B, S_EXECUTE, S_HALT
  } cu_state_e;

  // Control signals from the control unit to the datapath
  typedef struct packed {
    logic memrd;       // memory read strobe
    logic mem_cs;      // memory chip select
    logic pc_inc;      // advance program counter
    logic ir_ld;       // load IR from the data bus
    logic a_ld;        // load a register
    logic a_from_acc;  // a source: 1 = accumulator, 0 = data bus
    logic b_ld;        // load b register from the data bus
    logic y_ld;        // load y register from the ALU
    logic acc_ld;      // load accumulator with the low byte of the ALU result
    logic flags_ld;    // load the zero and sign flags
  } ctrl_t;

endpackage
