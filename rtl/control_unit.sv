// control_unit: the processor's controller, a finite-state machine that
// generates every control signal of the datapath.
// Fetch follows the specified sequence: the program counter drives the
// address bus, the control unit raises memrd (with chip select), the
// memory puts the byte on the data bus and the IR loads it; the IR is
// then decoded and the instruction executed. The instruction encoding
// and the operand loading are this design's choices:
//   IR[4:0]  ALU selection code s4..s0
//   IR[7:5]  000 = the next two bytes are operands a and b
//            001 = a comes from the accumulator; the next byte is b
//            111 = HALT (stays halted until reset)
//            other classes, or a selection code above 10101: no-operation
// The memory reads synchronously, so each byte costs a READ cycle (memrd,
// PC+1) and a LOAD cycle (register takes the data bus). Cycles per
// instruction: 8 with two operand bytes, 6 with a from the accumulator,
// 3 for a no-operation. In EXECUTE the y register, the accumulator and
// the flags load the ALU result, and instr_done pulses for one cycle.
module control_unit
  import sp_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [SP_DATA_W-1:0] ir,
  output ctrl_t             ctrl,
  output cu_state_e         state,
  output logic              halted,
  output logic              instr_done
);

  cu_state_e    next;
  instr_class_e iclass;
  logic         valid_op;

  assign iclass   = instr_class_e'(ir[7:5]);
  assign valid_op = (ir[4:0] < 5'(NUM_OPS));

  always_ff @(posedge clk) begin
    if (reset) state <= S_FETCH;
    else       state <= next;
  end

  always_comb begin
    next = state;
    ctrl = '0;
    unique case (state)
      S_FETCH: begin
        ctrl.memrd  = 1'b1;
        ctrl.mem_cs = 1'b1;
        ctrl.pc_inc = 1'b1;
        next        = S_LOAD_IR;
      end
      S_LOAD_IR: begin
        ctrl.ir_ld = 1'b1;
        next       = S_DECODE;
      end
      S_DECODE: begin
        if (iclass == IC_HALT)
          next = S_HALT;
        else if (iclass == IC_ALU_MEM && valid_op)
          next = S_READ_A;
        else if (iclass == IC_ALU_ACC && valid_op) begin
          ctrl.a_ld       = 1'b1;
          ctrl.a_from_acc = 1'b1;
          next            = S_READ_B;
        end else
          next = S_FETCH;
      end
      S_READ_A: begin
        ctrl.memrd  = 1'b1;
        ctrl.mem_cs = 1'b1;
        ctrl.pc_inc = 1'b1;
        next        = S_LOAD_A;
      end
      S_LOAD_A: begin
        ctrl.a_ld = 1'b1;
        next      = S_READ_B;
      end
      S_READ_B: begin
        ctrl.memrd  = 1'b1;
        ctrl.mem_cs = 1'b1;
        ctrl.pc_inc = 1'b1;
        next        = S_LOAD_B;
      end
      S_LOAD_B: begin
        ctrl.b_ld = 1'b1;
        next      = S_EXECUTE;
      end
      S_EXECUTE: begin
        ctrl.y_ld     = 1'b1;
        ctrl.acc_ld   = 1'b1;
        ctrl.flags_ld = 1'b1;
        next          = S_FETCH;
      end
      S_HALT:  next = S_HALT;
      default: next = S_FETCH;
    endcase
  end

  assign halted     = (state == S_HALT);
  assign instr_done = (state == S_EXECUTE);

  // A read strobe always comes with chip select.
  a_rd_cs: assert property (@(posedge clk) disable iff (reset) ctrl.memrd |-> ctrl.mem_cs);

endmodule
