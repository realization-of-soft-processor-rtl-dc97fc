// soft_processor: an 8-bit processor with a 22-operation ALU.
// Datapath: a 10-bit program counter addresses a 1024 x 8 memory; the byte
// read goes over the 8-bit data bus into the instruction register or into
// the a or b temporary register. The ALU combines a and b under the
// selection code IR[4:0] and its result goes to the 15-bit y register,
// its low byte to the 8-bit accumulator, and the zero and sign flags to a
// flag register. The control unit sequences fetch, decode, operand load
// and execute. The block list, the widths and the fetch steps follow the
// specification; the instruction classes in IR[7:5], the accumulator as
// an optional source of a, HALT and the second memory port (ext_*, used
// to load programs) are this design's choices; see control_unit for the
// encoding and the cycle counts. Reset is synchronous and active high.
// While the processor runs, port B should be idle or used only to read.
module soft_processor
  import sp_pkg::*;
#(
  parameter int DATA_W = sp_pkg::SP_DATA_W,
  parameter int ADDR_W = sp_pkg::SP_ADDR_W,
  parameter int Y_W    = sp_pkg::SP_Y_W
) (
  input  logic              clk,
  input  logic              reset,
  // external memory port
  input  logic              ext_cs,
  input  logic              ext_we,
  input  logic [ADDR_W-1:0] ext_addr,
  input  logic [DATA_W-1:0] ext_wdata,
  output logic [DATA_W-1:0] ext_rdata,
  // processor state
  output logic              memrd,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] ir,
  output logic [DATA_W-1:0] db,
  output logic [DATA_W-1:0] a,
  output logic [DATA_W-1:0] b,
  output logic [Y_W-1:0]    y,
  output logic [DATA_W-1:0] acc,
  output logic              zero,
  output logic              sign,
  output logic              halted,
  output logic              instr_done
);

  ctrl_t             ctrl;
  cu_state_e         state;
  logic [DATA_W-1:0] a_d;
  logic [Y_W-1:0]    alu_y;
  logic              alu_zero, alu_sign;

  control_unit u_cu (
    .clk, .reset, .ir, .ctrl, .state, .halted, .instr_done
  );

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .clk, .reset, .inc(ctrl.pc_inc), .pc
  );

  memory #(.DEPTH(1 << ADDR_W), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .clk,
    .cs_a(ctrl.mem_cs), .rd_a(ctrl.memrd), .addr_a(pc), .dout_a(db),
    .cs_b(ext_cs), .we_b(ext_we), .addr_b(ext_addr), .din_b(ext_wdata), .dout_b(ext_rdata)
  );

  load_reg #(.W(DATA_W)) u_ir (.clk, .reset, .ld(ctrl.ir_ld), .d(db), .q(ir));

  assign a_d = ctrl.a_from_acc ? acc : db;
  load_reg #(.W(DATA_W)) u_a (.clk, .reset, .ld(ctrl.a_ld), .d(a_d), .q(a));
  load_reg #(.W(DATA_W)) u_b (.clk, .reset, .ld(ctrl.b_ld), .d(db), .q(b));

  alu #(.Y_W(Y_W)) u_alu (
    .a, .b, .sel(ir[4:0]), .y(alu_y), .zero(alu_zero), .sign(alu_sign)
  );

  load_reg #(.W(Y_W))    u_y   (.clk, .reset, .ld(ctrl.y_ld),   .d(alu_y),             .q(y));
  load_reg #(.W(DATA_W)) u_acc (.clk, .reset, .ld(ctrl.acc_ld), .d(alu_y[DATA_W-1:0]), .q(acc));
  load_reg #(.W(2))      u_flg (.clk, .reset, .ld(ctrl.flags_ld), .d({alu_zero, alu_sign}), .q({zero, sign}));

  assign memrd = ctrl.memrd;

endmodule
