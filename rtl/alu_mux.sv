// alu_mux: the ALU's 32:1 multiplexer. Five selection lines s4..s0
// (sel) choose one of 32 W-bit inputs. The 32:1 size and the five
// selection lines are as specified; the data width W is set by the ALU.
// Purely combinational.
module alu_mux #(
  parameter int W = 15
) (
  input  logic [31:0][W-1:0] in_data,
  input  logic [4:0]         sel,
  output logic [W-1:0]       out_data
);

  always_comb out_data = in_data[sel];

endmodule
