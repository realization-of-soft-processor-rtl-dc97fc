// program_counter: the 10-bit program counter. It holds the address of
// the next byte to fetch and places it on the address bus. A synchronous
// active-high reset clears it to 000H; inc advances it by one at the
// clock edge, wrapping from 3FFH to 000H. The width follows the
// specification; the processor has no jump instructions, so there is no
// load input (this design's reading).
module program_counter #(
  parameter int ADDR_W = 10
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              inc,
  output logic [ADDR_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (reset)    pc <= '0;
    else if (inc) pc <= pc + 1'b1;
  end

endmodule
