// load_reg: a W-bit register with load enable, used for every storage
// register of the processor: the instruction register, the accumulator
// and the temporary registers a, b and y. At the clock edge it takes d
// when ld is 1 and otherwise holds; a synchronous active-high reset
// clears it to zero (the reset behaviour is this design's choice).
module load_reg #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)   q <= '0;
    else if (ld) q <= d;
  end

endmodule
