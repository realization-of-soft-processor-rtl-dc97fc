// memory: 1024 x 8 memory, addresses 000H..3FFH, for instructions and data.
// The size, the 10 address lines A9..A0 and the rule that the memory is
// enabled only while its chip select is 1 follow the specification.
// This design gives it two ports in the style of an FPGA dual-port block
// RAM: port A is the processor's read port (chip select, memrd, address
// from the program counter, data bus out); port B is a read/write port
// used to load a program and to inspect memory. Both ports read
// synchronously: the word addressed while cs and the read (port A) or
// cs (port B) are high appears on the output after the next clock edge
// and is held until the next read. A port-B write with cs_b=1, we_b=1
// stores din_b at the clock edge; a port-A read of the same address in
// the same cycle returns the old word. The memory is cleared at time zero.
module memory #(
  parameter int DEPTH  = 1024,
  parameter int DATA_W = 8,
  parameter int ADDR_W = 10
) (
  input  logic              clk,
  // port A: processor
  input  logic              cs_a,
  input  logic              rd_a,
  input  logic [ADDR_W-1:0] addr_a,
  output logic [DATA_W-1:0] dout_a,
  // port B: load / inspect
  input  logic              cs_b,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [DATA_W-1:0] din_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (cs_a && rd_a) dout_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (cs_b) begin
      if (we_b) mem[addr_b] <= din_b;
      else      dout_b      <= mem[addr_b];
    end
  end

endmodule
