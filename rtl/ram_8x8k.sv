// ram_8x8k: 8K x 8 single-port RAM with a clock input.
//
// Writes are synchronous: while we is high, din is stored at addr on the
// next rising edge of clk (the write strobe acts as an enable, not as the
// write clock). Reads need no strobe: dout always shows the word at the
// current addr, combinationally. Separate din and dout lines, no tri-state.
// Sizes follow the design (ADDR_W = 13, DATA_W = 8); contents are not
// initialised, as code is downloaded into the RAM before it runs.
module ram_8x8k #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk)
    if (we) mem[addr] <= din;

  assign dout = mem[addr];

endmodule
