// led_latch: 8-bit debug latch that drives the board LEDs.
//
// The register captures di on the rising clk edge of a cycle in which the
// latch is selected (cs) and the CPU writes (wr); its value drives leds at
// all times. The CPU can read the value back: do_o carries it while cs and
// rd are high and is zero otherwise, so the latch can share the ORed data
// bus. Read data is combinational; a write is visible on leds and do_o one
// clock after the write cycle.
//
// Clocked capture, read-back and zero output when not read follow the
// design. The synchronous active-high reset that clears the LEDs is this
// design's own choice.
module led_latch #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cs,
  input  logic              rd,
  input  logic              wr,
  input  logic [DATA_W-1:0] di,
  output logic [DATA_W-1:0] do_o,
  output logic [DATA_W-1:0] leds
);

  logic [DATA_W-1:0] q;

  always_ff @(posedge clk)
    if (rst)            q <= '0;
    else if (cs && wr)  q <= di;

  assign leds = q;
  assign do_o = (cs && rd) ? q : '0;

endmodule
