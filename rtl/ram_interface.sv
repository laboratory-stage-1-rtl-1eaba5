// ram_interface: the RAM as a bus device, with its write enable and
// read-data gating.
//
// Three pieces of glue surround the 8K x 8 RAM: an AND gate forms the RAM
// write enable from WR and CS; a second AND gate forms the read select from
// RD and CS; and a 2:1 multiplexer passes the RAM output to do_o when the
// read select is high and zero otherwise, so the RAM can share the ORed data
// bus. A write completes at the rising clk edge at the end of the cycle in
// which cs and wr are high; read data appears combinationally.
//
// The structure follows the design's RAM schematic. The output is called
// do_o because "do" is a reserved word.
module ram_interface #(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              rd,
  input  logic              wr,
  input  logic [ADDR_W-1:0] a,
  input  logic [DATA_W-1:0] di,
  output logic [DATA_W-1:0] do_o
);

  logic              we;      // WR AND CS
  logic              rd_sel;  // RD AND CS, the multiplexer select
  logic [DATA_W-1:0] ram_q;

  assign we     = wr & cs;
  assign rd_sel = rd & cs;

  ram_8x8k #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk  (clk),
    .we   (we),
    .addr (a),
    .din  (di),
    .dout (ram_q)
  );

  assign do_o = rd_sel ? ram_q : '0;

endmodule
