// tsk80_stage1_top: Stage-1 bus system of the TSK80 stop-watch design.
//
// The TSK80 CPU sits outside this module; its bus arrives on the cpu_*
// ports. The CPU write data fans out to every device; the address decoder
// turns the address and memory request into chip selects for the 8K x 8 RAM
// (0x0000-0x1FFF) and the LED latch (LATCH_ADDR); each device returns zero
// unless it is being read, and data_bus_or ORs the device outputs into
// cpu_din. Writes complete on the rising clk edge ending a cycle with cpu_wr
// high; reads are combinational within the cycle.
//
// Strobes are active high, as in the RAM schematic of the design. The
// reset (rst) comes from an external reset circuit and only clears the latch.
// Assertions check the bus rules: no cycle both reads and writes, and at
// most one device drives non-zero data onto the OR bus.
module tsk80_stage1_top
  import tsk80_bus_pkg::*;
#(
  parameter addr_t LATCH_ADDR_P = LATCH_ADDR
) (
  input  logic  clk,
  input  logic  rst,
  input  addr_t cpu_addr,
  input  data_t cpu_dout,
  output data_t cpu_din,
  input  logic  cpu_mreq,
  input  logic  cpu_rd,
  input  logic  cpu_wr,
  output data_t leds
);

  localparam int unsigned N_DEV = 2;

  logic cs_ram, cs_latch;
  data_t ram_do, latch_do;

  address_decoder #(
    .RAM_BASE_P   (RAM_BASE),
    .RAM_ADDR_W_P (RAM_ADDR_W),
    .LATCH_ADDR_P (LATCH_ADDR_P)
  ) u_dec (
    .addr     (cpu_addr),
    .mreq     (cpu_mreq),
    .cs_ram   (cs_ram),
    .cs_latch (cs_latch)
  );

  ram_interface #(.ADDR_W(RAM_ADDR_W), .DATA_W(DATA_W)) u_ram (
    .clk  (clk),
    .cs   (cs_ram),
    .rd   (cpu_rd),
    .wr   (cpu_wr),
    .a    (cpu_addr[RAM_ADDR_W-1:0]),
    .di   (cpu_dout),
    .do_o (ram_do)
  );

  led_latch #(.DATA_W(DATA_W)) u_latch (
    .clk  (clk),
    .rst  (rst),
    .cs   (cs_latch),
    .rd   (cpu_rd),
    .wr   (cpu_wr),
    .di   (cpu_dout),
    .do_o (latch_do),
    .leds (leds)
  );

  data_bus_or #(.N_DEV(N_DEV), .DATA_W(DATA_W)) u_or (
    .dev_data ({latch_do, ram_do}),
    .cpu_din  (cpu_din)
  );

  // Bus rules.
  a_no_rd_and_wr: assert property (@(posedge clk) disable iff (rst) !(cpu_rd && cpu_wr))
    else $error("bus cycle both reads and writes");
  a_one_source: assert property (@(posedge clk) disable iff (rst)
                                 (ram_do == '0) || (latch_do == '0))
    else $error("two devices drive the OR data bus at once");

endmodule
