// tsk80_bus_pkg: types and constants shared by the Stage-1 TSK80 bus system.
//
// The TSK80 bus in an FPGA has no tri-state lines: the CPU drives one set of
// data lines to every device, and every device drives its own read-data lines
// back, held at zero unless that device is being read. The constants below
// give the memory map. The RAM at 0x0000 and its 8K x 8 size are the design's
// requirements; the latch address 0xFF00 is this design's own choice, picked
// so that 0x2000-0xFEFF and the rest of the 0xFFxx page stay free for the
// LCD, keypad and timer peripherals that later stages add.
package tsk80_bus_pkg;

  localparam int unsigned ADDR_W     = 16;  // CPU address width
  localparam int unsigned DATA_W     = 8;   // CPU data width
  localparam int unsigned RAM_ADDR_W = 13;  // 8K words: A[12:0]

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [DATA_W-1:0]     data_t;
  typedef logic [RAM_ADDR_W-1:0] ram_addr_t;

  localparam addr_t RAM_BASE   = 16'h0000;
  localparam addr_t LATCH_ADDR = 16'hFF00;

endpackage
