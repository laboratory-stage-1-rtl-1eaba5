// address_decoder: chip selects for the Stage-1 memory map.
//
// Every device sits in the memory address space, so the selects are only
// raised while the CPU signals a memory request (mreq); an I/O cycle selects
// nothing. The RAM occupies the 2**RAM_ADDR_W bytes from RAM_BASE (0x0000 to
// 0x1FFF by default) and is selected when the upper address bits match
// RAM_BASE. The latch is fully decoded at the single address LATCH_ADDR.
//
// Purely combinational: the selects follow addr and mreq in the same cycle.
// Placing the RAM at 0x0000 follows the design requirements; the latch
// address, full decoding of the latch and the mreq qualifier are this
// design's own choices.
module address_decoder
  import tsk80_bus_pkg::*;
#(
  parameter addr_t       RAM_BASE_P   = RAM_BASE,
  parameter int unsigned RAM_ADDR_W_P = RAM_ADDR_W,
  parameter addr_t       LATCH_ADDR_P = LATCH_ADDR
) (
  input  addr_t addr,
  input  logic  mreq,
  output logic  cs_ram,
  output logic  cs_latch
);

  always_comb begin
    cs_ram   = mreq && (addr[ADDR_W-1:RAM_ADDR_W_P] == RAM_BASE_P[ADDR_W-1:RAM_ADDR_W_P]);
    cs_latch = mreq && (addr == LATCH_ADDR_P);
    // The memory map must never place two devices on one address.
    assert (!(cs_ram && cs_latch))
      else $error("address_decoder: RAM and latch both selected at %h", addr);
  end

endmodule
