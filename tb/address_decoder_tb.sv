// address_decoder_tb: self-checking test of the memory-map decoder.
//
// Sweeps every 16-bit address with the memory request high and low, and
// compares the two chip selects with a reference written from the memory
// map itself: RAM for 0x0000-0x1FFF, the latch at 0xFF00 only, nothing for
// an I/O cycle. A watchdog ends the run if it ever stalls.
module address_decoder_tb;
  import tsk80_bus_pkg::*;

  addr_t addr;
  logic  mreq, cs_ram, cs_latch;
  int    checks = 0, failures = 0;
  int    n_ram = 0, n_latch = 0;

  address_decoder dut (.addr(addr), .mreq(mreq), .cs_ram(cs_ram), .cs_latch(cs_latch));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int a = 0; a < 65536; a++) begin
        logic exp_ram, exp_latch;
        addr = addr_t'(a);
        mreq = logic'(m);
        #1;
        exp_ram   = (m == 1) && (a < 32'h2000);
        exp_latch = (m == 1) && (a == 32'hFF00);
        checks++;
        if (cs_ram !== exp_ram || cs_latch !== exp_latch) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr=%h mreq=%0d cs_ram=%b cs_latch=%b", addr, mreq, cs_ram, cs_latch);
        end
        n_ram   += int'(cs_ram);
        n_latch += int'(cs_latch);
      end
    end
    // The RAM window must be exactly 8K bytes, the latch exactly one address.
    checks++;
    if (n_ram != 8192 || n_latch != 1) begin
      failures++;
      $display("FAIL window sizes ram=%0d latch=%0d", n_ram, n_latch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
