// tsk80_stage1_top_tb: end-to-end test of the Stage-1 bus system.
//
// The testbench plays the TSK80 CPU with one-clock bus cycles: address,
// write data and strobes change just after a rising clk edge; a write is
// captured by the next edge and a read is sampled just before it. It runs
// the memory test a bring-up program would run: fill the whole 8K RAM (the
// code section at 0x0000-0x13FF and the data section at 0x1400-0x1FFF),
// read it back, write the LED latch and read it back, and check that the
// RAM and the latch do not disturb each other. It also makes sure that I/O
// cycles and unmapped addresses select nothing and read as zero. Each
// mechanism is counted; one that never happened counts as a failure.
// All parameters of the top stay at their defaults.
module tsk80_stage1_top_tb;
  import tsk80_bus_pkg::*;

  // Sections the C tool chain places in the RAM: code (xrom) and data (xram).
  localparam addr_t XROM_START = 16'h0000;
  localparam addr_t XROM_LEN   = 16'h1400;
  localparam addr_t XRAM_START = 16'h1400;
  localparam addr_t XRAM_LEN   = 16'h0C00;

  logic  clk = 0, rst;
  addr_t cpu_addr;
  data_t cpu_dout, cpu_din, leds;
  logic  cpu_mreq, cpu_rd, cpu_wr;
  data_t ref_ram [2**RAM_ADDR_W];
  int checks = 0, failures = 0;
  int n_ram_wr = 0, n_ram_rd = 0, n_latch_wr = 0, n_latch_rd = 0, n_io = 0, n_unmapped = 0;

  tsk80_stage1_top dut (
    .clk(clk), .rst(rst), .cpu_addr(cpu_addr), .cpu_dout(cpu_dout), .cpu_din(cpu_din),
    .cpu_mreq(cpu_mreq), .cpu_rd(cpu_rd), .cpu_wr(cpu_wr), .leds(leds)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input addr_t a, input data_t d, input logic mreq = 1'b1);
    @(posedge clk); #1;
    cpu_addr = a; cpu_dout = d; cpu_mreq = mreq; cpu_wr = 1; cpu_rd = 0;
    @(posedge clk); #1;
    cpu_wr = 0; cpu_mreq = 0;
  endtask

  task automatic bus_read(input addr_t a, output data_t d, input logic mreq = 1'b1);
    @(posedge clk); #1;
    cpu_addr = a; cpu_mreq = mreq; cpu_rd = 1; cpu_wr = 0;
    @(negedge clk);
    d = cpu_din;
    @(posedge clk); #1;
    cpu_rd = 0; cpu_mreq = 0;
  endtask

  task automatic expect_eq(input data_t got, input data_t exp, input string what, input addr_t a);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %h: got %h exp %h", what, a, got, exp);
    end
  endtask

  function automatic data_t pat(input int a, input int seed);
    return data_t'((a * 73) ^ (a >> 7) ^ seed);
  endfunction

  initial begin
    data_t d;
    addr_t a;
    rst = 1; cpu_addr = '0; cpu_dout = '0; cpu_mreq = 0; cpu_rd = 0; cpu_wr = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    checks++;
    if (leds !== 8'h00) begin failures++; $display("FAIL leds not cleared by reset"); end

    // Fill the code and data sections, then read both back.
    for (int i = 0; i < int'(XROM_LEN); i++) begin
      a = XROM_START + addr_t'(i); ref_ram[a[RAM_ADDR_W-1:0]] = pat(i, 32'h11);
      bus_write(a, ref_ram[a[RAM_ADDR_W-1:0]]); n_ram_wr++;
    end
    for (int i = 0; i < int'(XRAM_LEN); i++) begin
      a = XRAM_START + addr_t'(i); ref_ram[a[RAM_ADDR_W-1:0]] = pat(i, 32'hE7);
      bus_write(a, ref_ram[a[RAM_ADDR_W-1:0]]); n_ram_wr++;
    end
    for (int i = 0; i < 2**RAM_ADDR_W; i++) begin
      bus_read(addr_t'(i), d); n_ram_rd++;
      expect_eq(d, ref_ram[i], "RAM read", addr_t'(i));
    end

    // LED latch: write, the LEDs follow, read back.
    for (int k = 0; k < 16; k++) begin
      data_t v;
      v = data_t'(8'h01 << (k % 8)) ^ data_t'(k);
      bus_write(LATCH_ADDR, v); n_latch_wr++;
      checks++;
      if (leds !== v) begin failures++; $display("FAIL leds=%h exp %h", leds, v); end
      bus_read(LATCH_ADDR, d); n_latch_rd++;
      expect_eq(d, v, "latch read", LATCH_ADDR);
    end

    // RAM unchanged by latch traffic; latch unchanged by RAM traffic.
    bus_write(16'h0FF0, 8'h5A); ref_ram[13'h0FF0] = 8'h5A; n_ram_wr++;
    bus_read(LATCH_ADDR, d); n_latch_rd++;
    expect_eq(d, leds, "latch after RAM write", LATCH_ADDR);
    for (int i = 0; i < 2**RAM_ADDR_W; i += 97) begin
      bus_read(addr_t'(i), d); n_ram_rd++;
      expect_eq(d, ref_ram[i], "RAM after latch writes", addr_t'(i));
    end

    // I/O cycles must not touch the memory-mapped devices.
    begin
      data_t led_before;
      led_before = leds;
      bus_write(LATCH_ADDR, ~led_before, 1'b0); n_io++;
      checks++;
      if (leds !== led_before) begin failures++; $display("FAIL I/O write changed the latch"); end
      bus_write(16'h0010, ~ref_ram[16], 1'b0); n_io++;
      bus_read(16'h0010, d, 1'b0); n_io++;
      expect_eq(d, 8'h00, "I/O read", 16'h0010);
      bus_read(16'h0010, d); n_ram_rd++;
      expect_eq(d, ref_ram[16], "RAM after I/O write", 16'h0010);
    end

    // Unmapped memory addresses read as zero and store nothing.
    for (int j = 0; j < 8; j++) begin
      a = addr_t'(32'h2000 + j * 32'h1F00);
      bus_write(a, 8'hFF); n_unmapped++;
      bus_read(a, d); n_unmapped++;
      expect_eq(d, 8'h00, "unmapped read", a);
    end
    bus_read(16'h0000, d); n_ram_rd++;
    expect_eq(d, ref_ram[0], "RAM after unmapped writes", 16'h0000);

    $display("mechanisms: ram_wr=%0d ram_rd=%0d latch_wr=%0d latch_rd=%0d io=%0d unmapped=%0d",
             n_ram_wr, n_ram_rd, n_latch_wr, n_latch_rd, n_io, n_unmapped);
    if (n_ram_wr == 0 || n_ram_rd == 0 || n_latch_wr == 0 || n_latch_rd == 0 || n_io == 0 || n_unmapped == 0) begin
      failures++; $display("FAIL a bus mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
