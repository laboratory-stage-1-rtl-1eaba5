// ram_8x8k_tb: self-checking test of the clocked-write RAM.
//
// Writes follow the write timing of the bus: address, data and we change
// just after a rising edge and the word is captured at the next one. The
// test fills all 8K words with a pattern, reads them back combinationally
// (no clock edge between setting addr and sampling dout), checks that a
// cycle with we low changes nothing, and checks that a write lands at the
// end of its own cycle (one-cycle write latency).
module ram_8x8k_tb;
  logic        clk = 0;
  logic        we;
  logic [12:0] addr;
  logic [7:0]  din, dout;
  int checks = 0, failures = 0;

  ram_8x8k dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(input int a, input int seed);
    return 8'((a * 37 + (a >> 8) + seed) ^ 8'h5A);
  endfunction

  task automatic write(input int a, input logic [7:0] d);
    @(posedge clk); #1;
    we = 1; addr = 13'(a); din = d;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic expect_at(input int a, input logic [7:0] e, input string what);
    addr = 13'(a);
    #1;
    checks++;
    if (dout !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h dout=%h exp=%h", what, a, dout, e);
    end
  endtask

  initial begin
    we = 0; addr = '0; din = '0;
    for (int a = 0; a < 8192; a++) write(a, pat(a, 0));
    for (int a = 0; a < 8192; a++) expect_at(a, pat(a, 0), "fill");
    // we low: din and addr move, memory must not change.
    @(posedge clk); #1;
    addr = 13'h0123; din = ~pat(32'h123, 0);
    @(posedge clk); #1;
    expect_at(32'h0123, pat(32'h123, 0), "no write without we");
    // Write latency: the word appears right after the edge that ends the cycle.
    @(posedge clk); #1;
    we = 1; addr = 13'h1FFF; din = 8'hC3;
    #1;
    checks++;
    if (dout !== pat(32'h1FFF, 0)) begin
      failures++; $display("FAIL write visible before the clock edge");
    end
    @(posedge clk); #1;
    we = 0;
    expect_at(32'h1FFF, 8'hC3, "write after one edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
