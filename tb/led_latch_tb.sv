// led_latch_tb: self-checking test of the LED debug latch.
//
// Checks reset to zero, capture of di on the clock edge ending a selected
// write cycle (and not before it), no capture without cs or without wr,
// read-back through do_o only while cs and rd are high, and a random run
// against a reference register.
module led_latch_tb;
  logic       clk = 0;
  logic       rst, cs, rd, wr;
  logic [7:0] di, do_o, leds;
  logic [7:0] ref_q;
  int checks = 0, failures = 0;

  led_latch dut (.clk(clk), .rst(rst), .cs(cs), .rd(rd), .wr(wr), .di(di), .do_o(do_o), .leds(leds));

  always #5 clk = ~clk;

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp_leds, input logic [7:0] exp_do, input string what);
    #1;
    checks++;
    if (leds !== exp_leds || do_o !== exp_do) begin
      failures++;
      if (failures < 10) $display("FAIL %s leds=%h do=%h exp %h/%h", what, leds, do_o, exp_leds, exp_do);
    end
  endtask

  initial begin
    rst = 1; cs = 0; rd = 0; wr = 0; di = 8'hFF;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    check(8'h00, 8'h00, "after reset");
    // Selected write: not visible until the edge.
    cs = 1; wr = 1; di = 8'hA5;
    check(8'h00, 8'h00, "before edge");
    @(posedge clk); #1;
    cs = 0; wr = 0;
    check(8'hA5, 8'h00, "captured, not read");
    // Write without cs, and cs without wr.
    di = 8'h3C; wr = 1;
    @(posedge clk); #1;
    wr = 0; cs = 1;
    @(posedge clk); #1;
    cs = 0;
    check(8'hA5, 8'h00, "no capture unselected");
    // Read-back.
    cs = 1; rd = 1;
    check(8'hA5, 8'hA5, "read back");
    cs = 0;
    check(8'hA5, 8'h00, "rd without cs");
    cs = 1; rd = 0;
    check(8'hA5, 8'h00, "cs without rd");
    cs = 0;
    // Random run.
    ref_q = 8'hA5;
    for (int k = 0; k < 2000; k++) begin
      logic [7:0] e_do;
      @(posedge clk); #1;
      cs = 1'($urandom); di = 8'($urandom);
      case ($urandom_range(2))
        0: begin rd = 1; wr = 0; end
        1: begin rd = 0; wr = 1; end
        default: begin rd = 0; wr = 0; end
      endcase
      e_do = (cs && rd) ? ref_q : 8'h00;
      check(ref_q, e_do, "random");
      if (cs && wr) ref_q = di;
    end
    @(posedge clk); #1;
    cs = 0; rd = 0; wr = 0;
    check(ref_q, 8'h00, "end");
    // Reset clears the LEDs.
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    check(8'h00, 8'h00, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
