// ram_interface_tb: self-checking test of the RAM bus device.
//
// Against a reference array kept in the testbench, it issues random bus
// cycles with random cs, rd and wr and checks: writes land only when cs and
// wr are high, do_o shows the stored word only when cs and rd are high and is
// zero in every other cycle, including writes and deselected reads.
module ram_interface_tb;
  logic        clk = 0;
  logic        cs, rd, wr;
  logic [12:0] a;
  logic [7:0]  di, do_o;
  logic [7:0]  ref_mem [8192];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_idle = 0;

  ram_interface dut (.clk(clk), .cs(cs), .rd(rd), .wr(wr), .a(a), .di(di), .do_o(do_o));

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs = 0; rd = 0; wr = 0; a = '0; di = '0;
    // Initialise RAM and reference through the bus.
    for (int i = 0; i < 8192; i++) begin
      @(posedge clk); #1;
      cs = 1; wr = 1; rd = 0; a = 13'(i); di = 8'(i ^ (i >> 5));
      ref_mem[i] = di;
    end
    @(posedge clk); #1;
    cs = 0; wr = 0;
    for (int k = 0; k < 20000; k++) begin
      logic [7:0] e;
      @(posedge clk); #1;
      cs = 1'($urandom); a = 13'($urandom);
      di = 8'($urandom);
      case ($urandom_range(2))
        0: begin rd = 1; wr = 0; end
        1: begin rd = 0; wr = 1; end
        default: begin rd = 0; wr = 0; end
      endcase
      #1;
      e = (cs && rd) ? ref_mem[a] : 8'h00;
      checks++;
      if (do_o !== e) begin
        failures++;
        if (failures < 10) $display("FAIL cs=%b rd=%b wr=%b a=%h do=%h exp=%h", cs, rd, wr, a, do_o, e);
      end
      if (cs && wr) begin ref_mem[a] = di; n_wr++; end
      else if (cs && rd) n_rd++;
      else n_idle++;
    end
    @(posedge clk); #1;
    cs = 0; rd = 0; wr = 0;
    // Final sweep: every word matches the reference.
    for (int i = 0; i < 8192; i++) begin
      cs = 1; rd = 1; a = 13'(i);
      #1;
      checks++;
      if (do_o !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL sweep a=%h do=%h exp=%h", i, do_o, ref_mem[i]);
      end
    end
    checks++;
    if (n_wr == 0 || n_rd == 0 || n_idle == 0) failures++;
    $display("cycles: write=%0d read=%0d other=%0d", n_wr, n_rd, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
