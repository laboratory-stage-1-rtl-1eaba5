// data_bus_or_tb: self-checking test of the ORed read-data bus.
//
// Drives random and one-hot device outputs, with three devices to show the
// parameter, and compares cpu_din with an OR computed bit by bit in the
// testbench. Also checks the bus use case: when only one device is non-zero
// its data reaches the CPU unchanged.
module data_bus_or_tb;
  localparam int unsigned N = 3;
  logic [N-1:0][7:0] dev;
  logic [7:0]        din;
  int checks = 0, failures = 0;

  data_bus_or #(.N_DEV(N), .DATA_W(8)) dut (.dev_data(dev), .cpu_din(din));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    #1;
    checks++;
    if (din !== exp) begin
      failures++;
      $display("FAIL %s: dev=%h din=%h exp=%h", what, dev, din, exp);
    end
  endtask

  initial begin
    dev = '0;
    check(8'h00, "all zero");
    for (int s = 0; s < N; s++)
      for (int k = 0; k < 50; k++) begin
        logic [7:0] v;
        v = 8'($urandom);
        dev = '0;
        dev[s] = v;
        check(v, "single source");
      end
    for (int k = 0; k < 500; k++) begin
      logic [7:0] e;
      dev = {8'($urandom), 8'($urandom), 8'($urandom)};
      e = '0;
      for (int b = 0; b < 8; b++)
        e[b] = dev[0][b] | dev[1][b] | dev[2][b];
      check(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
