// data_bus_or: read-data return path from the bus devices to the CPU.
//
// Instead of a multiplexer steered by the address decoder, every device
// holds its read-data lines at zero unless it is selected and being read, so
// the CPU data input is simply the bitwise OR of all device outputs. The
// number of devices is a parameter so that later peripherals only widen the
// dev_data array. Combinational, no latency.
//
// The OR structure is the design's; N_DEV = 2 matches the RAM and the latch.
// The one-source rule it relies on is checked by an assertion in the top,
// which has the clock to sample it on.
module data_bus_or #(
  parameter int unsigned N_DEV  = 2,
  parameter int unsigned DATA_W = 8
) (
  input  logic [N_DEV-1:0][DATA_W-1:0] dev_data,
  output logic [DATA_W-1:0]            cpu_din
);

  always_comb begin
    cpu_din = '0;
    for (int unsigned i = 0; i < N_DEV; i++)
      cpu_din |= dev_data[i];
  end

endmodule
