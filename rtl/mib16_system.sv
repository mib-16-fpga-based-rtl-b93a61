// mib16_system: the MIB-16 processor with its external word memory.
//
// The processor's bus pins (A_BUS, D_IN, D_OUT, WE, FETCH, READY, plus the
// RAM_EN request) connect to a 64K x 16 memory that holds program and data
// alike. After reset the processor fetches its first instruction from
// address 0 and runs while CE is high. The bus is also brought out as
// outputs so that a board or a testbench can watch the transfers; the memory
// is loaded from outside through its array (for example by a testbench or an
// FPGA initialisation file), since the processor has no other input.
module mib16_system #(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        ce,
  output logic [15:0] a_bus,
  output logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        we,
  output logic        fetch,
  output logic        ram_en,
  output logic        ready,
  output mib16_pkg::cc_t cc
);

  mib16_core u_cpu (
    .clk, .reset, .ce,
    .ready,
    .d_in,
    .fetch,
    .we,
    .ram_en,
    .d_out,
    .a_bus,
    .cc
  );

  mib16_ram #(
    .ADDR_W      (ADDR_W),
    .WAIT_STATES (WAIT_STATES)
  ) u_mem (
    .clk, .reset,
    .ram_en,
    .we,
    .fetch,
    .a_bus,
    .d_in  (d_out),
    .d_out (d_in),
    .ready
  );

endmodule
