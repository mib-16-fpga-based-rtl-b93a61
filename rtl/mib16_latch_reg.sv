// mib16_latch_reg: a load-enabled holding register.
//
// The datapath holds three values between clock cycles in registers of this
// kind: the memory address driven on A_BUS, the displacement used for a load
// or store address, and the result waiting to be written into the register
// file (or the data word driven on D_OUT during a store). The register takes
// d on the rising clock edge when load is high and keeps its value otherwise;
// reset clears it.
module mib16_latch_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
  end

endmodule
