// mib16_pc: the 16-bit program counter.
//
// Holds the address of the next instruction word. The control unit pulses
// inc after each instruction or displacement word has been read, which adds
// one on the next rising clock edge (wrapping from 16'hFFFF to 0). The
// instruction set has no jumps, so nothing else writes the counter. Reset
// sets it to RESET_ADDR, zero by default, where the first instruction is
// fetched.
module mib16_pc #(
  parameter int unsigned WIDTH      = 16,
  parameter logic [15:0] RESET_ADDR = 16'h0000
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             inc,
  output logic [WIDTH-1:0] pc
);

  always_ff @(posedge clk) begin
    if (reset)    pc <= RESET_ADDR[WIDTH-1:0];
    else if (inc) pc <= pc + 1'b1;
  end

endmodule
