// mib16_regfile: the sixteen 16-bit general purpose registers R0-R15.
//
// Three address ports as in the datapath drawing: A1 reads onto Q1 (the
// first operand bus), A2 reads onto Q2 (the second operand bus) and A3 with
// D3 writes. The A2 address is chosen between the r2 field and the r3 field
// outside this block, so that a store can read the register it writes to
// memory. Reads are combinational; the write happens on the rising clock edge
// when we is high. All registers clear on reset (a choice of this
// implementation; the original leaves reset values unstated). R0 is an
// ordinary register, not a constant zero.
module mib16_regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [AW-1:0]    a1,
  input  logic [AW-1:0]    a2,
  input  logic [AW-1:0]    a3,
  input  logic             we,     // write enable for port 3
  input  logic [WIDTH-1:0] d3,
  output logic [WIDTH-1:0] q1,
  output logic [WIDTH-1:0] q2
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[a3] <= d3;
    end
  end

  assign q1 = regs[a1];
  assign q2 = regs[a2];

endmodule
