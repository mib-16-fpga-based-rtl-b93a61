// mib16_ir: the instruction register.
//
// Captures the instruction word from the internal bus on the rising clock
// edge when load is high, and presents its four 4-bit fields: opcode
// [15:12], r3 [11:8] (destination, or the register stored), r1 [7:4] (first
// source or index register) and r2/i8 [3:0] (second source register or the
// 4-bit two's complement immediate). imm is that immediate sign-extended to
// 16 bits. The field layout is the original instruction format; reset
// clears the register.
module mib16_ir
  import mib16_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        load,
  input  logic [15:0] d,
  output instr_t      ir,
  output logic [15:0] imm
);

  always_ff @(posedge clk) begin
    if (reset)     ir <= '0;
    else if (load) ir <= instr_t'(d);
  end

  assign imm = sext4(ir.r2);

endmodule
