// mib16_core: the MIB-16 processor.
//
// A 16-bit, word-addressed processor with registers R0-R15, a program counter
// and a V/N/Z condition code register, executing the sixteen instructions of
// the MIB-16 set (add, sub, mul, div and their 4-bit-immediate "quick" forms,
// and, or, xor, mask, and load/store with a 16-bit or a 4-bit displacement).
//
// Datapath, as in the original block diagram: the register file's port 1
// drives the first operand bus (or the program counter does), port 2 the
// second operand bus (or the sign-extended immediate, or the displacement
// register does). The ALU combines them onto the result bus, R_bus, which can
// instead carry the word arriving on D_IN. R_bus feeds the instruction
// register, the address register (A_BUS), the displacement register, the
// result register (written back into r3) and the data-out register (D_OUT).
// The A2 read address is switched from r2 to r3 for stores. The original
// connects these through tri-state buffers on shared buses; here every bus is
// a multiplexer.
//
// Pins follow the original pin diagram: CLK, RESET (synchronous, active high),
// CE (clock enable), READY and D_IN in; FETCH, WE, D_OUT and A_BUS out. One
// pin is added, RAM_EN, which is high while a memory transfer is requested
// (the name is that of the original's memory enable signal). A transfer: the
// processor raises RAM_EN with A_BUS, FETCH (high for instruction and
// displacement words), WE (high for a write) and D_OUT valid and holds them
// until it samples READY high on a rising edge of CLK; for a read, D_IN must
// be valid in that same cycle. See mib16_control for the cycle counts.
// The condition code register is also brought out as the status output CC,
// since no instruction of the set reads it back.
module mib16_core
  import mib16_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        ce,
  input  logic        ready,
  input  logic [15:0] d_in,
  output logic        fetch,
  output logic        we,
  output logic        ram_en,
  output logic [15:0] d_out,
  output logic [15:0] a_bus,
  output cc_t         cc       // condition codes V, N, Z (status output)
);

  ctrl_t       ctrl;
  instr_t      ir;
  logic [15:0] imm, pc, q1, q2, disp, result;
  logic [15:0] op1_bus, op2_bus, alu_y, r_bus;
  logic [3:0]  a2;
  cc_t         alu_cc;

  mib16_control u_control (
    .clk, .reset, .ce,
    .op    (ir.op),
    .ready,
    .ctrl,
    .state ()
  );

  mib16_ir u_ir (
    .clk, .reset,
    .load (ctrl.ir_load),
    .d    (r_bus),
    .ir,
    .imm
  );

  mib16_pc u_pc (
    .clk, .reset,
    .inc (ctrl.pc_inc),
    .pc
  );

  assign a2 = ctrl.a2_r3 ? ir.r3 : ir.r2;

  mib16_regfile u_regs (
    .clk, .reset,
    .a1 (ir.r1),
    .a2 (a2),
    .a3 (ir.r3),
    .we (ctrl.reg_we),
    .d3 (result),
    .q1,
    .q2
  );

  assign op1_bus = (ctrl.op1_sel == OP1_PC) ? pc : q1;

  always_comb begin
    unique case (ctrl.op2_sel)
      OP2_IMM:  op2_bus = imm;
      OP2_DISP: op2_bus = disp;
      default:  op2_bus = q2;
    endcase
  end

  mib16_alu u_alu (
    .op (ctrl.alu_op),
    .a  (op1_bus),
    .b  (op2_bus),
    .y  (alu_y),
    .cc (alu_cc)
  );

  assign r_bus = (ctrl.rbus_sel == RBUS_DIN) ? d_in : alu_y;

  mib16_flags u_flags (
    .clk, .reset,
    .load  (ctrl.cc_load),
    .cc_in (alu_cc),
    .cc
  );

  mib16_latch_reg u_addr (
    .clk, .reset, .load (ctrl.addr_load), .d (r_bus), .q (a_bus)
  );

  mib16_latch_reg u_disp (
    .clk, .reset, .load (ctrl.disp_load), .d (r_bus), .q (disp)
  );

  mib16_latch_reg u_result (
    .clk, .reset, .load (ctrl.res_load), .d (r_bus), .q (result)
  );

  mib16_latch_reg u_dout (
    .clk, .reset, .load (ctrl.dout_load), .d (r_bus), .q (d_out)
  );

  assign fetch  = ctrl.fetch;
  assign we     = ctrl.we;
  assign ram_en = ctrl.ram_en;

endmodule
