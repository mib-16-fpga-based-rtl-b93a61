// mib16_pkg: types and constants shared by the MIB-16 processor blocks.
//
// MIB-16 is a 16-bit, word-addressed, multi-cycle teaching processor with
// sixteen general purpose registers R0-R15, a program counter and a 3-bit
// condition code register (V, N, Z). Every instruction word is split into four
// 4-bit fields: opcode[15:12], r3[11:8], r1[7:4] and r2/i8[3:0]. The long
// load/store forms are followed by a second word holding a 16-bit
// displacement.
//
// The opcode numbers, field positions and flag names follow the original
// instruction set. The ALU operation encoding, the control-state encoding and
// the bus field names are choices of this implementation.
package mib16_pkg;

  localparam int unsigned DATA_W = 16;

  // Opcodes (instruction bits [15:12]).
  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,  // r3 <- r1 + r2
    OP_SUB  = 4'b0001,  // r3 <- r1 - r2
    OP_MUL  = 4'b0010,  // r3 <- r1 * r2
    OP_DIV  = 4'b0011,  // r3 <- r1 / r2
    OP_ADDQ = 4'b0100,  // r3 <- r1 + i8
    OP_SUBQ = 4'b0101,  // r3 <- r1 - i8
    OP_MULQ = 4'b0110,  // r3 <- r1 * i8
    OP_DIVQ = 4'b0111,  // r3 <- r1 / i8
    OP_LAND = 4'b1000,  // r3 <- r1 & r2
    OP_LOR  = 4'b1001,  // r3 <- r1 | r2
    OP_LXOR = 4'b1010,  // r3 <- r1 ^ r2
    OP_LMSK = 4'b1011,  // r3 <- r1 & ~r2
    OP_LD   = 4'b1100,  // r3 <- M[r1 + disp16]
    OP_ST   = 4'b1101,  // M[r1 + disp16] <- r3
    OP_LDQ  = 4'b1110,  // r3 <- M[r1 + i8]
    OP_STQ  = 4'b1111   // M[r1 + i8] <- r3
  } opcode_e;

  // ALU operations. "disable" and "pass1" are the names seen on the original
  // design's alu_op signal; the rest are named after the instructions.
  typedef enum logic [3:0] {
    ALU_DISABLE = 4'd0,
    ALU_ADD     = 4'd1,
    ALU_SUB     = 4'd2,
    ALU_MUL     = 4'd3,
    ALU_DIV     = 4'd4,
    ALU_AND     = 4'd5,
    ALU_OR      = 4'd6,
    ALU_XOR     = 4'd7,
    ALU_MASK    = 4'd8,
    ALU_PASS1   = 4'd9,
    ALU_PASS2   = 4'd10
  } alu_op_e;

  // Condition codes, ordered as drawn in the register picture: V N Z.
  typedef struct packed {
    logic v;  // overflow
    logic n;  // negative
    logic z;  // zero
  } cc_t;

  // One instruction word.
  typedef struct packed {
    opcode_e    op;
    logic [3:0] r3;
    logic [3:0] r1;
    logic [3:0] r2;  // r2 register number, or the 4-bit signed immediate i8
  } instr_t;

  // Source of the internal result bus (R_bus).
  typedef enum logic {
    RBUS_ALU = 1'b0,   // ALU result
    RBUS_DIN = 1'b1    // data arriving from memory (D_IN)
  } rbus_sel_e;

  // Source of the second operand bus (Op2_bus).
  typedef enum logic [1:0] {
    OP2_REG  = 2'd0,  // register file read port 2
    OP2_IMM  = 2'd1,  // sign-extended r2/i8 field
    OP2_DISP = 2'd2   // displacement register
  } op2_sel_e;

  // Source of the first operand bus (Op1_bus).
  typedef enum logic {
    OP1_REG = 1'b0,   // register file read port 1
    OP1_PC  = 1'b1    // program counter
  } op1_sel_e;

  // Control unit states.
  typedef enum logic [3:0] {
    S_FA  = 4'd0,  // program counter -> address register (fetch address)
    S_IF  = 4'd1,  // read instruction word, wait for READY
    S_DEC = 4'd2,  // decode
    S_DA  = 4'd3,  // program counter -> address register (displacement)
    S_DF  = 4'd4,  // read displacement word, wait for READY
    S_EA  = 4'd5,  // r1 + displacement -> address register
    S_SD  = 4'd6,  // r3 -> data-out register (store)
    S_MEM = 4'd7,  // data read or write, wait for READY
    S_EX  = 4'd8,  // ALU operation, result and flags latched
    S_WB  = 4'd9   // result -> register r3
  } state_e;

  // Control word: everything the control unit drives into the datapath and
  // onto the memory bus in one clock cycle.
  typedef struct packed {
    alu_op_e   alu_op;
    op1_sel_e  op1_sel;
    op2_sel_e  op2_sel;
    logic      a2_r3;      // read port 2 addressed by r3 instead of r2
    rbus_sel_e rbus_sel;
    logic      ir_load;
    logic      pc_inc;
    logic      addr_load;  // address register (A_BUS)
    logic      disp_load;  // displacement register
    logic      res_load;   // result register
    logic      dout_load;  // data-out register (D_OUT)
    logic      cc_load;    // condition code register
    logic      reg_we;     // register file write, port 3
    logic      ram_en;     // memory request
    logic      fetch;      // request reads an instruction word
    logic      we;         // request is a write
  } ctrl_t;

  // Instruction classes.
  function automatic logic is_mem_op(opcode_e op);
    return op inside {OP_LD, OP_ST, OP_LDQ, OP_STQ};
  endfunction

  function automatic logic is_store(opcode_e op);
    return op == OP_ST || op == OP_STQ;
  endfunction

  function automatic logic is_long(opcode_e op);
    return op == OP_LD || op == OP_ST;
  endfunction

  function automatic logic is_quick_alu(opcode_e op);
    return op inside {OP_ADDQ, OP_SUBQ, OP_MULQ, OP_DIVQ};
  endfunction

  // ALU operation for an arithmetic or logic opcode.
  function automatic alu_op_e alu_op_of(opcode_e op);
    unique case (op)
      OP_ADD, OP_ADDQ: return ALU_ADD;
      OP_SUB, OP_SUBQ: return ALU_SUB;
      OP_MUL, OP_MULQ: return ALU_MUL;
      OP_DIV, OP_DIVQ: return ALU_DIV;
      OP_LAND:         return ALU_AND;
      OP_LOR:          return ALU_OR;
      OP_LXOR:         return ALU_XOR;
      OP_LMSK:         return ALU_MASK;
      default:         return ALU_ADD;  // effective address r1 + displacement
    endcase
  endfunction

  // Sign extension of the 4-bit immediate field to a data word.
  function automatic logic [DATA_W-1:0] sext4(logic [3:0] imm);
    return {{(DATA_W-4){imm[3]}}, imm};
  endfunction

endpackage
