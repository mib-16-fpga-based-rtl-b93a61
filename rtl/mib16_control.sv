// mib16_control: the control unit of MIB-16, a multi-cycle state machine.
//
// Every instruction starts by routing the program counter through the ALU
// (pass1) into the address register and reading the word at that address with
// FETCH high. When READY arrives the word goes into the instruction register
// and the program counter steps by one. Then, by opcode:
//
//   arithmetic/logic : EX  (ALU result -> result register, flags -> CC)
//                      WB  (result -> r3)
//   Ld / St          : DA, DF (read the displacement word at PC, PC + 1)
//                      EA  (r1 + displacement -> address register)
//   Ldq / Stq        : EA  (r1 + sign-extended i8 -> address register)
//   then store       : SD  (r3 -> data-out register), MEM (write, WE high)
//   or load          : MEM (read; data -> result register), WB (-> r3)
//
// A memory request (ram_en) is held, with its address, FETCH, WE and write
// data stable, until READY is seen high on a rising clock edge, so any number
// of memory wait cycles is accepted. If each bus transfer occupies A cycles
// of its state (A = 2 for the two-clock T1/T2 bus cycle), an arithmetic or
// logic instruction takes 4 + A cycles, a quick load or store 4 + 2A and a
// long load or store 5 + 3A: 6, 8 and 11 clocks with a zero-wait memory.
//
// CE is a clock enable for the whole processor: while it is low the state
// and every register hold; a memory request in progress stays on the bus, and
// a READY that arrives while CE is low is missed, so that transfer is simply
// repeated.
//
// Interface: op is the opcode field of the instruction register and ready
// the memory's READY. ctrl is the control word of the current state, a
// combinational function of state, op and ready that the datapath acts on at
// the next rising edge; state is the registered state (reset: FA).
//
// The sequence follows the original's description of fetch, operand read,
// execute and write-back and the signals seen in its ADD simulation (alu_op
// disable/add/pass1, address latch, result latch); the exact states are this
// implementation's choice.
module mib16_control
  import mib16_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    ce,
  input  opcode_e op,      // opcode field of the instruction register
  input  logic    ready,
  output ctrl_t   ctrl,
  output state_e  state
);

  state_e next;
  ctrl_t  c;

  always_comb begin
    c        = '0;
    c.alu_op = ALU_DISABLE;
    next     = state;
    unique case (state)
      S_FA: begin
        c.op1_sel   = OP1_PC;
        c.alu_op    = ALU_PASS1;
        c.rbus_sel  = RBUS_ALU;
        c.addr_load = 1'b1;
        next        = S_IF;
      end
      S_IF: begin
        c.ram_en   = 1'b1;
        c.fetch    = 1'b1;
        c.rbus_sel = RBUS_DIN;
        if (ready) begin
          c.ir_load = 1'b1;
          c.pc_inc  = 1'b1;
          next      = S_DEC;
        end
      end
      S_DEC: begin
        if (is_long(op))        next = S_DA;
        else if (is_mem_op(op)) next = S_EA;
        else                    next = S_EX;
      end
      S_DA: begin
        c.op1_sel   = OP1_PC;
        c.alu_op    = ALU_PASS1;
        c.rbus_sel  = RBUS_ALU;
        c.addr_load = 1'b1;
        next        = S_DF;
      end
      S_DF: begin
        c.ram_en   = 1'b1;
        c.fetch    = 1'b1;
        c.rbus_sel = RBUS_DIN;
        if (ready) begin
          c.disp_load = 1'b1;
          c.pc_inc    = 1'b1;
          next        = S_EA;
        end
      end
      S_EA: begin
        c.op1_sel   = OP1_REG;
        c.op2_sel   = is_long(op) ? OP2_DISP : OP2_IMM;
        c.alu_op    = ALU_ADD;
        c.rbus_sel  = RBUS_ALU;
        c.addr_load = 1'b1;
        next        = is_store(op) ? S_SD : S_MEM;
      end
      S_SD: begin
        c.a2_r3     = 1'b1;
        c.op2_sel   = OP2_REG;
        c.alu_op    = ALU_PASS2;
        c.rbus_sel  = RBUS_ALU;
        c.dout_load = 1'b1;
        next        = S_MEM;
      end
      S_MEM: begin
        c.ram_en   = 1'b1;
        c.we       = is_store(op);
        c.rbus_sel = RBUS_DIN;
        if (ready) begin
          c.res_load = !is_store(op);
          next       = is_store(op) ? S_FA : S_WB;
        end
      end
      S_EX: begin
        c.op1_sel  = OP1_REG;
        c.op2_sel  = is_quick_alu(op) ? OP2_IMM : OP2_REG;
        c.alu_op   = alu_op_of(op);
        c.rbus_sel = RBUS_ALU;
        c.res_load = 1'b1;
        c.cc_load  = 1'b1;
        next       = S_WB;
      end
      S_WB: begin
        c.reg_we = 1'b1;
        next     = S_FA;
      end
      default: next = S_FA;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset)   state <= S_FA;
    else if (ce) state <= next;
  end

  // With CE low no register changes. A memory request already on the bus is
  // held (the memory may finish it; it is then repeated when CE returns).
  always_comb begin
    ctrl = c;
    if (!ce) begin
      ctrl.ir_load   = 1'b0;
      ctrl.pc_inc    = 1'b0;
      ctrl.addr_load = 1'b0;
      ctrl.disp_load = 1'b0;
      ctrl.res_load  = 1'b0;
      ctrl.dout_load = 1'b0;
      ctrl.cc_load   = 1'b0;
      ctrl.reg_we    = 1'b0;
    end
  end

  // A request never reads an instruction word and writes at the same time.
  assert property (@(posedge clk) disable iff (reset) !(ctrl.fetch && ctrl.we));

endmodule
