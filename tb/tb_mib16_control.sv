// tb_mib16_control: walks the control unit through every opcode and checks,
// cycle by cycle, the state sequence and the control word against a table
// written here from the instruction descriptions:
//   arithmetic/logic FA IF DEC EX WB,  Ldq FA IF DEC EA MEM WB,
//   Stq FA IF DEC EA SD MEM,  Ld FA IF DEC DA DF EA MEM WB,
//   St FA IF DEC DA DF EA SD MEM.
// READY comes after a random number of wait cycles, and CE is dropped at
// random; with CE low the state must hold and no register may load.
`timescale 1ns / 1ps
module tb_mib16_control;
  import mib16_pkg::*;

  logic    clk = 1'b0;
  logic    reset, ce, ready;
  opcode_e op;
  ctrl_t   ctrl;
  state_e  state;
  int checks = 0, failures = 0;
  int n_stall = 0, n_wait = 0;

  mib16_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (op %s state %s)", what, op.name(), state.name()); end
  endtask

  function automatic logic any_load(ctrl_t c);
    return c.ir_load | c.pc_inc | c.addr_load | c.disp_load | c.res_load |
           c.dout_load | c.cc_load | c.reg_we;
  endfunction

  // Checks the control word of state s in the cycle READY is (rdy) seen.
  task automatic check_ctrl(state_e s, logic rdy);
    logic alu_i, quick_i, store_i, long_i;
    alu_i   = op < OP_LD;
    quick_i = op inside {OP_ADDQ, OP_SUBQ, OP_MULQ, OP_DIVQ};
    store_i = op inside {OP_ST, OP_STQ};
    long_i  = op inside {OP_LD, OP_ST};
    check(ctrl.ram_en == (s inside {S_IF, S_DF, S_MEM}), "ram_en");
    check(ctrl.fetch == (s inside {S_IF, S_DF}), "fetch");
    check(ctrl.we == (s == S_MEM && store_i), "we");
    check(ctrl.addr_load == (s inside {S_FA, S_DA, S_EA}), "addr_load");
    check(ctrl.ir_load == (s == S_IF && rdy), "ir_load");
    check(ctrl.pc_inc == (s inside {S_IF, S_DF} && rdy), "pc_inc");
    check(ctrl.disp_load == (s == S_DF && rdy), "disp_load");
    check(ctrl.dout_load == (s == S_SD), "dout_load");
    check(ctrl.cc_load == (s == S_EX), "cc_load");
    check(ctrl.reg_we == (s == S_WB), "reg_we");
    check(ctrl.res_load == (s == S_EX || (s == S_MEM && rdy && !store_i)), "res_load");
    if (s inside {S_FA, S_DA}) check(ctrl.alu_op == ALU_PASS1 && ctrl.op1_sel == OP1_PC, "pc to address");
    if (s == S_EA) check(ctrl.alu_op == ALU_ADD && ctrl.op1_sel == OP1_REG &&
                         ctrl.op2_sel == (long_i ? OP2_DISP : OP2_IMM), "effective address");
    if (s == S_SD) check(ctrl.alu_op == ALU_PASS2 && ctrl.a2_r3 && ctrl.op2_sel == OP2_REG, "store data");
    if (s inside {S_IF, S_DF, S_MEM}) check(ctrl.rbus_sel == RBUS_DIN, "memory data on R_bus");
    if (s == S_EX) begin
      alu_op_e e;
      case (op)
        OP_ADD, OP_ADDQ: e = ALU_ADD;
        OP_SUB, OP_SUBQ: e = ALU_SUB;
        OP_MUL, OP_MULQ: e = ALU_MUL;
        OP_DIV, OP_DIVQ: e = ALU_DIV;
        OP_LAND:         e = ALU_AND;
        OP_LOR:          e = ALU_OR;
        OP_LXOR:         e = ALU_XOR;
        default:         e = ALU_MASK;
      endcase
      check(alu_i, "EX only for arithmetic/logic");
      check(ctrl.alu_op == e && ctrl.op2_sel == (quick_i ? OP2_IMM : OP2_REG) &&
            ctrl.rbus_sel == RBUS_ALU, "ALU operation");
    end
  endtask

  task automatic run_instr(opcode_e o);
    state_e seq[$];
    if (o < OP_LD)            seq = '{S_FA, S_IF, S_DEC, S_EX, S_WB};
    else if (o == OP_LDQ)     seq = '{S_FA, S_IF, S_DEC, S_EA, S_MEM, S_WB};
    else if (o == OP_STQ)     seq = '{S_FA, S_IF, S_DEC, S_EA, S_SD, S_MEM};
    else if (o == OP_LD)      seq = '{S_FA, S_IF, S_DEC, S_DA, S_DF, S_EA, S_MEM, S_WB};
    else                      seq = '{S_FA, S_IF, S_DEC, S_DA, S_DF, S_EA, S_SD, S_MEM};
    foreach (seq[k]) begin
      int waits;
      waits = (seq[k] inside {S_IF, S_DF, S_MEM}) ? $urandom_range(0, 3) : 0;
      for (int w = 0; w <= waits; w++) begin
        @(negedge clk);
        // the opcode changes only after the previous instruction has ended,
        // as the instruction register does
        if (k == 0 && w == 0) op = o;
        ready = (w == waits) && (seq[k] inside {S_IF, S_DF, S_MEM});
        ce    = 1'b1;
        if ($urandom_range(0, 7) == 0) begin  // a stalled cycle first
          ce = 1'b0;
          #1;
          check(!any_load(ctrl), "no register loads with CE low");
          @(posedge clk); #1;
          check(state == seq[k], "state holds with CE low");
          n_stall++;
          @(negedge clk);
          ce = 1'b1;
        end
        #1;
        check(state == seq[k], $sformatf("expected state %s", seq[k].name()));
        check_ctrl(seq[k], ready);
        if (w < waits) n_wait++;
      end
    end
  endtask

  initial begin
    reset = 1'b1; ce = 1'b1; ready = 1'b0; op = OP_ADD;
    n_stall = 0; n_wait = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int i = 0; i < 16; i++) run_instr(opcode_e'(i));
    for (int i = 0; i < 300; i++) run_instr(opcode_e'($urandom_range(0, 15)));
    @(negedge clk);
    #1 check(state == S_FA, "back at fetch");
    check(n_stall > 0 && n_wait > 0, "stalls and wait cycles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
