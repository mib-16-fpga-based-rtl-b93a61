// tb_mib16_system: end-to-end test of the MIB-16 system at its default size
// (64K-word memory, zero wait states).
//
// The whole memory is filled with pseudo-random words. A program is built at
// address 0: a directed prologue (the ADD example 30 + 3 -> R8, a zero
// result, divide by zero, a negative result, a multiply overflow), then
// random instructions of all sixteen opcodes. While it is generated, the
// program is executed by the instruction-level model in mib16_ref, which
// steers load/store addresses so that no store lands on the program and no
// load reads a program word not yet generated. The
// processor then runs it with CE dropped at random moments. Checked:
//   - the cycle count of every instruction that saw no CE stall
//     (6 clocks arithmetic/logic, 8 quick load/store, 11 long load/store),
//   - the bus rules: no write while FETCH is high, FETCH on instruction
//     words only, every write's address and data against the model,
//   - R8 and CC right after the ADD example,
//   - at the end: all registers, CC, PC and all 64K memory words.
// Each mechanism (every opcode, V, N, Z, divide by zero, multiply overflow,
// displacement fetch, memory write, CE stall) must occur at least once.
`timescale 1ns / 1ps
module tb_mib16_system;
  import mib16_pkg::*;
  import mib16_ref::*;

  localparam int PROG_WORDS = 600;
  localparam int AW         = 16;

  logic        clk = 1'b0;
  logic        reset, ce;
  logic [15:0] a_bus, d_in, d_out;
  logic        we, fetch, ram_en, ready;
  cc_t         cc;

  int checks = 0, failures = 0;

  mib16_system dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  model gen;     // generates the program and yields the expected state
  int   cls_q[$];    // class of each instruction, in execution order
  logic [15:0] wr_addr_q[$], wr_data_q[$];  // expected memory writes
  int   n_instr;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] ins(logic [3:0] op, r3, r1, r2);
    return {op, r3, r1, r2};
  endfunction

  // Places a word in both the model's and the system's memory.
  task automatic put(logic [15:0] a, logic [15:0] w);
    gen.wr(a, w);
    dut.u_mem.mem[a] = w;
  endtask

  // Appends one instruction (and its displacement) and executes it in the
  // model, recording its class and the write it makes.
  task automatic emit(logic [15:0] w, logic [15:0] disp = '0);
    logic [15:0] ea;
    put(gen.pc, w);
    if (w[15:12] == OP_LD || w[15:12] == OP_ST) put(gen.pc + 16'd1, disp);
    if (w[15:12] == OP_ST || w[15:12] == OP_STQ) begin
      ea = gen.regs[w[7:4]] + ((w[15:12] == OP_ST) ? disp : 16'(model::sx4(w[3:0])));
      wr_addr_q.push_back(ea);
      wr_data_q.push_back(gen.regs[w[11:8]]);
    end
    cls_q.push_back(gen.step());
    n_instr++;
  endtask

  // A load must not read program words that are not written yet: the model
  // runs while the program is being built, the processor after.
  function automatic bit unsafe_load(logic [15:0] a);
    logic [15:0] m;
    m = a & 16'((1 << AW) - 1);
    return m >= gen.pc && int'(m) < PROG_WORDS + 40;
  endfunction

  task automatic build_program();
    logic [3:0]  op, r3, r1, r2;
    logic [15:0] ea, target;
    for (int a = 0; a < (1 << AW); a++) put(a[15:0], 16'($urandom));
    put(16'h9000, 16'd30);
    put(16'h9001, 16'd3);
    put(16'h9002, 16'h4000);
    // Prologue
    emit(ins(OP_LD, 4'd1, 4'd0, 4'd0), 16'h9000);   // R1 = 30
    emit(ins(OP_LD, 4'd2, 4'd0, 4'd0), 16'h9001);   // R2 = 3
    emit(16'h0812);                                  // Add R8, R1, R2
    emit(ins(OP_SUB, 4'd5, 4'd5, 4'd5));             // R5 = 0 (Z)
    emit(ins(OP_DIV, 4'd6, 4'd1, 4'd5));             // 30 / 0 (V)
    emit(ins(OP_SUBQ, 4'd7, 4'd5, 4'd1));            // 0 - 1 (N)
    emit(ins(OP_LD, 4'd9, 4'd0, 4'd0), 16'h9002);   // R9 = 0x4000
    emit(ins(OP_MUL, 4'd10, 4'd9, 4'd9));            // overflow (V)
    emit(ins(OP_DIVQ, 4'd11, 4'd1, 4'd3));           // 30 / 3 = 10
    emit(ins(OP_STQ, 4'd11, 4'd9, 4'hF));            // M[0x3FFF] = 10
    emit(ins(OP_LDQ, 4'd12, 4'd9, 4'hF));            // R12 = 10
    // Random body
    while (int'(gen.pc) < PROG_WORDS - 2) begin
      op = 4'($urandom); r3 = 4'($urandom); r1 = 4'($urandom); r2 = 4'($urandom);
      if (op == OP_LD || op == OP_ST) begin
        target = (op == OP_ST) ? 16'h8000 | 16'($urandom) : 16'($urandom);
        if (op == OP_LD && unsafe_load(target)) target = 16'h8000 | 16'($urandom);
        emit(ins(op, r3, r1, 4'd0), target - gen.regs[r1]);
      end else if (op == OP_LDQ && unsafe_load(gen.regs[r1] + 16'(model::sx4(r2)))) begin
        emit(ins(OP_LD, r3, r1, 4'd0), (16'h8000 | 16'($urandom)) - gen.regs[r1]);
      end else if (op == OP_STQ) begin
        ea = gen.regs[r1] + 16'(model::sx4(r2));
        if (ea < 16'(PROG_WORDS + 4)) begin
          target = 16'h8000 | 16'($urandom);
          emit(ins(OP_ST, r3, r1, 4'd0), target - gen.regs[r1]);
        end else begin
          emit(ins(op, r3, r1, r2));
        end
      end else begin
        emit(ins(op, r3, r1, r2));
      end
    end
  endtask

  // ---------------------------------------------------------------- monitor
  int   cyc, done_instr, timed;
  bit   started, stalled_in_instr;
  int   seen_op [16];
  int   n_v, n_n, n_z, n_div0, n_mulv, n_disp, n_wr, n_stall;
  opcode_e last_op;

  always @(posedge clk) begin
    if (!reset) begin
      if (!ce) begin
        n_stall++;
        stalled_in_instr = 1;
      end else begin
        cyc++;
      end
      if (ram_en && ready) begin
        checks++;
        if (we && fetch) begin
          failures++;
          $display("FAIL: write with FETCH high at %h", a_bus);
        end
      end
      if (ce && ram_en && ready && we) begin
        n_wr++;
        if (wr_addr_q.size() == 0) begin
          check(0, "unexpected memory write");
        end else begin
          check(a_bus == wr_addr_q[0] && d_out == wr_data_q[0],
                $sformatf("write %h<-%h, expected %h<-%h", a_bus, d_out,
                          wr_addr_q[0], wr_data_q[0]));
          void'(wr_addr_q.pop_front());
          void'(wr_data_q.pop_front());
        end
      end
      if (ce && ram_en && ready && !we)
        check(fetch == (dut.u_cpu.u_control.state inside {S_IF, S_DF}),
              "FETCH must mark instruction and displacement reads only");
      if (ce && ready && dut.u_cpu.u_control.state == S_DF) n_disp++;
      if (ce && dut.u_cpu.u_control.state == S_FA) begin
        if (started) begin
          int exp_cyc;
          last_op = dut.u_cpu.u_ir.ir.op;
          seen_op[last_op]++;
          exp_cyc = (cls_q[0] == 0) ? 6 : (cls_q[0] == 1) ? 8 : 11;
          if (!stalled_in_instr) begin
            timed++;
            check(cyc == exp_cyc, $sformatf("instr %0d (%s) took %0d cycles, expected %0d",
                                            done_instr, last_op.name(), cyc, exp_cyc));
          end
          void'(cls_q.pop_front());
          if (last_op < OP_LD) begin
            if (cc.v) n_v++;
            if (cc.n) n_n++;
            if (cc.z) n_z++;
          end
          if (last_op == OP_DIV && cc.v) n_div0++;
          if (last_op == OP_MUL && cc.v) n_mulv++;
          done_instr++;
          if (done_instr == 3) begin
            check(dut.u_cpu.u_regs.regs[8] == 16'd33, "ADD example: R8 = 30 + 3");
            check(cc == 3'b000, "ADD example: flags 000");
          end
        end
        started = 1;
        cyc = 0;
        stalled_in_instr = 0;
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    model chk;
    n_instr = 0; started = 0; done_instr = 0; cyc = 0; timed = 0;
    n_v = 0; n_n = 0; n_z = 0; n_div0 = 0; n_mulv = 0; n_disp = 0; n_wr = 0; n_stall = 0;
    foreach (seen_op[i]) seen_op[i] = 0;
    reset = 1'b1;
    ce    = 1'b1;
    gen = new(AW);
    build_program();
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    while (done_instr < n_instr) begin
      @(negedge clk);
      // CE stalls in the second half of the run only
      ce = (done_instr > n_instr / 2) ? ($urandom_range(0, 9) != 0) : 1'b1;
    end
    ce = 1'b0;
    @(posedge clk);
    #1;
    // Final state
    for (int r = 0; r < 16; r++)
      check(dut.u_cpu.u_regs.regs[r] == gen.regs[r],
            $sformatf("R%0d = %h, expected %h", r, dut.u_cpu.u_regs.regs[r], gen.regs[r]));
    check(cc == gen.cc, $sformatf("CC = %b, expected %b", cc, gen.cc));
    check(dut.u_cpu.u_pc.pc == gen.pc, "PC at end of program");
    begin
      int bad;
      bad = 0;
      for (int a = 0; a < (1 << AW); a++)
        if (dut.u_mem.mem[a] != gen.mem[a]) bad++;
      check(bad == 0, $sformatf("%0d memory words differ", bad));
    end
    check(wr_addr_q.size() == 0, "all expected writes seen");
    check(timed > n_instr / 2, "enough instructions timed");
    // Mechanisms
    for (int o = 0; o < 16; o++) check(seen_op[o] > 0, $sformatf("opcode %0d executed", o));
    check(n_v > 0, "V flag set");
    check(n_n > 0, "N flag set");
    check(n_z > 0, "Z flag set");
    check(n_div0 > 0, "divide by zero");
    check(n_mulv > 0, "multiply overflow");
    check(n_disp > 0, "displacement fetch");
    check(n_wr > 0, "memory write");
    check(n_stall > 0, "CE stall");
    $display("instructions %0d (timed %0d), V %0d N %0d Z %0d div0 %0d mulV %0d disp %0d writes %0d stall cycles %0d",
             n_instr, timed, n_v, n_n, n_z, n_div0, n_mulv, n_disp, n_wr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
