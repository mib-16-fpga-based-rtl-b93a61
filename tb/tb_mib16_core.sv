// tb_mib16_core: the processor alone, seen only through its pins, against a
// memory with 3 wait states. A random program (built and executed at the
// same time by the model in mib16_ref) ends by storing all sixteen
// registers to FF00-FF0F; the test then compares all memory and the CC
// output with the model. Every instruction's duration is measured between
// the READY pulses of consecutive instruction words and compared with
// 4 + A, 4 + 2A and 5 + 3A cycles (A = 2 + 3 wait states = 5 cycles per
// transfer). Bus rules are checked on every transfer.
`timescale 1ns / 1ps
module tb_mib16_core;
  import mib16_pkg::*;
  import mib16_ref::*;

  localparam int AW = 16, WAITS = 3, A = 2 + WAITS, PROG_WORDS = 400;

  logic        clk = 1'b0;
  logic        reset, ce, ready, fetch, we, ram_en;
  logic [15:0] d_in, d_out, a_bus;
  cc_t         cc;
  int checks = 0, failures = 0;

  mib16_core dut (.*);
  mib16_ram #(.ADDR_W(AW), .WAIT_STATES(WAITS)) mem (
    .clk, .reset, .ram_en, .we, .fetch, .a_bus, .d_in(d_out), .d_out(d_in), .ready);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  model gen;
  bit   is_start [logic [15:0]];   // addresses where instructions begin
  int   len_at   [logic [15:0]];   // expected cycles of the instruction there
  logic [15:0] end_addr;

  task automatic put(logic [15:0] a, logic [15:0] w);
    gen.wr(a, w);
    mem.mem[a] = w;
  endtask

  task automatic emit(logic [15:0] w, logic [15:0] disp = '0);
    logic [15:0] at;
    int c;
    at = gen.pc;
    put(at, w);
    if (w[15:12] == OP_LD || w[15:12] == OP_ST) put(at + 16'd1, disp);
    c = gen.step();
    is_start[at] = 1;
    len_at[at] = (c == 0) ? 4 + A : (c == 1) ? 4 + 2 * A : 5 + 3 * A;
  endtask

  // A load must not read program words that are not written yet: the model
  // runs while the program is being built, the processor after.
  function automatic bit unsafe_load(logic [15:0] a);
    logic [15:0] m;
    m = a & 16'((1 << AW) - 1);
    return m >= gen.pc && int'(m) < PROG_WORDS + 40;
  endfunction

  task automatic build();
    logic [3:0]  op, r3, r1, r2;
    logic [15:0] ea;
    for (int a = 0; a < (1 << AW); a++) put(a[15:0], 16'($urandom));
    while (int'(gen.pc) < PROG_WORDS) begin
      op = 4'($urandom); r3 = 4'($urandom); r1 = 4'($urandom); r2 = 4'($urandom);
      if (op == OP_LD || op == OP_ST) begin
        ea = (op == OP_ST) ? (16'h8000 | 16'($urandom_range(0, 16'h7E00))) : 16'($urandom);
        if (op == OP_LD && unsafe_load(ea)) ea = 16'h8000 | 16'($urandom);
        emit({op, r3, r1, 4'd0}, ea - gen.regs[r1]);
      end else if (op == OP_LDQ && unsafe_load(gen.regs[r1] + 16'(model::sx4(r2)))) begin
        emit({OP_LD, r3, r1, 4'd0}, (16'h8000 | 16'($urandom)) - gen.regs[r1]);
      end else if (op == OP_STQ) begin
        ea = gen.regs[r1] + 16'(model::sx4(r2));
        if (ea < 16'(PROG_WORDS + 40) || ea >= 16'hFF00)
          emit({OP_ST, r3, r1, 4'd0}, (16'h8000 | 16'($urandom_range(0, 16'h7E00))) - gen.regs[r1]);
        else
          emit({op, r3, r1, r2});
      end else begin
        emit({op, r3, r1, r2});
      end
    end
    // dump all registers (R0 as base, its own value stored first)
    for (int r = 0; r < 16; r++) emit({OP_ST, 4'(r), 4'd0, 4'd0}, 16'hFF00 + 16'(r) - gen.regs[0]);
    end_addr = gen.pc;
    is_start[end_addr] = 1;
  endtask

  int cyc, last_start, n_instr, n_fetch, n_rd, n_wr;
  logic [15:0] last_addr;
  bit finished;

  always @(posedge clk) begin
    if (!reset && !finished) begin
      cyc++;
      if (ram_en && ready) begin
        check(!(fetch && we), "no write with FETCH");
        if (fetch) n_fetch++;
        else if (we) n_wr++;
        else n_rd++;
        if (fetch && is_start.exists(a_bus)) begin
          if (n_instr > 0)
            check(cyc - last_start == len_at[last_addr],
                  $sformatf("instruction at %h took %0d cycles, expected %0d",
                            last_addr, cyc - last_start, len_at[last_addr]));
          n_instr++;
          last_start = cyc;
          last_addr  = a_bus;
          if (a_bus == end_addr) finished = 1;
        end
      end
    end
  end

  initial begin
    cyc = 0; n_instr = 0; n_fetch = 0; n_rd = 0; n_wr = 0; finished = 0; last_start = 0;
    last_addr = '0;
    reset = 1'b1; ce = 1'b1;
    gen = new(AW);
    build();
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    wait (finished);
    #1;
    begin
      int bad;
      bad = 0;
      for (int a = 0; a < (1 << AW); a++)
        if (mem.mem[a] != gen.mem[a]) begin
          if (bad < 5) $display("mem[%h] = %h, expected %h", a, mem.mem[a], gen.mem[a]);
          bad++;
        end
      check(bad == 0, $sformatf("%0d memory words differ", bad));
    end
    check(cc == gen.cc, "CC output");
    check(n_wr >= 16 && n_rd > 0 && n_fetch > n_instr, "reads, writes and displacement fetches");
    $display("instructions %0d, fetches %0d, data reads %0d, writes %0d", n_instr, n_fetch, n_rd, n_wr);
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
