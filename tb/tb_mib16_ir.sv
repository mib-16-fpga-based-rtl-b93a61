// tb_mib16_ir: the instruction register captures a word only when load is
// high and splits it into opcode, r3, r1 and r2/i8 with the immediate
// sign-extended. Includes the ADD example word 0000 1000 0001 0010.
`timescale 1ns / 1ps
module tb_mib16_ir;
  import mib16_pkg::*;
  logic        clk = 1'b0;
  logic        reset, load;
  logic [15:0] d, imm, held;
  instr_t      ir;
  int checks = 0, failures = 0;

  mib16_ir dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    reset = 1'b1; load = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(ir == 16'h0000, "reset");
    @(negedge clk); load = 1'b1; d = 16'h0812;
    @(posedge clk); #1;
    check(ir.op == OP_ADD && ir.r3 == 4'd8 && ir.r1 == 4'd1 && ir.r2 == 4'd2,
          "ADD R8, R1, R2 fields");
    held = 16'h0812;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 16'($urandom);
      @(posedge clk);
      if (load) held = d;
      #1;
      check(ir.op == opcode_e'(held[15:12]), "opcode field");
      check(ir.r3 == held[11:8] && ir.r1 == held[7:4] && ir.r2 == held[3:0], "register fields");
      check(imm == ((held[3] ? 16'hFFF0 : 16'h0000) | 16'(held[3:0])), "immediate sign extension");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
