// tb_mib16_pc: the program counter resets to 0, steps by one on each inc
// pulse, holds otherwise, and wraps from FFFF to 0.
`timescale 1ns / 1ps
module tb_mib16_pc;
  logic        clk = 1'b0;
  logic        reset, inc;
  logic [15:0] pc, exp_pc;
  int checks = 0, failures = 0;

  mib16_pc dut (.*);

  always #5 clk = ~clk;

  task automatic step(logic i);
    @(negedge clk);
    inc = i;
    @(posedge clk);
    if (i) exp_pc = exp_pc + 1'b1;
    #1;
    checks++;
    if (pc != exp_pc) begin
      failures++;
      $display("FAIL: pc %h expected %h", pc, exp_pc);
    end
  endtask

  initial begin
    reset = 1'b1; inc = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (pc != 16'h0000) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0;
    exp_pc = 16'h0000;
    for (int i = 0; i < 300; i++) step(1'($urandom));
    // run to the wrap-around
    while (exp_pc != 16'hFFFE) begin
      @(negedge clk); inc = 1'b1; @(posedge clk); exp_pc = exp_pc + 1'b1;
    end
    step(1'b1);
    step(1'b1);
    checks++;
    if (pc != 16'h0000) begin failures++; $display("FAIL: wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
