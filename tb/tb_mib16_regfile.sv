// tb_mib16_regfile: random writes and reads against a shadow array; checks
// reset to zero, that both read ports see any register, and that a write
// only lands when we is high.
`timescale 1ns / 1ps
module tb_mib16_regfile;
  logic        clk = 1'b0;
  logic        reset, we;
  logic [3:0]  a1, a2, a3;
  logic [15:0] d3, q1, q2;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  mib16_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    reset = 1'b1; we = 1'b0; a1 = '0; a2 = '0; a3 = '0; d3 = '0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int r = 0; r < 16; r++) begin
      a1 = 4'(r); a2 = 4'(15 - r); #1;
      check(q1 == 0 && q2 == 0, "reset clears registers");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom);
      a3 = 4'($urandom);
      d3 = 16'($urandom);
      a1 = 4'($urandom);
      a2 = 4'($urandom);
      #1;
      check(q1 == shadow[a1], $sformatf("q1 R%0d = %h, expected %h", a1, q1, shadow[a1]));
      check(q2 == shadow[a2], $sformatf("q2 R%0d = %h, expected %h", a2, q2, shadow[a2]));
      @(posedge clk);
      if (we) shadow[a3] = d3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
