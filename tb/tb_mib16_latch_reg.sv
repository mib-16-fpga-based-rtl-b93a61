// tb_mib16_latch_reg: the holding register clears on reset, takes d when
// load is high and keeps its value when load is low.
`timescale 1ns / 1ps
module tb_mib16_latch_reg;
  logic        clk = 1'b0;
  logic        reset, load;
  logic [15:0] d, q, exp_q;
  int checks = 0, failures = 0;

  mib16_latch_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    reset = 1'b1; load = 1'b1; d = 16'hFFFF;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != 16'h0000) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0;
    exp_q = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 16'($urandom);
      @(posedge clk);
      if (load) exp_q = d;
      #1;
      checks++;
      if (q != exp_q) begin
        failures++;
        $display("FAIL: q %h expected %h", q, exp_q);
      end
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
