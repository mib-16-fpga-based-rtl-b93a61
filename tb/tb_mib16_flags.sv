// tb_mib16_flags: the CC register clears on reset, takes the ALU flags only
// when load is high and holds them otherwise.
`timescale 1ns / 1ps
module tb_mib16_flags;
  import mib16_pkg::*;
  logic clk = 1'b0;
  logic reset, load;
  cc_t  cc_in, cc, exp_cc;
  int checks = 0, failures = 0;

  mib16_flags dut (.*);

  always #5 clk = ~clk;

  initial begin
    reset = 1'b1; load = 1'b1; cc_in = 3'b111;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (cc != 3'b000) begin failures++; $display("FAIL: reset"); end
    reset = 1'b0;
    exp_cc = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load  = 1'($urandom);
      cc_in = 3'($urandom);
      @(posedge clk);
      if (load) exp_cc = cc_in;
      #1;
      checks++;
      if (cc != exp_cc) begin
        failures++;
        $display("FAIL: cc %b expected %b", cc, exp_cc);
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
