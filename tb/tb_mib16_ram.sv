// tb_mib16_ram: the word memory behind a bus master written here. Random
// reads and writes against a shadow array; checks that READY is a single
// cycle pulse arriving exactly WAIT_STATES + 1 edges after the request is
// seen, and that a read returns the last word written. Run with 2 wait
// states and a 10-bit address (the board configuration), and with none.
`timescale 1ns / 1ps
module tb_mib16_ram;
  logic        clk = 1'b0;
  logic        reset;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Two memories, two configurations, one master each.
  logic        en0, we0, en2, we2;
  logic [15:0] a0, wd0, rd0, a2, wd2, rd2;
  logic        rdy0, rdy2;

  mib16_ram #(.ADDR_W(16), .WAIT_STATES(0)) dut0 (
    .clk, .reset, .ram_en(en0), .we(we0), .fetch(1'b0), .a_bus(a0),
    .d_in(wd0), .d_out(rd0), .ready(rdy0));
  mib16_ram #(.ADDR_W(10), .WAIT_STATES(2)) dut2 (
    .clk, .reset, .ram_en(en2), .we(we2), .fetch(1'b1), .a_bus(a2),
    .d_in(wd2), .d_out(rd2), .ready(rdy2));

  logic [15:0] sh0 [logic [15:0]];
  logic [15:0] sh2 [logic [15:0]];

  task automatic xfer0(logic w, logic [15:0] addr, logic [15:0] data);
    int n;
    @(negedge clk);
    en0 = 1'b1; we0 = w; a0 = addr; wd0 = data; n = 0;
    do begin @(posedge clk); n++; #1; end while (!rdy0 && n < 20);
    check(n == 1, $sformatf("zero-wait READY after %0d edges", n));
    if (!w) check(rd0 == sh0[addr], $sformatf("read %h = %h, expected %h", addr, rd0, sh0[addr]));
    else    sh0[addr] = data;
    @(posedge clk); #1;
    check(!rdy0, "READY lasts one cycle");
    en0 = 1'b0;
  endtask

  task automatic xfer2(logic w, logic [15:0] addr, logic [15:0] data);
    int n;
    logic [15:0] k;
    k = addr & 16'h03FF;
    @(negedge clk);
    en2 = 1'b1; we2 = w; a2 = addr; wd2 = data; n = 0;
    do begin @(posedge clk); n++; #1; end while (!rdy2 && n < 20);
    check(n == 3, $sformatf("2-wait READY after %0d edges", n));
    if (!w) check(rd2 == sh2[k], $sformatf("read %h = %h, expected %h", addr, rd2, sh2[k]));
    else    sh2[k] = data;
    @(negedge clk);
    en2 = 1'b0;
    @(posedge clk); #1;
    check(!rdy2, "READY lasts one cycle");
  endtask

  initial begin
    reset = 1'b1; en0 = 0; we0 = 0; a0 = 0; wd0 = 0; en2 = 0; we2 = 0; a2 = 0; wd2 = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    // write a set of addresses first so every later read has a known value
    for (int i = 0; i < 64; i++) begin
      xfer0(1'b1, 16'(i * 1021), 16'($urandom));
      xfer2(1'b1, 16'(i), 16'($urandom));
    end
    for (int i = 0; i < 600; i++) begin
      logic [15:0] addr0, addr2;
      addr0 = 16'(($urandom_range(0, 63)) * 1021);
      addr2 = 16'($urandom_range(0, 63)) | (16'($urandom_range(0, 63)) << 10);  // aliases
      xfer0(1'($urandom), addr0, 16'($urandom));
      xfer2(1'($urandom), addr2, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
