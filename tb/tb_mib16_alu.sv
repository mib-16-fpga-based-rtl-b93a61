// tb_mib16_alu: checks every ALU operation against integer arithmetic.
// Directed corner cases (overflow of add, sub and mul, divide by zero,
// -32768 / -1, zero and negative results) are followed by random operands.
// Expected results and flags come from the reference model in mib16_ref.
`timescale 1ns / 1ps
module tb_mib16_alu;
  import mib16_pkg::*;
  import mib16_ref::*;

  alu_op_e     op;
  logic [15:0] a, b, y;
  cc_t         cc;
  int checks = 0, failures = 0;

  mib16_alu dut (.*);

  // ALU operation -> opcode whose semantics the model knows
  function automatic logic [3:0] opc(alu_op_e o);
    case (o)
      ALU_ADD: return 4'd0;
      ALU_SUB: return 4'd1;
      ALU_MUL: return 4'd2;
      ALU_DIV: return 4'd3;
      ALU_AND: return 4'd8;
      ALU_OR:  return 4'd9;
      ALU_XOR: return 4'd10;
      default: return 4'd11;
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [15:0] ey;
    logic [2:0]  ef;
    op = o; a = x; b = z;
    #1;
    case (o)
      ALU_PASS1:   begin ey = x;  ef = {1'b0, x[15], x == 0}; end
      ALU_PASS2:   begin ey = z;  ef = {1'b0, z[15], z == 0}; end
      ALU_DISABLE: begin ey = '0; ef = 3'b001; end
      default:     model::alu(opc(o), x, z, ey, ef);
    endcase
    checks++;
    if (y !== ey || cc !== ef) begin
      failures++;
      $display("FAIL: %s %h,%h -> %h/%b, expected %h/%b", o.name(), x, z, y, cc, ey, ef);
    end
  endtask

  initial begin
    static alu_op_e ops[11] = '{ALU_DISABLE, ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_AND,
                         ALU_OR, ALU_XOR, ALU_MASK, ALU_PASS1, ALU_PASS2};
    try(ALU_ADD, 16'd30, 16'd3);          // 33
    try(ALU_ADD, 16'h7FFF, 16'd1);        // overflow
    try(ALU_ADD, 16'hFFFF, 16'd1);        // zero, no overflow
    try(ALU_SUB, 16'h8000, 16'd1);        // overflow
    try(ALU_SUB, 16'd3, 16'd5);           // negative
    try(ALU_MUL, 16'h0100, 16'h0100);     // overflow
    try(ALU_MUL, 16'hFFFD, 16'd7);        // -21
    try(ALU_MUL, 16'h00B5, 16'h00B5);     // 32761, fits
    try(ALU_DIV, 16'd30, 16'd3);          // 10
    try(ALU_DIV, 16'd31, 16'd3);          // 10, remainder dropped
    try(ALU_DIV, 16'hFFF9, 16'd2);        // -7 / 2 = -3
    try(ALU_DIV, 16'd5, 16'd0);           // divide by zero
    try(ALU_DIV, 16'h8000, 16'hFFFF);     // -32768 / -1
    try(ALU_MASK, 16'hF0F0, 16'hFF00);    // 00F0
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] x, z;
      x = 16'($urandom);
      z = 16'($urandom);
      if (i % 4 == 1) z = 16'($urandom_range(0, 15)) - 16'd8;  // small operands
      if (i % 4 == 2) x = 16'($urandom_range(0, 400)) - 16'd200;
      try(ops[i % 11], x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
