// mib16_ref: instruction-level reference model of the MIB-16 processor, used
// by the testbenches to work out expected register, flag and memory contents
// independently of the RTL. It is a plain class: load memory, then call
// step() once per instruction. Arithmetic is written with 32-bit integers.
package mib16_ref;

  class model;
    logic [15:0] regs [16];
    logic [15:0] mem  [];
    logic [15:0] pc;
    logic [2:0]  cc;      // {V, N, Z}
    int unsigned aw;

    function new(int unsigned addr_w);
      aw  = addr_w;
      mem = new[1 << addr_w];
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
      cc = '0;
    endfunction

    function logic [15:0] rd(logic [15:0] a);
      return mem[a & ((1 << aw) - 1)];
    endfunction

    function void wr(logic [15:0] a, logic [15:0] d);
      mem[a & ((1 << aw) - 1)] = d;
    endfunction

    static function int sx16(logic [15:0] v);
      return v[15] ? int'(v) - 65536 : int'(v);
    endfunction

    static function int sx4(logic [3:0] v);
      return v[3] ? int'(v) - 16 : int'(v);
    endfunction

    // Result and flags of an arithmetic/logic opcode (low 12 opcodes).
    static function void alu(input logic [3:0] op, input logic [15:0] a,
                             input logic [15:0] b, output logic [15:0] y,
                             output logic [2:0] f);
      int sa, sb, r;
      logic v;
      sa = sx16(a);
      sb = sx16(b);
      v  = 0;
      case ({op[3], op[1:0]})
        0: begin r = sa + sb; v = (r > 32767) || (r < -32768); end
        1: begin r = sa - sb; v = (r > 32767) || (r < -32768); end
        2: begin r = sa * sb; v = (r > 32767) || (r < -32768); end
        3: begin
          if (sb == 0)                       begin r = 0;      v = 1; end
          else if (sa == -32768 && sb == -1) begin r = -32768; v = 1; end
          else                                     r = sa / sb;
        end
        4: r = {16'h0, a & b};
        5: r = {16'h0, a | b};
        6: r = {16'h0, a ^ b};
        default: r = {16'h0, a & ~b};
      endcase
      y = r[15:0];
      f = {v, y[15], y == 16'h0};
    endfunction

    // Executes one instruction; returns its class:
    // 0 arithmetic/logic, 1 quick load/store, 2 long load/store.
    function int step();
      logic [15:0] w, b, y, ea, disp;
      logic [3:0]  op, r3, r1, r2;
      logic [2:0]  f;
      w  = rd(pc);
      pc = pc + 1;
      op = w[15:12]; r3 = w[11:8]; r1 = w[7:4]; r2 = w[3:0];
      if (op < 4'd12) begin
        b = op[2] ? 16'(sx4(r2)) : regs[r2];
        alu(op, regs[r1], b, y, f);
        regs[r3] = y;
        cc = f;
        return 0;
      end
      if (op[1] == 1'b0) begin  // Ld / St: displacement word follows
        disp = rd(pc);
        pc   = pc + 1;
      end else begin
        disp = 16'(sx4(r2));
      end
      ea = regs[r1] + disp;
      if (op[0]) wr(ea, regs[r3]);
      else       regs[r3] = rd(ea);
      return op[1] ? 1 : 2;
    endfunction
  endclass

endpackage
