// mib16_alu: the 16-bit arithmetic and logic unit of MIB-16.
//
// Purely combinational. Operand a comes from the first operand bus (a
// register or the program counter), operand b from the second operand bus (a
// register, the sign-extended 4-bit immediate or the displacement register).
// Arithmetic is two's complement. Besides the twelve arithmetic and logic
// instructions the ALU passes either operand unchanged (used to route the
// program counter to the address register and store data to the data bus)
// and has a "disable" code that drives zero.
//
// Condition codes: Z when the result is zero, N when bit 15 is set, V on
// signed overflow. For add and subtract V is the usual two's complement
// overflow. Multiply returns the low 16 bits of the product and sets V when
// the signed product does not fit in 16 bits (the original only supports
// products that fit). Divide returns the quotient truncated toward zero and
// discards the remainder (the original only supports exact division); a
// divisor of zero gives 0 with V set, and -32768 / -1 gives -32768 with V set.
// Logic operations and passes clear V. These V rules are this
// implementation's choice.
module mib16_alu
  import mib16_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output cc_t              cc
);

  logic signed [WIDTH-1:0]   sa, sb;
  logic signed [2*WIDTH-1:0] prod;
  logic signed [WIDTH-1:0]   quot;
  logic                      v;
  localparam logic [WIDTH-1:0] MOST_NEG = {1'b1, {(WIDTH-1){1'b0}}};

  assign sa   = signed'(a);
  assign sb   = signed'(b);
  assign prod = sa * sb;

  always_comb begin
    quot = '0;
    if (b != '0 && !(a == MOST_NEG && b == '1)) quot = sa / sb;
  end

  always_comb begin
    y = '0;
    v = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y = a + b;
        v = (a[WIDTH-1] == b[WIDTH-1]) && (y[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_SUB: begin
        y = a - b;
        v = (a[WIDTH-1] != b[WIDTH-1]) && (y[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_MUL: begin
        y = prod[WIDTH-1:0];
        v = prod != {{WIDTH{prod[WIDTH-1]}}, prod[WIDTH-1:0]};
      end
      ALU_DIV: begin
        if (b == '0) begin
          y = '0;
          v = 1'b1;
        end else if (a == MOST_NEG && b == '1) begin
          y = MOST_NEG;
          v = 1'b1;
        end else begin
          y = quot;
        end
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_MASK:  y = a & ~b;
      ALU_PASS1: y = a;
      ALU_PASS2: y = b;
      default:   y = '0;  // ALU_DISABLE
    endcase
  end

  assign cc.v = v;
  assign cc.n = y[WIDTH-1];
  assign cc.z = (y == '0);

endmodule
