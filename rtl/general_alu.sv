// general_alu: general-purpose instruction unit of the ALU.
//
// Combinational. Computes y from the operands a and b for the general
// instructions: add, subtract, multiply (low WIDTH bits of the product),
// divide (all ones when b is 0), and, or, xor, logical shifts by b (0 once
// b >= WIDTH), and rotates by b mod WIDTH. LOAD passes a through so that
// the fetched word reaches the temporary register. Other operation codes give
// 0. The list of operations follows the instruction-set table; the divide by
// zero value, the shift amount taken from b and the rotate modulo the word
// width are this design's own choices.
module general_alu
  import crypto_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] rot;    // rotate amount, b mod WIDTH
  logic [2*WIDTH-1:0] dbl;  // a concatenated with itself for rotates

  always_comb begin
    rot = b % WIDTH'(WIDTH);
    dbl = {a, a};
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = a * b;
      OP_DIV:  y = (b == '0) ? '1 : a / b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SHR:  y = a >> b;
      OP_SHL:  y = a << b;
      OP_ROR:  y = WIDTH'(dbl >> rot);
      OP_ROL:  y = WIDTH'((dbl << rot) >> WIDTH);
      OP_LOAD: y = a;
      default: y = '0;
    endcase
  end

endmodule
