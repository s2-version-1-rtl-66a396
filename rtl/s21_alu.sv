// s21_alu: arithmetic and logic unit of the S21 processor.
//
// Computes y = a op b on 32-bit two's-complement integers for the S21
// operations add, sub, mul, div, and, or, xor, not, eq, ne, lt, le, gt, ge,
// shl and shr. Comparisons return 1 for true and 0 for false, matching the
// architecture's convention (false == 0, true != 0). not returns ~a.
// Choices of this design, where the architecture says nothing:
//   * mul keeps the low 32 bits of the product.
//   * div is signed and truncates toward zero; division by zero gives -1
//     (all ones) and -2^31 / -1 gives -2^31.
//   * comparisons are signed.
//   * not is the bitwise complement ~a, as its defining formula gives.
//   * shl/shr are logical shifts by the full unsigned value of b, so a
//     shift by 32 or more gives 0.
// Purely combinational (the divider is a single combinational block).
module s21_alu
  import s21_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  logic signed [XLEN-1:0] sa, sb;
  logic [XLEN-1:0] quot;

  assign sa = a;
  assign sb = b;

  always_comb begin
    if (b == '0)
      quot = '1;
    else if (a == 32'h8000_0000 && b == '1)
      quot = 32'h8000_0000;
    else
      quot = XLEN'(sa / sb);
  end

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_MUL: y = a * b;
      ALU_DIV: y = quot;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_EQ:  y = XLEN'(a == b);
      ALU_NE:  y = XLEN'(a != b);
      ALU_LT:  y = XLEN'(sa <  sb);
      ALU_LE:  y = XLEN'(sa <= sb);
      ALU_GT:  y = XLEN'(sa >  sb);
      ALU_GE:  y = XLEN'(sa >= sb);
      ALU_SHL: y = a << b;
      ALU_SHR: y = a >> b;
      ALU_NOT: y = ~a;
      default: y = '0;
    endcase
  end

endmodule
