// tp_alu: single-cycle functional unit for the operation set of the core
// (add, sub, mult, div, and, or, xor, logical and arithmetic shifts, and a
// load-immediate pass-through of operand b). Purely combinational: the
// result is valid in the same cycle as the operands.
//
// The operations are the ones whose trivial cases the design bypasses; how
// the unit computes them is this design's own choice. Multiplication keeps
// the low 32 bits of the product; division is signed and truncates toward
// zero; shifts use the low 5 bits of b as the amount (MIPS-like). A divide
// by zero returns zero (so 0/0 agrees with the fully-trivial bypass of a
// zero dividend) and the most-negative / -1 overflow case returns the
// dividend.
module tp_alu
  import tp_pkg::*;
(
  input  op_t   op,
  input  word_t a,
  input  word_t b,
  output word_t y
);

  always_comb begin
    unique case (op)
      OP_ADD: y = a + b;
      OP_SUB: y = a - b;
      OP_MUL: y = a * b;
      OP_DIV: begin
        if (b == '0)
          y = '0;
        else if (a == {1'b1, {(XLEN-1){1'b0}}} && b == '1)
          y = a;
        else
          y = word_t'($signed(a) / $signed(b));
      end
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_SLL: y = a << b[4:0];
      OP_SRL: y = a >> b[4:0];
      OP_SRA: y = word_t'($signed(a) >>> b[4:0]);
      OP_LI:  y = b;
      default: y = '0;
    endcase
  end

endmodule
