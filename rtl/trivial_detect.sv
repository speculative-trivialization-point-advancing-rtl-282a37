// trivial_detect: the Trivial Instruction Detection Unit (TDU).
//
// Given an operation and whichever source operands are known so far, it
// decides whether the instruction is trivial, i.e. whether its result is
// zero or equal to one of its operands without computing it. Conditions:
//
//   fully-trivial (result 0, other operand not needed)
//     mult  a==0 or b==0 | div a==0 | and a==0 or b==0 | shifts a==0
//   semi-trivial (result = non-trivializing operand, both needed)
//     add a==0 or b==0 | sub b==0 | mult a==1 or b==1 | div b==1
//     and a==0xffffffff or b==0xffffffff | or/xor a==0 or b==0 | shifts b==0
//
// Fully-trivial cases take priority over semi-trivial ones, and source 0 is
// tested before source 1. The conditions follow the document's table; the
// priority order is this design's own choice. The unit is combinational and
// is used both at decode (operands read from the register file) and in every
// issue-window entry (operands captured from the result bus or predicted).
//
// Outputs: trivial, fully (vs semi), to_code (which operand trivialized and
// its value, see tp_pkg), out_zero (result is zero rather than the other
// operand), nto_is_b (the non-trivializing operand is b) and the result.
module trivial_detect
  import tp_pkg::*;
(
  input  op_t      op,
  input  word_t    a,
  input  logic     a_av,     // a is known
  input  word_t    b,
  input  logic     b_av,     // b is known
  output logic     trivial,
  output logic     fully,
  output to_code_t to_code,
  output logic     out_zero,
  output logic     nto_is_b,
  output word_t    result
);

  localparam word_t ONE = word_t'(1);

  logic a0, b0, a1, b1, am, bm, both;

  always_comb begin
    a0   = a_av && (a == '0);
    b0   = b_av && (b == '0);
    a1   = a_av && (a == ONE);
    b1   = b_av && (b == ONE);
    am   = a_av && (a == '1);
    bm   = b_av && (b == '1);
    both = a_av && b_av;

    trivial  = 1'b0;
    fully    = 1'b0;
    to_code  = 3'b000;
    out_zero = 1'b0;
    nto_is_b = 1'b0;

    // Fully-trivial: the result is zero.
    unique case (op)
      OP_MUL, OP_AND: begin
        if (a0)      begin trivial = 1'b1; fully = 1'b1; to_code = {1'b0, TOV_ZERO}; end
        else if (b0) begin trivial = 1'b1; fully = 1'b1; to_code = {1'b1, TOV_ZERO}; end
      end
      OP_DIV, OP_SLL, OP_SRL, OP_SRA: begin
        if (a0)      begin trivial = 1'b1; fully = 1'b1; to_code = {1'b0, TOV_ZERO}; end
      end
      default: ;
    endcase
    if (fully) out_zero = 1'b1;

    // Semi-trivial: the result is the non-trivializing operand.
    if (!trivial && both) begin
      unique case (op)
        OP_ADD, OP_OR, OP_XOR: begin
          if (a0)      begin trivial = 1'b1; to_code = {1'b0, TOV_ZERO}; nto_is_b = 1'b1; end
          else if (b0) begin trivial = 1'b1; to_code = {1'b1, TOV_ZERO}; end
        end
        OP_SUB, OP_SLL, OP_SRL, OP_SRA: begin
          if (b0)      begin trivial = 1'b1; to_code = {1'b1, TOV_ZERO}; end
        end
        OP_MUL: begin
          if (a1)      begin trivial = 1'b1; to_code = {1'b0, TOV_ONE}; nto_is_b = 1'b1; end
          else if (b1) begin trivial = 1'b1; to_code = {1'b1, TOV_ONE}; end
        end
        OP_DIV: begin
          if (b1)      begin trivial = 1'b1; to_code = {1'b1, TOV_ONE}; end
        end
        OP_AND: begin
          if (am)      begin trivial = 1'b1; to_code = {1'b0, TOV_ONES}; nto_is_b = 1'b1; end
          else if (bm) begin trivial = 1'b1; to_code = {1'b1, TOV_ONES}; end
        end
        default: ;
      endcase
    end

    result = out_zero ? '0 : (nto_is_b ? b : a);
  end

endmodule
