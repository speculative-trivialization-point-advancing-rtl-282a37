// trivial_detect_tb: self-checking test of the trivial-instruction detection
// unit. Directed cases cover every row of the triviality table (both
// operands, each value, fully versus semi, missing operands); random cases
// use operand values drawn mostly from {0, 1, 0xffffffff}. Each case is
// checked against a reference written in this testbench, and every case the
// unit calls trivial is also checked against the real operation result when
// both operands are known.
module trivial_detect_tb;
  import tp_pkg::*;

  op_t      op;
  word_t    a, b;
  logic     a_av, b_av;
  logic     trivial, fully, out_zero, nto_is_b;
  to_code_t to_code;
  word_t    result;
  int checks = 0, failures = 0;

  trivial_detect dut (.*);

  function automatic word_t real_op(op_t o, word_t x, word_t y);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_MUL: return x * y;
      OP_DIV: return (y == 0) ? '0 : word_t'($signed(x) / $signed(y));
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_SLL: return x << y[4:0];
      OP_SRL: return x >> y[4:0];
      OP_SRA: return word_t'($signed(x) >>> y[4:0]);
      default: return y;
    endcase
  endfunction

  // reference: returns {trivial, fully, code, out_zero, nto_is_b}
  function automatic logic [6:0] ref_tdu(op_t o, word_t x, logic xv, word_t y, logic yv);
    logic zx, zy;
    zx = xv && x == 0;
    zy = yv && y == 0;
    // fully-trivial rows
    if ((o == OP_MUL || o == OP_AND) && zx) return {1'b1, 1'b1, 3'b000, 1'b1, 1'b0};
    if ((o == OP_MUL || o == OP_AND) && zy) return {1'b1, 1'b1, 3'b100, 1'b1, 1'b0};
    if ((o == OP_DIV || o == OP_SLL || o == OP_SRL || o == OP_SRA) && zx)
      return {1'b1, 1'b1, 3'b000, 1'b1, 1'b0};
    if (!(xv && yv)) return '0;
    // semi-trivial rows
    case (o)
      OP_ADD, OP_OR, OP_XOR:
        if (x == 0) return {2'b10, 3'b000, 2'b01};
        else if (y == 0) return {2'b10, 3'b100, 2'b00};
      OP_SUB, OP_SLL, OP_SRL, OP_SRA:
        if (y == 0) return {2'b10, 3'b100, 2'b00};
      OP_MUL:
        if (x == 1) return {2'b10, 3'b001, 2'b01};
        else if (y == 1) return {2'b10, 3'b101, 2'b00};
      OP_DIV:
        if (y == 1) return {2'b10, 3'b101, 2'b00};
      OP_AND:
        if (x == 32'hffff_ffff) return {2'b10, 3'b010, 2'b01};
        else if (y == 32'hffff_ffff) return {2'b10, 3'b110, 2'b00};
      default: ;
    endcase
    return '0;
  endfunction

  task automatic check_case(op_t o, word_t x, logic xv, word_t y, logic yv);
    logic [6:0] exp;
    op = o; a = x; a_av = xv; b = y; b_av = yv;
    #1;
    exp = ref_tdu(o, x, xv, y, yv);
    checks++;
    if ({trivial, fully, to_code, out_zero, nto_is_b} !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h(%b) b=%h(%b): got %b exp %b", o, x, xv, y, yv,
               {trivial, fully, to_code, out_zero, nto_is_b}, exp);
    end
    if (trivial && xv && yv) begin
      checks++;
      if (result !== real_op(o, x, y)) begin
        failures++;
        $display("FAIL result op=%0d a=%h b=%h got %h exp %h", o, x, y, result, real_op(o, x, y));
      end
    end
    if (trivial) begin
      checks++;
      if (to_value(to_code) !== (to_code[2] ? y : x)) begin
        failures++;
        $display("FAIL to_code value op=%0d code=%b", o, to_code);
      end
    end
  endtask

  function automatic word_t pick();
    case ($urandom_range(0, 4))
      0: return 32'h0;
      1: return 32'h1;
      2: return 32'hffff_ffff;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t vals [4] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h1234_5678};
    // exhaustive over the interesting values and availabilities
    for (int o = 0; o <= 10; o++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          for (int av = 0; av < 4; av++)
            check_case(op_t'(o), vals[i], av[0], vals[j], av[1]);
    // a few directed expectations
    check_case(OP_MUL, 32'd7, 1'b0, 32'd0, 1'b1);   // fully via b, a unknown
    checks++; if (!(trivial && fully && out_zero && to_code == 3'b100)) failures++;
    check_case(OP_ADD, 32'd0, 1'b1, 32'd9, 1'b0);   // semi, b unknown: not yet
    checks++; if (trivial) failures++;
    check_case(OP_SUB, 32'd0, 1'b1, 32'd9, 1'b1);   // a==0 is not a TO for sub
    checks++; if (trivial) failures++;
    check_case(OP_DIV, 32'd5, 1'b1, 32'd0, 1'b1);   // divide by zero never trivial
    checks++; if (trivial) failures++;
    for (int n = 0; n < 5000; n++)
      check_case(op_t'($urandom_range(0, 10)), pick(), 1'($urandom), pick(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
