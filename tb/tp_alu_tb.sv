// tp_alu_tb: self-checking test of the functional unit. Random and corner
// operands for every operation are compared with results computed in this
// testbench from signed/unsigned integer arithmetic.
module tp_alu_tb;
  import tp_pkg::*;

  op_t   op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  tp_alu dut (.*);

  function automatic word_t model(op_t o, word_t x, word_t z);
    longint sx, sz;
    sx = longint'($signed(x));
    sz = longint'($signed(z));
    case (o)
      OP_ADD: return word_t'(longint'(x) + longint'(z));
      OP_SUB: return word_t'(longint'(x) - longint'(z));
      OP_MUL: return word_t'(longint'(x) * longint'(z));
      OP_DIV: begin
        if (z == 0) return '0;
        if (sx == -2147483648 && sz == -1) return x;
        return word_t'(sx / sz);
      end
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_SLL: return word_t'({32'b0, x} << (z % 32));
      OP_SRL: return word_t'({32'b0, x} >> (z % 32));
      OP_SRA: return word_t'(sx >>> (z % 32));
      OP_LI:  return z;
      default: return '0;
    endcase
  endfunction

  function automatic word_t pick();
    case ($urandom_range(0, 5))
      0: return 32'h0;
      1: return 32'h1;
      2: return 32'hffff_ffff;
      3: return 32'h8000_0000;
      4: return word_t'($urandom_range(0, 40));
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
    for (int n = 0; n < 20000; n++) begin
      op = op_t'($urandom_range(0, 10));
      a  = pick();
      b  = pick();
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
