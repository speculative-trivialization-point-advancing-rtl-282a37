// tp_pkg: types and constants shared by the trivial-instruction bypassing
// core. It defines the operation set (the operations whose trivial cases are
// tabulated for the design plus a load-immediate stand-in for loads), the
// 3-bit trivializing-operand (TO) code, the result-bus record and the
// result-bus kinds used for speculative results, validations and
// invalidations.
//
// TO code: bit 2 selects the source operand (0 = source 0, 1 = source 1),
// bits 1:0 select the value (0 = 0x00000000, 1 = 0x00000001,
// 2 = 0xffffffff, 3 = unused). Six codes are legal, matching the six
// operand/value combinations a trivializing operand can take.
package tp_pkg;

  parameter int XLEN = 32;

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_MUL = 4'd2,
    OP_DIV = 4'd3,
    OP_AND = 4'd4,
    OP_OR  = 4'd5,
    OP_XOR = 4'd6,
    OP_SLL = 4'd7,
    OP_SRL = 4'd8,
    OP_SRA = 4'd9,
    OP_LI  = 4'd10   // load-immediate: result is the immediate (stands in for a load)
  } op_t;

  // Trivializing-operand code, see the header.
  typedef logic [2:0] to_code_t;

  localparam logic [1:0] TOV_ZERO = 2'd0;
  localparam logic [1:0] TOV_ONE  = 2'd1;
  localparam logic [1:0] TOV_ONES = 2'd2;

  // Value carried by a TO code.
  function automatic word_t to_value(to_code_t c);
    unique case (c[1:0])
      TOV_ZERO: to_value = '0;
      TOV_ONE:  to_value = word_t'(1);
      default:  to_value = '1;
    endcase
  endfunction

  function automatic logic to_code_legal(to_code_t c);
    return c[1:0] != 2'd3;
  endfunction

  // Kind of a result-bus broadcast.
  //   CDB_NORMAL : first and final result of a non-speculative instruction
  //   CDB_SPEC   : result computed from at least one speculated operand
  //   CDB_VALID  : earlier speculative result confirmed (data repeated)
  //   CDB_INVAL  : earlier speculative result was wrong; data is the correct value
  typedef enum logic [1:0] {
    CDB_NORMAL = 2'd0,
    CDB_SPEC   = 2'd1,
    CDB_VALID  = 2'd2,
    CDB_INVAL  = 2'd3
  } cdb_kind_t;

endpackage
