// issue_window_tb: self-checking test of the issue window.
//
// The testbench plays the rest of the core around the window: it dispatches a
// random dataflow program (each instruction writes its own tag; sources are
// earlier tags or immediates, values biased toward 0, 1 and 0xffffffff),
// holds load-immediate instructions back for a random latency, computes the
// result bus from the issue outputs the way the core does (ALU or
// trivial bypass), follows the separate validation bus and, for some instructions, supplies a
// predicted trivializing operand that may be right or wrong.
// Checks: every tag gets exactly one final (non-speculative) broadcast and
// its value equals the value computed in program order by this testbench;
// nothing speculative is broadcast for a tag after its final value; the
// window drains; predictions are counted as validated or mispredicted
// exactly as the testbench expects; and speculative, validation and
// invalidation broadcasts and issue-trivial bypasses all occur.
module issue_window_tb;
  import tp_pkg::*;
  localparam int SIZE = 8, NPHYS = 64, ROB_SIZE = 64;
  localparam int PW = $clog2(NPHYS), RW = $clog2(ROB_SIZE), CW = $clog2(SIZE + 1);
  localparam int NI = NPHYS - 1;     // instructions per program, tags 1..NI

  logic clk = 0, rst_n = 0;
  logic full, disp_en, disp_has_dst, triv_en;
  op_t disp_op, iss_op;
  word_t disp_data [2];
  logic [PW-1:0] disp_tag [2];
  logic disp_r [2], disp_p [2], disp_pred [2];
  logic [PW-1:0] disp_out_tag, iss_out_tag, cdb_tag;
  logic [RW-1:0] disp_rob, iss_rob;
  logic [7:0] disp_delay;
  logic iss_valid, iss_trivial, iss_out_zero, iss_any_p, iss_sbcast, iss_has_dst;
  word_t iss_a, iss_b, iss_triv_result, iss_last, cdb_data;
  to_code_t iss_to_code;
  logic cdb_valid, cdb_has_dst;
  cdb_kind_t cdb_kind;
  logic val_valid, val_has_dst, val_trivial, val_out_zero;
  logic [PW-1:0] val_tag;
  word_t val_data;
  logic [RW-1:0] val_rob;
  to_code_t val_to_code;
  logic [CW-1:0] n_pred_ok, n_pred_bad, occupancy;
  int checks = 0, failures = 0;

  issue_window #(.SIZE(SIZE), .NPHYS(NPHYS), .ROB_SIZE(ROB_SIZE)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t alu(op_t o, word_t x, word_t y);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_MUL: return x * y;
      OP_DIV: return (y == 0) ? '0 : (x == 32'h8000_0000 && y == '1) ? x : word_t'($signed(x) / $signed(y));
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_SLL: return x << y[4:0];
      OP_SRL: return x >> y[4:0];
      OP_SRA: return word_t'($signed(x) >>> y[4:0]);
      default: return y;
    endcase
  endfunction

  // is v at operand position pos a trivializing operand of o?
  function automatic bit is_to(op_t o, int pos, word_t v);
    if (v == 0) begin
      if (pos == 0) return o inside {OP_MUL, OP_AND, OP_DIV, OP_SLL, OP_SRL, OP_SRA, OP_ADD, OP_OR, OP_XOR};
      return o inside {OP_MUL, OP_AND, OP_ADD, OP_OR, OP_XOR, OP_SUB, OP_SLL, OP_SRL, OP_SRA};
    end
    if (v == 1) return (o == OP_MUL) || (pos == 1 && o == OP_DIV);
    if (v == '1) return o == OP_AND;
    return 0;
  endfunction

  // result bus, computed as the core computes it
  always_comb begin
    cdb_valid   = iss_valid;
    cdb_has_dst = iss_has_dst;
    cdb_tag     = iss_out_tag;
    if (iss_trivial)       cdb_data = iss_triv_result;
    else                   cdb_data = alu(iss_op, iss_a, iss_b);
    if (iss_any_p)         cdb_kind = CDB_SPEC;
    else if (iss_sbcast)   cdb_kind = (cdb_data == iss_last) ? CDB_VALID : CDB_INVAL;
    else                   cdb_kind = CDB_NORMAL;
  end

  // program
  op_t   p_op  [NI+1];
  int    p_src [NI+1][2];     // tag, or -1 for immediate
  word_t p_imm [NI+1][2];
  word_t gold  [NI+1];
  // tag state seen on the bus
  bit    t_ready [NI+1];
  bit    t_spec  [NI+1];
  bit    t_final [NI+1];
  word_t t_data  [NI+1];
  int exp_ok, exp_bad, got_ok, got_bad;
  int n_spec, n_valid, n_inval, n_itriv, n_dspec;

  function automatic word_t pickv();
    case ($urandom_range(0, 5))
      0, 1: return 32'h0;
      2: return 32'h1;
      3: return 32'hffff_ffff;
      default: return word_t'($urandom_range(2, 9));
    endcase
  endfunction

  task automatic make_program();
    for (int i = 1; i <= NI; i++) begin
      if (i <= 3 || $urandom_range(0, 3) == 0) begin
        p_op[i] = OP_LI;
        p_src[i][0] = -1; p_imm[i][0] = 0;
        p_src[i][1] = -1; p_imm[i][1] = pickv();
      end else begin
        p_op[i] = op_t'($urandom_range(0, 9));
        for (int s = 0; s < 2; s++) begin
          if ($urandom_range(0, 4) == 0) begin
            p_src[i][s] = -1; p_imm[i][s] = pickv();
          end else begin
            p_src[i][s] = $urandom_range((i > 6) ? i - 6 : 1, i - 1);
            p_imm[i][s] = 0;
          end
        end
      end
      gold[i] = alu(p_op[i], (p_src[i][0] < 0) ? p_imm[i][0] : gold[p_src[i][0]],
                             (p_src[i][1] < 0) ? p_imm[i][1] : gold[p_src[i][1]]);
    end
  endtask

  task automatic run_program();
    int i = 1, guard = 0;
    for (int t = 0; t <= NI; t++) begin t_ready[t] = 0; t_spec[t] = 0; t_final[t] = 0; t_data[t] = 0; end
    make_program();
    rst_n = 0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (guard < 5000) begin
      guard++;
      @(negedge clk);
      #1;
      disp_en = 0;
      if (i <= NI && !full) begin
        int ps;
        disp_en = 1;
        disp_op = p_op[i];
        disp_out_tag = PW'(i);
        disp_has_dst = 1;
        disp_rob = RW'(i);
        disp_delay = (p_op[i] == OP_LI) ? 8'($urandom_range(0, 12)) : 8'd0;
        for (int s = 0; s < 2; s++) begin
          disp_pred[s] = 0;
          if (p_src[i][s] < 0) begin
            disp_tag[s] = '0; disp_r[s] = 1; disp_p[s] = 0; disp_data[s] = p_imm[i][s];
          end else begin
            int t = p_src[i][s];
            disp_tag[s] = PW'(t);
            disp_r[s] = t_ready[t]; disp_p[s] = t_ready[t] && t_spec[t]; disp_data[s] = t_data[t];
            if (cdb_valid && cdb_tag == PW'(t)) begin
              disp_r[s] = 1; disp_p[s] = (cdb_kind == CDB_SPEC); disp_data[s] = cdb_data;
            end else if (val_valid && val_tag == PW'(t)) begin
              disp_r[s] = 1; disp_p[s] = 0; disp_data[s] = val_data;
            end
          end
        end
        // predicted trivializing operand for a not-yet-final source
        ps = $urandom_range(0, 1);
        if (p_src[i][ps] >= 0 && !(disp_r[ps] && !disp_p[ps]) && $urandom_range(0, 1) == 1) begin
          word_t v;
          v = ($urandom_range(0, 2) == 0) ? pickv() : gold[p_src[i][ps]];
          if (is_to(p_op[i], ps, v)) begin
            disp_pred[ps] = 1; disp_r[ps] = 1; disp_p[ps] = 1; disp_data[ps] = v;
            n_dspec++;
            if (v == gold[p_src[i][ps]]) exp_ok++; else exp_bad++;
          end
        end
        i++;
      end
      @(posedge clk);
      got_ok += int'(n_pred_ok);
      got_bad += int'(n_pred_bad);
      if (cdb_valid) begin
        int t = int'(cdb_tag);
        if (cdb_kind == CDB_SPEC) n_spec++;
        if (cdb_kind == CDB_VALID) n_valid++;
        if (cdb_kind == CDB_INVAL) n_inval++;
        if (iss_trivial && !iss_any_p) n_itriv++;
        checks++;
        if (t_final[t]) begin
          failures++;
          $display("FAIL tag %0d broadcast again after its final value", t);
        end
        if (cdb_kind != CDB_SPEC) begin
          checks++;
          if (cdb_data !== gold[t]) begin
            failures++;
            if (failures < 10) $display("FAIL tag %0d final %h expected %h (kind %0d)", t, cdb_data, gold[t], cdb_kind);
          end
          t_final[t] = 1;
        end
        t_ready[t] = 1; t_spec[t] = (cdb_kind == CDB_SPEC); t_data[t] = cdb_data;
      end
      if (val_valid) begin
        int t = int'(val_tag);
        n_valid++;
        checks += 4;
        if (cdb_valid && cdb_tag == val_tag) begin
          failures++;
          $display("FAIL tag %0d on both buses in one cycle", t);
        end
        if (t_final[t]) begin
          failures++;
          $display("FAIL tag %0d validated after its final value", t);
        end
        if (val_data !== gold[t] || val_rob != RW'(t)) begin
          failures++;
          if (failures < 10) $display("FAIL tag %0d validation %h expected %h", t, val_data, gold[t]);
        end
        if (!t_spec[t] || t_data[t] != val_data) begin
          failures++;
          $display("FAIL tag %0d validation without a matching speculative value", t);
        end
        t_final[t] = 1;
        t_ready[t] = 1; t_spec[t] = 0; t_data[t] = val_data;
      end
      if (i > NI && occupancy == 0) break;
    end
    @(negedge clk);
    disp_en = 0;
    for (int t = 1; t <= NI; t++) begin
      checks++;
      if (!t_final[t]) begin
        failures++;
        $display("FAIL tag %0d never final", t);
      end
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_ok = 0; exp_bad = 0; got_ok = 0; got_bad = 0;
    n_spec = 0; n_valid = 0; n_inval = 0; n_itriv = 0; n_dspec = 0;
    triv_en = 1;
    disp_en = 0; disp_op = OP_ADD; disp_out_tag = '0; disp_has_dst = 0; disp_rob = '0; disp_delay = '0;
    for (int s = 0; s < 2; s++) begin
      disp_data[s] = '0; disp_tag[s] = '0; disp_r[s] = 0; disp_p[s] = 0; disp_pred[s] = 0;
    end
    repeat (2) @(posedge clk);
    for (int r = 0; r < 60; r++) run_program();
    checks++; if (got_ok != exp_ok) begin failures++; $display("FAIL pred ok %0d exp %0d", got_ok, exp_ok); end
    checks++; if (got_bad != exp_bad) begin failures++; $display("FAIL pred bad %0d exp %0d", got_bad, exp_bad); end
    checks++; if (exp_ok == 0 || exp_bad == 0) failures++;
    checks++; if (n_spec == 0) begin failures++; $display("FAIL no speculative broadcast"); end
    checks++; if (n_valid == 0) begin failures++; $display("FAIL no validation"); end
    checks++; if (n_inval == 0) begin failures++; $display("FAIL no invalidation"); end
    checks++; if (n_itriv == 0) begin failures++; $display("FAIL no issue-trivial bypass"); end
    $display("dspec=%0d ok=%0d bad=%0d spec=%0d valid=%0d inval=%0d issue_trivial=%0d",
             n_dspec, got_ok, got_bad, n_spec, n_valid, n_inval, n_itriv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
