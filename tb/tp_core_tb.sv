// tp_core_tb: end-to-end test of the trivial-bypassing, operand-predicting
// core at its default sizes (160 physical registers, 64-entry issue window,
// 128-entry reorder buffer, 128-entry predictor).
//
// Workload: loops in the style of a table lookup feeding arithmetic (a load
// whose value is usually the same small constant, then instructions that
// use it). Several random loop bodies of 12 instructions over registers
// r1..r9 are generated; each load PC has a usual value (0, 1, 0xffffffff or
// another number) that it returns most of the time, and a random latency
// per execution. Each body runs for 40 iterations so the predictor can learn.
//
// Every run is checked instruction by instruction against a sequential
// reference model in this testbench (PC, destination and value of each
// commit, in order). The workload runs in three modes: no bypassing,
// bypassing at the original trivialization point, and bypassing with operand
// prediction. Each mechanism must occur at least once in the predicting run:
// decode-trivial remap, issue-trivial bypass, predicted (D-SPEC) dispatch,
// validated and mispredicted predictions, speculative, validation and
// invalidation broadcasts; a dispatch stall must occur in the run without
// bypassing. Both bypassing runs must use the
// functional unit less often than the run without bypassing. Cycle counts of
// the three runs are printed.
module tp_core_tb;
  import tp_pkg::*;

  localparam int NARCH = 32;
  localparam int AW = 5;
  localparam int NBODY = 6, BLEN = 12, NITER = 40;
  localparam int NDYN = NBODY * BLEN * NITER;

  logic clk = 0, rst_n = 0;
  logic cfg_bypass_en, cfg_predict_en;
  logic in_valid, in_ready, in_use_imm;
  logic [31:0] in_pc, commit_pc;
  op_t in_op;
  logic [AW-1:0] in_src0, in_src1, in_dst, commit_dst;
  word_t in_imm, commit_value;
  logic [7:0] in_load_lat;
  logic commit_valid, commit_trivial;
  logic ev_decode_trivial, ev_issue_trivial, ev_dspec, ev_spec_bcast, ev_valid_bcast;
  logic ev_inval_bcast, ev_alu_use, ev_stall;
  logic [6:0] ev_pred_ok, ev_pred_bad;
  int checks = 0, failures = 0;

  tp_core dut (.*);

  always #5 clk = ~clk;

  // dynamic trace
  logic [31:0] t_pc  [NDYN];
  op_t         t_op  [NDYN];
  logic [AW-1:0] t_s0 [NDYN], t_s1 [NDYN], t_d [NDYN];
  logic        t_imm_en [NDYN];
  word_t       t_imm [NDYN];
  logic [7:0]  t_lat [NDYN];
  word_t       t_val [NDYN];    // expected destination value

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

  function automatic word_t usual();
    case ($urandom_range(0, 5))
      0, 1, 2: return 32'h0;
      3: return 32'h1;
      4: return 32'hffff_ffff;
      default: return word_t'($urandom_range(2, 100));
    endcase
  endfunction

  task automatic make_trace();
    op_t         b_op  [BLEN];
    logic [AW-1:0] b_s0 [BLEN], b_s1 [BLEN], b_d [BLEN];
    logic        b_ie  [BLEN];
    word_t       b_imm [BLEN];
    word_t       regs  [NARCH];
    int n = 0;
    for (int r = 0; r < NARCH; r++) regs[r] = '0;
    for (int bdy = 0; bdy < NBODY; bdy++) begin
      for (int k = 0; k < BLEN; k++) begin
        if (k % 4 == 0) begin
          b_op[k] = OP_LI; b_ie[k] = 1; b_imm[k] = usual();
          b_s0[k] = 0; b_s1[k] = 0;
          b_d[k] = AW'($urandom_range(1, 9));
        end else begin
          b_op[k] = op_t'($urandom_range(0, 9));
          b_s0[k] = AW'($urandom_range(0, 9));
          b_s1[k] = AW'($urandom_range(0, 9));
          b_ie[k] = ($urandom_range(0, 3) == 0);
          b_imm[k] = ($urandom_range(0, 1) == 0) ? usual() : word_t'($urandom_range(0, 40));
          b_d[k] = AW'($urandom_range(0, 9));
        end
      end
      for (int it = 0; it < NITER; it++)
        for (int k = 0; k < BLEN; k++) begin
          t_pc[n] = 32'h400 + 32'(bdy * 64 + k);
          t_op[n] = b_op[k];
          t_s0[n] = b_s0[k];
          t_s1[n] = b_s1[k];
          t_d[n]  = b_d[k];
          t_imm_en[n] = b_ie[k];
          t_imm[n] = b_imm[k];
          t_lat[n] = 0;
          if (b_op[k] == OP_LI) begin
            t_lat[n] = 8'($urandom_range(2, 12));
            if ($urandom_range(0, 9) == 0) t_imm[n] = word_t'($urandom_range(0, 3));
          end
          t_val[n] = alu(t_op[n], regs[t_s0[n]], t_imm_en[n] ? t_imm[n] : regs[t_s1[n]]);
          if (t_d[n] != 0) regs[t_d[n]] = t_val[n];
          n++;
        end
    end
  endtask

  // event counters
  int c_dtriv, c_itriv, c_dspec, c_ok, c_bad, c_spec, c_valid, c_inval, c_alu, c_stall;

  task automatic run(input bit bypass, input bit predict, output int cycles);
    int sent = 0, got = 0, cyc = 0;
    cfg_bypass_en = bypass;
    cfg_predict_en = predict;
    c_dtriv = 0; c_itriv = 0; c_dspec = 0; c_ok = 0; c_bad = 0; c_spec = 0;
    c_valid = 0; c_inval = 0; c_alu = 0; c_stall = 0;
    in_valid = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (got < NDYN && cyc < 40 * NDYN) begin
      // drive the instruction stream
      in_valid = (sent < NDYN);
      if (sent < NDYN) begin
        in_pc = t_pc[sent]; in_op = t_op[sent]; in_src0 = t_s0[sent]; in_src1 = t_s1[sent];
        in_use_imm = t_imm_en[sent]; in_imm = t_imm[sent]; in_dst = t_d[sent];
        in_load_lat = t_lat[sent];
      end
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) sent++;
      c_dtriv += int'(ev_decode_trivial);
      c_itriv += int'(ev_issue_trivial);
      c_dspec += int'(ev_dspec);
      c_ok    += int'(ev_pred_ok);
      c_bad   += int'(ev_pred_bad);
      c_spec  += int'(ev_spec_bcast);
      c_valid += int'(ev_valid_bcast);
      c_inval += int'(ev_inval_bcast);
      c_alu   += int'(ev_alu_use);
      c_stall += int'(ev_stall);
      if (commit_valid) begin
        checks++;
        if (commit_pc !== t_pc[got] || commit_dst !== t_d[got] ||
            (t_d[got] != 0 && commit_value !== t_val[got])) begin
          failures++;
          if (failures < 10)
            $display("FAIL commit %0d: pc %h dst %0d val %h, expected pc %h dst %0d val %h",
                     got, commit_pc, commit_dst, commit_value, t_pc[got], t_d[got], t_val[got]);
        end
        got++;
      end
      @(negedge clk);
    end
    checks++;
    if (got != NDYN) begin
      failures++;
      $display("FAIL only %0d of %0d instructions committed", got, NDYN);
    end
    cycles = cyc;
    $display("mode bypass=%0d predict=%0d: %0d instructions in %0d cycles; decode-trivial %0d issue-trivial %0d D-SPEC %0d (ok %0d, wrong %0d) spec %0d valid %0d inval %0d alu %0d stall %0d",
             bypass, predict, got, cyc, c_dtriv, c_itriv, c_dspec, c_ok, c_bad, c_spec, c_valid,
             c_inval, c_alu, c_stall);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_conv, cyc_orig, cyc_adv, alu_conv, alu_orig, alu_adv;
    cfg_bypass_en = 0; cfg_predict_en = 0;
    in_valid = 0; in_pc = 0; in_op = OP_ADD; in_src0 = 0; in_src1 = 0; in_use_imm = 0;
    in_imm = 0; in_dst = 0; in_load_lat = 0;
    make_trace();
    run(1'b0, 1'b0, cyc_conv);
    alu_conv = c_alu;
    need("dispatch stall (conventional)", c_stall);
    run(1'b1, 1'b0, cyc_orig);
    alu_orig = c_alu;
    need("decode-trivial remap (original)", c_dtriv);
    need("issue-trivial bypass (original)", c_itriv);
    run(1'b1, 1'b1, cyc_adv);
    alu_adv = c_alu;
    need("decode-trivial remap", c_dtriv);
    need("issue-trivial bypass", c_itriv);
    need("predicted (D-SPEC) dispatch", c_dspec);
    need("validated prediction", c_ok);
    need("mispredicted operand", c_bad);
    need("speculative broadcast", c_spec);
    need("validation broadcast", c_valid);
    need("invalidation broadcast", c_inval);
    // bypassed instructions must not use the functional unit
    checks++;
    if (!(alu_adv < alu_conv && alu_orig < alu_conv)) begin
      failures++;
      $display("FAIL ALU uses not reduced: %0d / %0d / %0d", alu_conv, alu_orig, alu_adv);
    end
    $display("cycles: conventional %0d, original point %0d, advanced %0d", cyc_conv, cyc_orig, cyc_adv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
