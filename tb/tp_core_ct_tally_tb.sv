// tp_core_ct_tally_tb: runs the core on the inner fragment of gzip's
// ct_tally() routine, the running example of trivialization point
// advancing:
//     lbu   r2, 0(r5)        ; length_code[lc] (r5 holds the address), usually
//                            ; 0 for a length-3 match
//     addiu r3, r2, 257      ; trivial (r2 == 0): result is the immediate
//     addu  r4, r0, r3       ; trivial (r0 == 0): result is r3
//     sll   r2, r4, 2
// The byte load is modelled by a load-immediate with a 3-cycle latency (the
// L1 data-cache hit latency of the evaluated configuration); it returns 0 in
// 90% of the iterations and a small non-zero code otherwise. The fragment
// runs 300 times at the core's default sizes, with and without operand
// prediction. Checks: every commit against a sequential reference; addiu is
// dispatched with a predicted r2 in most iterations once the predictor has
// learned (at least 200 of 300); predictions on the non-zero iterations are
// found wrong and the run still commits the right values; and addu is
// bypassed as issue-trivial. The cycle counts of both runs are printed.
module tp_core_ct_tally_tb;
  import tp_pkg::*;

  localparam int AW = 5;
  localparam int NITER = 300, NDYN = 4 * NITER;

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

  logic [31:0] t_pc [NDYN];
  op_t   t_op [NDYN];
  logic [AW-1:0] t_s0 [NDYN], t_s1 [NDYN], t_d [NDYN];
  logic  t_ie [NDYN];
  word_t t_imm [NDYN], t_val [NDYN];

  task automatic make_trace();
    word_t r2, r3, r4;
    int n = 0;
    r2 = 0; r3 = 0; r4 = 0;
    for (int it = 0; it < NITER; it++) begin
      word_t ld;
      ld = ($urandom_range(0, 9) == 0) ? word_t'($urandom_range(1, 28)) : '0;
      // lbu r2 <- length_code[...]
      t_pc[n] = 32'h100; t_op[n] = OP_LI; t_s0[n] = 5; t_s1[n] = 0; t_ie[n] = 1; t_imm[n] = ld; t_d[n] = 2;
      r2 = ld; t_val[n] = r2; n++;
      // addiu r3, r2, 257
      t_pc[n] = 32'h101; t_op[n] = OP_ADD; t_s0[n] = 2; t_s1[n] = 0; t_ie[n] = 1; t_imm[n] = 257; t_d[n] = 3;
      r3 = r2 + 257; t_val[n] = r3; n++;
      // addu r4, r0, r3
      t_pc[n] = 32'h102; t_op[n] = OP_ADD; t_s0[n] = 0; t_s1[n] = 3; t_ie[n] = 0; t_imm[n] = 0; t_d[n] = 4;
      r4 = r3; t_val[n] = r4; n++;
      // sll r2, r4, 2
      t_pc[n] = 32'h103; t_op[n] = OP_SLL; t_s0[n] = 4; t_s1[n] = 0; t_ie[n] = 1; t_imm[n] = 2; t_d[n] = 2;
      r2 = r4 << 2; t_val[n] = r2; n++;
    end
  endtask

  int c_dspec, c_bad, c_ok, c_itriv;

  task automatic run(input bit predict, output int cycles);
    int sent = 0, got = 0, cyc = 0;
    cfg_bypass_en = 1; cfg_predict_en = predict;
    c_dspec = 0; c_bad = 0; c_ok = 0; c_itriv = 0;
    in_valid = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (got < NDYN && cyc < 50 * NDYN) begin
      in_valid = (sent < NDYN);
      if (sent < NDYN) begin
        in_pc = t_pc[sent]; in_op = t_op[sent]; in_src0 = t_s0[sent]; in_src1 = t_s1[sent];
        in_use_imm = t_ie[sent]; in_imm = t_imm[sent]; in_dst = t_d[sent];
        in_load_lat = (t_op[sent] == OP_LI) ? 8'd3 : 8'd0;
      end
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) sent++;
      c_dspec += int'(ev_dspec);
      c_ok    += int'(ev_pred_ok);
      c_bad   += int'(ev_pred_bad);
      c_itriv += int'(ev_issue_trivial);
      if (commit_valid) begin
        checks++;
        if (commit_pc !== t_pc[got] || commit_dst !== t_d[got] || commit_value !== t_val[got]) begin
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
    if (got != NDYN) begin failures++; $display("FAIL %0d of %0d committed", got, NDYN); end
    cycles = cyc;
    $display("predict=%0d: %0d instructions in %0d cycles, D-SPEC %0d (ok %0d, wrong %0d), issue-trivial %0d",
             predict, got, cyc, c_dspec, c_ok, c_bad, c_itriv);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_orig, cyc_adv;
    in_valid = 0; in_pc = 0; in_op = OP_ADD; in_src0 = 0; in_src1 = 0; in_use_imm = 0;
    in_imm = 0; in_dst = 0; in_load_lat = 0;
    cfg_bypass_en = 1; cfg_predict_en = 0;
    make_trace();
    run(1'b0, cyc_orig);
    checks++; if (c_itriv == 0) begin failures++; $display("FAIL no issue-trivial bypass"); end
    run(1'b1, cyc_adv);
    checks++; if (c_dspec < 200) begin failures++; $display("FAIL only %0d predicted dispatches", c_dspec); end
    checks++; if (c_bad == 0) begin failures++; $display("FAIL no misprediction seen"); end
    checks++; if (c_ok + c_bad != c_dspec) begin failures++; $display("FAIL %0d predictions not resolved", c_dspec - c_ok - c_bad); end
    $display("cycles: original point %0d, advanced %0d", cyc_orig, cyc_adv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
