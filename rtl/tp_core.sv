// tp_core: out-of-order core that bypasses trivial instructions and advances
// their trivialization point by predicting trivializing operands.
//
// A trivial instruction is one whose result is zero or one of its operands
// (x+0, x*1, x*0, x&0, ...). The earliest moment such an instruction can be
// recognised is when its opcode and its trivializing operand (TO) are known.
// This core recognises and skips trivial instructions at three points:
//   * decode-trivial: the operands are final in the register file at decode;
//     the destination is remapped in the rename table onto the physical
//     register of the non-trivializing operand or onto the zero register,
//     and the instruction completes without entering the issue window;
//   * issue-trivial: the trivializing operand arrives on the result bus while
//     the instruction waits in the issue window; it takes an issue slot but
//     its result is selected from its operands instead of the ALU;
//   * predicted (D-SPEC): a context predictor, looked up by PC alongside
//     fetch, supplies the TO before it is produced. The instruction enters
//     the issue window with that operand marked predicted (P set) and
//     broadcasts a speculative result as soon as it is trivial under the
//     prediction. Dependants (I-SPEC) compute speculatively with P set.
//     When the real TO arrives the prediction is validated (the instruction
//     and then its dependants send tag-plus-validation messages on a
//     separate validation bus, nothing re-executes) or found wrong (the
//     instruction and only the instructions whose inputs changed re-execute
//     and broadcast an invalidation carrying the correct value).
// A reorder-buffer entry completes only on a final broadcast, so nothing
// commits speculatively. At commit the predictor is trained with whether the
// instruction was trivial, which operand and value made it so and whether its
// result was zero.
//
// Interface: a decoded instruction stream with a valid/ready handshake (PC in
// instruction units, operation, two architectural sources, an optional
// immediate replacing source 1, destination, 0 = none, and for a
// load-immediate the number of cycles until its value is available
// (the load-immediate carries its own latency, standing in for the memory
// system); a commit stream giving PC, destination, value and triviality of
// each retired instruction in program order; two mode inputs (trivial bypassing, operand prediction); and
// one-cycle event pulses for statistics.
//
// Timing: one instruction is renamed and dispatched per cycle, one issues per
// cycle into a single-cycle functional unit whose result is broadcast in the
// same cycle, one validation is sent per cycle, and one commits per cycle.
// A dependant can issue the cycle after its producer. The detection points, the rename remap, the R/P entry fields,
// the D-SPEC/I-SPEC procedure, no speculative commit, commit-time predictor
// training and the buffer and predictor sizes follow the document. The single
// dispatch/issue/commit width, the single result bus beside one validation
// bus, the one-cycle pipeline and the load-immediate stand-in for memory loads are this design's own.
module tp_core
  import tp_pkg::*;
#(
  parameter int NARCH      = 32,
  parameter int NPHYS      = 160,
  parameter int IW_SIZE    = 64,
  parameter int ROB_SIZE   = 128,
  parameter int VP_ENTRIES = 128,
  localparam int AW = $clog2(NARCH),
  localparam int PW = $clog2(NPHYS),
  localparam int RW = $clog2(ROB_SIZE),
  localparam int CW = $clog2(IW_SIZE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // mode
  input  logic          cfg_bypass_en,    // detect and bypass trivial instructions
  input  logic          cfg_predict_en,   // predict trivializing operands
  // instruction stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   in_pc,
  input  op_t           in_op,
  input  logic [AW-1:0] in_src0,
  input  logic [AW-1:0] in_src1,
  input  logic          in_use_imm,
  input  word_t         in_imm,
  input  logic [7:0]    in_load_lat,      // load-immediate only: cycles until its value is available
  input  logic [AW-1:0] in_dst,
  // commit stream
  output logic          commit_valid,
  output logic [31:0]   commit_pc,
  output logic [AW-1:0] commit_dst,
  output word_t         commit_value,
  output logic          commit_trivial,
  // event pulses
  output logic          ev_decode_trivial,
  output logic          ev_issue_trivial,
  output logic          ev_dspec,
  output logic [CW-1:0] ev_pred_ok,
  output logic [CW-1:0] ev_pred_bad,
  output logic          ev_spec_bcast,
  output logic          ev_valid_bcast,
  output logic          ev_inval_bcast,
  output logic          ev_alu_use,
  output logic          ev_stall
);

  // ---------------- result bus ----------------
  logic          cdb_valid, cdb_has_dst;
  logic [PW-1:0] cdb_tag;
  word_t         cdb_data;
  cdb_kind_t     cdb_kind;
  logic          cdb_final;
  // validation bus
  logic          vb_valid, vb_has_dst, vb_trivial, vb_out_zero;
  logic [PW-1:0] vb_tag;
  word_t         vb_data;
  logic [RW-1:0] vb_rob;
  to_code_t      vb_to_code;

  // ---------------- value predictor ----------------
  logic     lk_hit, lk_predict, lk_out_zero;
  to_code_t lk_to_code;
  logic     cm_valid, cm_has_dst, cm_trivial, cm_out_zero;
  logic [31:0] cm_pc;
  logic [AW-1:0] cm_dst_arch;
  logic [PW-1:0] cm_dst_phys, cm_prev_phys;
  to_code_t cm_to_code;

  context_predictor #(.ENTRIES(VP_ENTRIES)) u_vp (
    .clk, .rst_n,
    .lk_pc       (in_pc),
    .lk_hit      (lk_hit),
    .lk_predict  (lk_predict),
    .lk_to_code  (lk_to_code),
    .lk_out_zero (lk_out_zero),
    .up_valid    (cm_valid),
    .up_pc       (cm_pc),
    .up_trivial  (cm_trivial),
    .up_to_code  (cm_to_code),
    .up_out_zero (cm_out_zero)
  );

  // ---------------- rename ----------------
  logic [PW-1:0] rat_pa, rat_pb, rat_prev;
  logic          rat_sa, rat_sb;
  logic          rat_wr;
  logic [PW-1:0] rat_wr_phys;
  logic          rat_wr_spec;

  rename_table #(.NARCH(NARCH), .NPHYS(NPHYS)) u_rat (
    .clk, .rst_n,
    .rd_a_arch    (in_src0),
    .rd_a_phys    (rat_pa),
    .rd_a_spec    (rat_sa),
    .rd_b_arch    (in_src1),
    .rd_b_phys    (rat_pb),
    .rd_b_spec    (rat_sb),
    .wr_en        (rat_wr),
    .wr_arch      (in_dst),
    .wr_phys      (rat_wr_phys),
    .wr_spec      (rat_wr_spec),
    .wr_prev_phys (rat_prev),
    .clr_en       (cdb_valid && cdb_has_dst && cdb_final),
    .clr_phys     (cdb_tag),
    .clr2_en      (vb_valid && vb_has_dst),
    .clr2_phys    (vb_tag)
  );

  // ---------------- physical registers ----------------
  word_t         prf_a, prf_b, prf_c;
  logic          prf_ra, prf_rb;
  logic          free_valid;
  logic [PW-1:0] free_idx;
  logic          alloc_en, share_en;
  logic [PW-1:0] share_idx;

  phys_regfile #(.NARCH(NARCH), .NPHYS(NPHYS)) u_prf (
    .clk, .rst_n,
    .rd_a_idx    (rat_pa),
    .rd_a_data   (prf_a),
    .rd_a_ready  (prf_ra),
    .rd_b_idx    (rat_pb),
    .rd_b_data   (prf_b),
    .rd_b_ready  (prf_rb),
    .rd_c_idx    (cm_dst_phys),
    .rd_c_data   (prf_c),
    .wb_en       (cdb_valid && cdb_has_dst),
    .wb_idx      (cdb_tag),
    .wb_data     (cdb_data),
    .free_valid  (free_valid),
    .free_idx    (free_idx),
    .alloc_en    (alloc_en),
    .share_en    (share_en),
    .share_idx   (share_idx),
    .release_en  (cm_valid && cm_has_dst),
    .release_idx (cm_prev_phys)
  );

  // ---------------- operand gathering at dispatch ----------------
  logic [PW-1:0] s_tag   [2];
  word_t         s_data  [2];
  logic          s_ready [2];   // value present (final or speculative)
  logic          s_spec  [2];   // value (present or to come) is speculative
  logic          s_final [2];
  logic          s_isreg [2];

  always_comb begin
    s_tag[0]   = rat_pa;
    s_data[0]  = prf_a;
    s_ready[0] = prf_ra;
    s_spec[0]  = rat_sa;
    s_isreg[0] = 1'b1;
    s_tag[1]   = rat_pb;
    s_data[1]  = prf_b;
    s_ready[1] = prf_rb;
    s_spec[1]  = rat_sb;
    s_isreg[1] = !in_use_imm;
    if (in_use_imm) begin
      s_tag[1]   = '0;
      s_data[1]  = in_imm;
      s_ready[1] = 1'b1;
      s_spec[1]  = 1'b0;
    end
    for (int s = 0; s < 2; s++) begin
      // forward this cycle's broadcast
      if (s_isreg[s] && cdb_valid && cdb_has_dst && cdb_tag == s_tag[s] && s_tag[s] != '0) begin
        s_data[s]  = cdb_data;
        s_ready[s] = 1'b1;
        s_spec[s]  = (cdb_kind == CDB_SPEC);
      end else if (s_isreg[s] && vb_valid && vb_has_dst && vb_tag == s_tag[s] && s_tag[s] != '0) begin
        s_data[s]  = vb_data;
        s_ready[s] = 1'b1;
        s_spec[s]  = 1'b0;
      end
      s_final[s] = s_ready[s] && !s_spec[s];
    end
  end

  // decode-stage trivial detection on final operands
  logic     d_triv, d_fully, d_oz, d_ntob;
  to_code_t d_code;
  word_t    d_res;

  trivial_detect u_tdu_decode (
    .op      (in_op),
    .a       (s_data[0]),
    .a_av    (s_final[0]),
    .b       (s_data[1]),
    .b_av    (s_final[1]),
    .trivial (d_triv),
    .fully   (d_fully),
    .to_code (d_code),
    .out_zero(d_oz),
    .nto_is_b(d_ntob),
    .result  (d_res)
  );

  // prediction check: is the predicted TO trivializing for this instruction?
  logic     p_sel;                 // predicted operand index
  word_t    p_val;
  logic     p_triv, p_fully, p_oz, p_ntob;
  to_code_t p_code;
  word_t    p_res;

  assign p_sel = lk_to_code[2];
  assign p_val = to_value(lk_to_code);

  trivial_detect u_tdu_predict (
    .op      (in_op),
    .a       (p_sel == 1'b0 ? p_val : s_data[0]),
    .a_av    (p_sel == 1'b0 ? 1'b1  : s_ready[0]),
    .b       (p_sel == 1'b1 ? p_val : s_data[1]),
    .b_av    (p_sel == 1'b1 ? 1'b1  : s_ready[1]),
    .trivial (p_triv),
    .fully   (p_fully),
    .to_code (p_code),
    .out_zero(p_oz),
    .nto_is_b(p_ntob),
    .result  (p_res)
  );

  logic has_dst, dec_triv, use_pred;
  logic rob_full, iw_full;
  logic [RW-1:0] rob_tail;
  logic do_disp, to_iw;
  logic [PW-1:0] remap_tag;

  always_comb begin
    has_dst  = (in_dst != '0);
    // decode-trivial needs a register holding the result: the zero register
    // or the non-trivializing source (not an immediate)
    dec_triv = cfg_bypass_en && d_triv && has_dst &&
               (d_oz || (d_ntob ? s_isreg[1] : s_isreg[0]));
    remap_tag = d_oz ? '0 : (d_ntob ? s_tag[1] : s_tag[0]);
    use_pred = cfg_bypass_en && cfg_predict_en && lk_predict && !dec_triv &&
               s_isreg[p_sel] && !s_final[p_sel] &&
               p_triv && p_code == lk_to_code && p_oz == lk_out_zero;
    in_ready = !rob_full && (dec_triv || (!iw_full && (!has_dst || free_valid)));
    do_disp  = in_valid && in_ready;
    to_iw    = do_disp && !dec_triv;
    alloc_en = to_iw && has_dst;
    share_en = do_disp && dec_triv;
    share_idx = remap_tag;
    rat_wr      = do_disp && has_dst;
    rat_wr_phys = dec_triv ? remap_tag : free_idx;
    rat_wr_spec = !dec_triv && (use_pred ||
                  (s_isreg[0] && s_spec[0]) || (s_isreg[1] && s_spec[1]));
  end

  // ---------------- issue window ----------------
  word_t         iw_data [2];
  logic [PW-1:0] iw_tag  [2];
  logic          iw_r    [2];
  logic          iw_p    [2];
  logic          iw_pred [2];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      iw_tag[s] = s_isreg[s] ? s_tag[s] : '0;
      if (use_pred && p_sel == 1'(s)) begin
        iw_data[s] = p_val;
        iw_r[s]    = 1'b1;
        iw_p[s]    = 1'b1;
        iw_pred[s] = 1'b1;
      end else begin
        iw_data[s] = s_data[s];
        iw_r[s]    = s_ready[s];
        iw_p[s]    = s_ready[s] && s_spec[s];
        iw_pred[s] = 1'b0;
      end
    end
  end

  logic          iss_valid, iss_trivial, iss_out_zero, iss_any_p, iss_sbcast;
  logic          iss_has_dst;
  op_t           iss_op;
  word_t         iss_a, iss_b, iss_triv_result, iss_last;
  to_code_t      iss_to_code;
  logic [PW-1:0] iss_out_tag;
  logic [RW-1:0] iss_rob;
  logic [CW-1:0] iw_occ;

  issue_window #(.SIZE(IW_SIZE), .NPHYS(NPHYS), .ROB_SIZE(ROB_SIZE)) u_iw (
    .clk, .rst_n,
    .triv_en         (cfg_bypass_en),
    .full            (iw_full),
    .disp_en         (to_iw),
    .disp_op         (in_op),
    .disp_data       (iw_data),
    .disp_tag        (iw_tag),
    .disp_r          (iw_r),
    .disp_p          (iw_p),
    .disp_pred       (iw_pred),
    .disp_out_tag    (has_dst ? free_idx : '0),
    .disp_has_dst    (has_dst),
    .disp_rob        (rob_tail),
    .disp_delay      ((in_op == OP_LI) ? in_load_lat : 8'd0),
    .iss_valid       (iss_valid),
    .iss_op          (iss_op),
    .iss_a           (iss_a),
    .iss_b           (iss_b),
    .iss_trivial     (iss_trivial),
    .iss_triv_result (iss_triv_result),
    .iss_to_code     (iss_to_code),
    .iss_out_zero    (iss_out_zero),
    .iss_any_p       (iss_any_p),
    .iss_sbcast      (iss_sbcast),
    .iss_last        (iss_last),
    .iss_out_tag     (iss_out_tag),
    .iss_has_dst     (iss_has_dst),
    .iss_rob         (iss_rob),
    .val_valid       (vb_valid),
    .val_has_dst     (vb_has_dst),
    .val_tag         (vb_tag),
    .val_data        (vb_data),
    .val_rob         (vb_rob),
    .val_trivial     (vb_trivial),
    .val_to_code     (vb_to_code),
    .val_out_zero    (vb_out_zero),
    .cdb_valid       (cdb_valid),
    .cdb_has_dst     (cdb_has_dst),
    .cdb_tag         (cdb_tag),
    .cdb_data        (cdb_data),
    .cdb_kind        (cdb_kind),
    .n_pred_ok       (ev_pred_ok),
    .n_pred_bad      (ev_pred_bad),
    .occupancy       (iw_occ)
  );

  // ---------------- execute and broadcast ----------------
  word_t alu_y;
  logic  bypassed;

  tp_alu u_alu (.op(iss_op), .a(iss_a), .b(iss_b), .y(alu_y));

  always_comb begin
    bypassed    = cfg_bypass_en && iss_trivial;
    cdb_valid   = iss_valid;
    cdb_has_dst = iss_has_dst;
    cdb_tag     = iss_out_tag;
    if (bypassed) cdb_data = iss_triv_result;
    else          cdb_data = alu_y;
    if (iss_any_p)        cdb_kind = CDB_SPEC;
    else if (iss_sbcast)  cdb_kind = (cdb_data == iss_last) ? CDB_VALID : CDB_INVAL;
    else                  cdb_kind = CDB_NORMAL;
    cdb_final = (cdb_kind != CDB_SPEC);
  end

  // ---------------- reorder buffer ----------------
  logic rob_empty;

  reorder_buffer #(.SIZE(ROB_SIZE), .NPHYS(NPHYS), .NARCH(NARCH)) u_rob (
    .clk, .rst_n,
    .full             (rob_full),
    .alloc_idx        (rob_tail),
    .alloc_en         (do_disp),
    .alloc_pc         (in_pc),
    .alloc_has_dst    (has_dst),
    .alloc_dst_arch   (in_dst),
    .alloc_dst_phys   (rat_wr_phys),
    .alloc_prev_phys  (rat_prev),
    .alloc_done       (dec_triv),
    .alloc_trivial    (dec_triv),
    .alloc_to_code    (d_code),
    .alloc_out_zero   (d_oz),
    .cmpl_en          (cdb_valid && cdb_final),
    .cmpl_idx         (iss_rob),
    .cmpl_trivial     (iss_trivial),
    .cmpl_to_code     (iss_to_code),
    .cmpl_out_zero    (iss_out_zero),
    .cmpl2_en         (vb_valid),
    .cmpl2_idx        (vb_rob),
    .cmpl2_trivial    (vb_trivial),
    .cmpl2_to_code    (vb_to_code),
    .cmpl2_out_zero   (vb_out_zero),
    .commit_valid     (cm_valid),
    .commit_en        (1'b1),
    .commit_pc        (cm_pc),
    .commit_has_dst   (cm_has_dst),
    .commit_dst_arch  (cm_dst_arch),
    .commit_dst_phys  (cm_dst_phys),
    .commit_prev_phys (cm_prev_phys),
    .commit_trivial   (cm_trivial),
    .commit_to_code   (cm_to_code),
    .commit_out_zero  (cm_out_zero),
    .empty            (rob_empty)
  );

  assign commit_valid   = cm_valid;
  assign commit_pc      = cm_pc;
  assign commit_dst     = cm_has_dst ? cm_dst_arch : '0;
  assign commit_value   = cm_has_dst ? prf_c : '0;
  assign commit_trivial = cm_trivial;

  // ---------------- events ----------------
  assign ev_decode_trivial = do_disp && dec_triv;
  assign ev_dspec          = to_iw && use_pred;
  assign ev_issue_trivial  = iss_valid && bypassed && !iss_any_p;
  assign ev_spec_bcast     = cdb_valid && cdb_kind == CDB_SPEC;
  assign ev_valid_bcast    = vb_valid || (cdb_valid && cdb_kind == CDB_VALID);
  assign ev_inval_bcast    = cdb_valid && cdb_kind == CDB_INVAL;
  assign ev_alu_use        = iss_valid && !bypassed;
  assign ev_stall          = in_valid && !in_ready;

endmodule
