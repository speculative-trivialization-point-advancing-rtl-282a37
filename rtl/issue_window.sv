// issue_window: reservation-station issue window of the trivial-bypassing,
// operand-predicting core.
//
// Each entry holds, per source operand, the value (data), the producer's
// physical-register tag, a ready bit R and a predict bit P, plus the output
// tag; this is the entry format the design is built around. Added state: the
// operation, the reorder-buffer slot, a "pred" flag on an operand whose value
// came from the trivial-operand predictor (a directly speculated, D-SPEC,
// instruction), a delay counter that holds a load-like entry back for its
// memory latency, "executed" (a speculative result computed from the current
// operand values has been broadcast and the entry is waiting for its P bits
// to clear) and the last broadcast value.
//
// Wakeup: every entry watches the result bus and the validation bus (a
// validation counts as a final broadcast of the value it repeats; the two
// buses never carry the same tag in one cycle). A broadcast for a source tag sets R, copies the value and sets P if the broadcast is
// speculative. A predicted operand ignores speculative broadcasts; a final
// one either equals the prediction (P cleared: the prediction is validated)
// or not (P cleared, value replaced: misprediction). A changed operand value
// clears "executed", so only instructions whose inputs really changed run
// again (selective re-execution).
//
// Issue: an entry requests issue when it is not executed and either both R
// bits are set or the trivial-instruction detection unit finds it trivial
// from the operands it has (a fully-trivial instruction needs only its
// trivializing operand). An executed entry whose P bits have all cleared
// sends its validation on a separate validation bus: the tag, a validation
// signal and the value it broadcast before, with no functional unit
// involved. Each cycle the lowest-numbered issue requester issues and the
// lowest-numbered validation requester validates (and leaves). The core
// computes the result-bus broadcast from the issue outputs and feeds it back
// on the cdb port; a speculative broadcast keeps the issued entry
// (executed = 1; a validation-bus wakeup in the same cycle still applies to
// it), any other kind frees it at the clock edge.
//
// The R/P fields, the D-SPEC/I-SPEC behaviour and the issue-stage trivial
// check follow the document; the executed/last-value bookkeeping, the
// separate validation bus and the fixed-priority selection are this design's
// own.
// Dispatch writes the lowest free entry at the clock edge; it must not be
// requested while full is high.
module issue_window
  import tp_pkg::*;
#(
  parameter int SIZE     = 64,
  parameter int NPHYS    = 160,
  parameter int ROB_SIZE = 128,
  localparam int PW = $clog2(NPHYS),
  localparam int RW = $clog2(ROB_SIZE),
  localparam int CW = $clog2(SIZE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          triv_en,         // issue-stage trivial bypass enabled
  // dispatch
  output logic          full,
  input  logic          disp_en,
  input  op_t           disp_op,
  input  word_t         disp_data [2],
  input  logic [PW-1:0] disp_tag  [2],
  input  logic          disp_r    [2],
  input  logic          disp_p    [2],
  input  logic          disp_pred [2],
  input  logic [PW-1:0] disp_out_tag,
  input  logic          disp_has_dst,
  input  logic [RW-1:0] disp_rob,
  input  logic [7:0]    disp_delay,      // cycles before the entry may issue
  // issue
  output logic          iss_valid,
  output op_t           iss_op,
  output word_t         iss_a,
  output word_t         iss_b,
  output logic          iss_trivial,
  output word_t         iss_triv_result,
  output to_code_t      iss_to_code,
  output logic          iss_out_zero,
  output logic          iss_any_p,       // an operand is still speculative
  output logic          iss_sbcast,      // a speculative result was broadcast before
  output word_t         iss_last,
  output logic [PW-1:0] iss_out_tag,
  output logic          iss_has_dst,
  output logic [RW-1:0] iss_rob,
  // validation bus (an executed entry whose P bits have all cleared)
  output logic          val_valid,
  output logic          val_has_dst,
  output logic [PW-1:0] val_tag,
  output word_t         val_data,        // the value broadcast earlier, repeated
  output logic [RW-1:0] val_rob,
  output logic          val_trivial,
  output to_code_t      val_to_code,
  output logic          val_out_zero,
  // result bus (from the core, this cycle)
  input  logic          cdb_valid,
  input  logic          cdb_has_dst,
  input  logic [PW-1:0] cdb_tag,
  input  word_t         cdb_data,
  input  cdb_kind_t     cdb_kind,
  // events this cycle
  output logic [CW-1:0] n_pred_ok,       // predicted operands validated
  output logic [CW-1:0] n_pred_bad,      // predicted operands found wrong
  output logic [CW-1:0] occupancy
);

  typedef struct packed {
    word_t         data;
    logic [PW-1:0] tag;
    logic          r;
    logic          p;
    logic          pred;
  } src_t;

  typedef struct packed {
    logic          valid;
    op_t           op;
    src_t [1:0]    src;
    logic [PW-1:0] out_tag;
    logic          has_dst;
    logic [RW-1:0] rob;
    logic [7:0]    delay;
    logic          executed;
    logic          sbcast;
    word_t         last;
  } ent_t;

  ent_t ent [SIZE];

  // per-entry trivial detection
  logic     t_triv   [SIZE];
  logic     t_fully  [SIZE];
  to_code_t t_code   [SIZE];
  logic     t_oz     [SIZE];
  logic     t_ntob   [SIZE];
  word_t    t_res    [SIZE];

  for (genvar i = 0; i < SIZE; i++) begin : g_tdu
    trivial_detect u_tdu (
      .op      (ent[i].op),
      .a       (ent[i].src[0].data),
      .a_av    (ent[i].src[0].r),
      .b       (ent[i].src[1].data),
      .b_av    (ent[i].src[1].r),
      .trivial (t_triv[i]),
      .fully   (t_fully[i]),
      .to_code (t_code[i]),
      .out_zero(t_oz[i]),
      .nto_is_b(t_ntob[i]),
      .result  (t_res[i])
    );
  end

  logic [SIZE-1:0] req_exec, req_val;
  logic            sel_found, vsel_found;
  logic [$clog2(SIZE)-1:0] sel, vsel;
  logic            free_found;
  logic [$clog2(SIZE)-1:0] free_slot;

  always_comb begin
    for (int i = 0; i < SIZE; i++) begin
      req_exec[i] = ent[i].valid && !ent[i].executed && ent[i].delay == '0 &&
                    ((ent[i].src[0].r && ent[i].src[1].r) || (triv_en && t_triv[i]));
      req_val[i]  = ent[i].valid && ent[i].executed &&
                    !ent[i].src[0].p && !ent[i].src[1].p;
    end
    sel_found  = 1'b0;
    sel        = '0;
    vsel_found = 1'b0;
    vsel       = '0;
    for (int i = SIZE - 1; i >= 0; i--) begin
      if (req_exec[i]) begin
        sel_found = 1'b1;
        sel       = ($clog2(SIZE))'(i);
      end
      if (req_val[i]) begin
        vsel_found = 1'b1;
        vsel       = ($clog2(SIZE))'(i);
      end
    end
    free_found = 1'b0;
    free_slot  = '0;
    for (int i = SIZE - 1; i >= 0; i--)
      if (!ent[i].valid) begin
        free_found = 1'b1;
        free_slot  = ($clog2(SIZE))'(i);
      end
    occupancy = '0;
    for (int i = 0; i < SIZE; i++) occupancy = occupancy + CW'(ent[i].valid);
  end

  assign full = !free_found;

  always_comb begin
    iss_valid       = sel_found;
    iss_op          = ent[sel].op;
    iss_a           = ent[sel].src[0].data;
    iss_b           = ent[sel].src[1].data;
    iss_trivial     = t_triv[sel];
    iss_triv_result = t_res[sel];
    iss_to_code     = t_code[sel];
    iss_out_zero    = t_oz[sel];
    iss_any_p       = ent[sel].src[0].p || ent[sel].src[1].p;
    iss_sbcast      = ent[sel].sbcast;
    iss_last        = ent[sel].last;
    iss_out_tag     = ent[sel].out_tag;
    iss_has_dst     = ent[sel].has_dst;
    iss_rob         = ent[sel].rob;
    val_valid       = vsel_found;
    val_has_dst     = ent[vsel].has_dst;
    val_tag         = ent[vsel].out_tag;
    val_data        = ent[vsel].last;
    val_rob         = ent[vsel].rob;
    val_trivial     = t_triv[vsel];
    val_to_code     = t_code[vsel];
    val_out_zero    = t_oz[vsel];
  end

  // wakeup: a source matches at most one of the two buses in a cycle
  logic      wk    [SIZE][2];
  cdb_kind_t wk_k  [SIZE][2];
  word_t     wk_d  [SIZE][2];
  always_comb begin
    n_pred_ok  = '0;
    n_pred_bad = '0;
    for (int i = 0; i < SIZE; i++)
      for (int s = 0; s < 2; s++) begin
        wk[i][s]   = 1'b0;
        wk_k[i][s] = cdb_kind;
        wk_d[i][s] = cdb_data;
        if (cdb_valid && cdb_has_dst && ent[i].valid && ent[i].src[s].tag == cdb_tag)
          wk[i][s] = 1'b1;
        else if (val_valid && val_has_dst && ent[i].valid && ent[i].src[s].tag == val_tag) begin
          wk[i][s]   = 1'b1;
          wk_k[i][s] = CDB_VALID;
          wk_d[i][s] = val_data;
        end
        if (wk[i][s] && ent[i].src[s].pred && wk_k[i][s] != CDB_SPEC) begin
          if (ent[i].src[s].data == wk_d[i][s]) n_pred_ok  = n_pred_ok + 1'b1;
          else                                  n_pred_bad = n_pred_bad + 1'b1;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SIZE; i++) ent[i] <= '0;
    end else begin
      for (int i = 0; i < SIZE; i++) begin
        if (sel_found && sel == ($clog2(SIZE))'(i) && !(cdb_valid && cdb_kind == CDB_SPEC)) begin
          // the issued entry with a final result leaves
          ent[i].valid <= 1'b0;
        end else if (vsel_found && vsel == ($clog2(SIZE))'(i)) begin
          ent[i].valid <= 1'b0;
        end else if (ent[i].valid) begin
          if (sel_found && sel == ($clog2(SIZE))'(i)) begin
            // the issued entry with a speculative result stays; a wakeup
            // below (from the validation bus) can still clear "executed"
            ent[i].executed <= 1'b1;
            ent[i].sbcast   <= 1'b1;
            ent[i].last     <= cdb_data;
          end
          if (ent[i].delay != '0) ent[i].delay <= ent[i].delay - 8'd1;
          for (int s = 0; s < 2; s++) begin
            if (wk[i][s]) begin
              if (ent[i].src[s].pred) begin
                if (wk_k[i][s] != CDB_SPEC) begin
                  ent[i].src[s].pred <= 1'b0;
                  ent[i].src[s].p    <= 1'b0;
                  if (ent[i].src[s].data != wk_d[i][s]) begin
                    ent[i].src[s].data <= wk_d[i][s];
                    ent[i].executed    <= 1'b0;
                  end
                end
              end else begin
                ent[i].src[s].r <= 1'b1;
                ent[i].src[s].p <= (wk_k[i][s] == CDB_SPEC);
                if (!ent[i].src[s].r || ent[i].src[s].data != wk_d[i][s]) begin
                  ent[i].src[s].data <= wk_d[i][s];
                  ent[i].executed    <= 1'b0;
                end
              end
            end
          end
        end
      end
      if (disp_en && free_found) begin
        ent[free_slot].valid    <= 1'b1;
        ent[free_slot].op       <= disp_op;
        for (int s = 0; s < 2; s++)
          ent[free_slot].src[s] <= '{data: disp_data[s], tag: disp_tag[s], r: disp_r[s],
                                     p: disp_p[s], pred: disp_pred[s]};
        ent[free_slot].out_tag  <= disp_out_tag;
        ent[free_slot].has_dst  <= disp_has_dst;
        ent[free_slot].rob      <= disp_rob;
        ent[free_slot].delay    <= disp_delay;
        ent[free_slot].executed <= 1'b0;
        ent[free_slot].sbcast   <= 1'b0;
        ent[free_slot].last     <= '0;
      end
    end
  end

  // A broadcast must come with an issue from this window.
  a_cdb_from_issue: assert property (@(posedge clk) disable iff (!rst_n)
    cdb_valid |-> sel_found);

endmodule
