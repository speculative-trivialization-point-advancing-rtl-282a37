// reorder_buffer: circular reorder buffer that retires instructions in
// program order.
//
// An entry is written at dispatch (alloc_en) with the instruction's PC, its
// destination mappings (new and previous physical register) and, for an
// instruction finished at dispatch (a decode-trivial bypass), its completion
// and triviality information. Otherwise it is completed later through the
// cmpl ports, which the core drives only for a final result: a speculative
// result never completes an entry, so no instruction that used a predicted
// operand commits before the prediction is validated. The head entry is
// offered on the commit port once complete and leaves when commit_en is
// high. One allocation, two completions (result bus and validation bus) and
// one commit per cycle, all at the clock edge; the commit outputs are combinational from the head entry.
//
// The document gives only the size (128 entries) and the rule that predicted
// instructions do not commit speculatively; the organisation is this design's
// own.
module reorder_buffer
  import tp_pkg::*;
#(
  parameter int SIZE = 128,
  parameter int NPHYS = 160,
  parameter int NARCH = 32,
  localparam int RW = $clog2(SIZE),
  localparam int PW = $clog2(NPHYS),
  localparam int AW = $clog2(NARCH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // allocation
  output logic          full,
  output logic [RW-1:0] alloc_idx,
  input  logic          alloc_en,
  input  logic [31:0]   alloc_pc,
  input  logic          alloc_has_dst,
  input  logic [AW-1:0] alloc_dst_arch,
  input  logic [PW-1:0] alloc_dst_phys,
  input  logic [PW-1:0] alloc_prev_phys,
  input  logic          alloc_done,
  input  logic          alloc_trivial,
  input  to_code_t      alloc_to_code,
  input  logic          alloc_out_zero,
  // completion
  input  logic          cmpl_en,
  input  logic [RW-1:0] cmpl_idx,
  input  logic          cmpl_trivial,
  input  to_code_t      cmpl_to_code,
  input  logic          cmpl_out_zero,
  input  logic          cmpl2_en,
  input  logic [RW-1:0] cmpl2_idx,
  input  logic          cmpl2_trivial,
  input  to_code_t      cmpl2_to_code,
  input  logic          cmpl2_out_zero,
  // commit
  output logic          commit_valid,
  input  logic          commit_en,
  output logic [31:0]   commit_pc,
  output logic          commit_has_dst,
  output logic [AW-1:0] commit_dst_arch,
  output logic [PW-1:0] commit_dst_phys,
  output logic [PW-1:0] commit_prev_phys,
  output logic          commit_trivial,
  output to_code_t      commit_to_code,
  output logic          commit_out_zero,
  output logic          empty
);

  typedef struct packed {
    logic [31:0]   pc;
    logic          has_dst;
    logic [AW-1:0] dst_arch;
    logic [PW-1:0] dst_phys;
    logic [PW-1:0] prev_phys;
    logic          done;
    logic          trivial;
    to_code_t      to_code;
    logic          out_zero;
  } rob_t;

  rob_t          q [SIZE];
  logic [RW-1:0] head, tail;
  logic [RW:0]   count;
  logic          do_commit, do_alloc;

  assign full      = (count == (RW+1)'(SIZE));
  assign empty     = (count == '0);
  assign alloc_idx = tail;

  assign commit_valid     = !empty && q[head].done;
  assign commit_pc        = q[head].pc;
  assign commit_has_dst   = q[head].has_dst;
  assign commit_dst_arch  = q[head].dst_arch;
  assign commit_dst_phys  = q[head].dst_phys;
  assign commit_prev_phys = q[head].prev_phys;
  assign commit_trivial   = q[head].trivial;
  assign commit_to_code   = q[head].to_code;
  assign commit_out_zero  = q[head].out_zero;

  assign do_commit = commit_valid && commit_en;
  assign do_alloc  = alloc_en && !full;

  function automatic logic [RW-1:0] inc(logic [RW-1:0] p);
    return (p == RW'(SIZE - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < SIZE; i++) q[i] <= '0;
    end else begin
      if (cmpl_en) begin
        q[cmpl_idx].done     <= 1'b1;
        q[cmpl_idx].trivial  <= cmpl_trivial;
        q[cmpl_idx].to_code  <= cmpl_to_code;
        q[cmpl_idx].out_zero <= cmpl_out_zero;
      end
      if (cmpl2_en) begin
        q[cmpl2_idx].done     <= 1'b1;
        q[cmpl2_idx].trivial  <= cmpl2_trivial;
        q[cmpl2_idx].to_code  <= cmpl2_to_code;
        q[cmpl2_idx].out_zero <= cmpl2_out_zero;
      end
      if (do_alloc) begin
        q[tail] <= '{pc: alloc_pc, has_dst: alloc_has_dst, dst_arch: alloc_dst_arch,
                     dst_phys: alloc_dst_phys, prev_phys: alloc_prev_phys,
                     done: alloc_done, trivial: alloc_trivial,
                     to_code: alloc_to_code, out_zero: alloc_out_zero};
        tail <= inc(tail);
      end
      if (do_commit) head <= inc(head);
      count <= count + (RW+1)'(do_alloc) - (RW+1)'(do_commit);
    end
  end

  // A completion must name a live entry that is not yet done.
  a_cmpl_live: assert property (@(posedge clk) disable iff (!rst_n)
    cmpl_en |-> !empty && !q[cmpl_idx].done);
  a_cmpl2_live: assert property (@(posedge clk) disable iff (!rst_n)
    cmpl2_en |-> !empty && !q[cmpl2_idx].done && !(cmpl_en && cmpl_idx == cmpl2_idx));

endmodule
