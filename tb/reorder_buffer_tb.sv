// reorder_buffer_tb: self-checking test of the reorder buffer with 8
// entries. Random allocation (some entries already complete at allocation,
// as a decode-trivial bypass is), out-of-order completion of outstanding
// entries and random commit enables are compared with a queue model: the
// test checks the allocation index, full/empty, that only a completed head
// is offered for commit, program order and every committed field. It also
// checks that the buffer fills: allocation stops at exactly 8 entries.
module reorder_buffer_tb;
  import tp_pkg::*;
  localparam int SIZE = 8, NPHYS = 40, NARCH = 32;
  localparam int RW = $clog2(SIZE), PW = $clog2(NPHYS), AW = $clog2(NARCH);

  logic clk = 0, rst_n = 0;
  logic full, empty, alloc_en, alloc_has_dst, alloc_done, alloc_trivial, alloc_out_zero;
  logic [RW-1:0] alloc_idx, cmpl_idx;
  logic [31:0] alloc_pc, commit_pc;
  logic [AW-1:0] alloc_dst_arch, commit_dst_arch;
  logic [PW-1:0] alloc_dst_phys, alloc_prev_phys, commit_dst_phys, commit_prev_phys;
  to_code_t alloc_to_code, cmpl_to_code, commit_to_code;
  logic cmpl_en, cmpl_trivial, cmpl_out_zero;
  logic [RW-1:0] cmpl2_idx;
  to_code_t cmpl2_to_code;
  logic cmpl2_en, cmpl2_trivial, cmpl2_out_zero;
  logic commit_valid, commit_en, commit_has_dst, commit_trivial, commit_out_zero;
  int checks = 0, failures = 0;

  reorder_buffer #(.SIZE(SIZE), .NPHYS(NPHYS), .NARCH(NARCH)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int idx; logic [31:0] pc; logic has_dst; int dst_arch, dst_phys, prev_phys;
    bit done; bit triv; int code; bit oz;
  } m_t;
  m_t q[$];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next_idx = 0, ncommit = 0, nfull = 0, pcn = 0;
    {alloc_en, alloc_has_dst, alloc_done, alloc_trivial, alloc_out_zero, cmpl_en,
     cmpl_trivial, cmpl_out_zero, commit_en, cmpl2_en, cmpl2_trivial, cmpl2_out_zero} = '0;
    {alloc_pc, alloc_dst_arch, alloc_dst_phys, alloc_prev_phys, alloc_to_code,
     cmpl_idx, cmpl_to_code, cmpl2_idx, cmpl2_to_code} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int pend[$];
      int ci, ci2;
      @(negedge clk);
      // phase: fill up in the first part of each 200-cycle window
      commit_en = ((n % 200) < 60) ? 1'b0 : 1'($urandom);
      alloc_en  = !full && 1'($urandom);
      alloc_pc = 32'h1000 + pcn;
      alloc_has_dst = 1'($urandom);
      alloc_dst_arch = AW'($urandom);
      alloc_dst_phys = PW'($urandom_range(0, NPHYS-1));
      alloc_prev_phys = PW'($urandom_range(0, NPHYS-1));
      alloc_done = ($urandom_range(0, 4) == 0);
      alloc_trivial = alloc_done;
      alloc_to_code = 3'($urandom);
      alloc_out_zero = 1'($urandom);
      pend = {};
      foreach (q[i]) if (!q[i].done) pend.push_back(i);
      cmpl_en = (pend.size() > 0) && 1'($urandom);
      ci = cmpl_en ? pend[$urandom_range(0, pend.size()-1)] : 0;
      cmpl_idx = cmpl_en ? RW'(q[ci].idx) : '0;
      cmpl_trivial = 1'($urandom);
      cmpl_to_code = 3'($urandom);
      cmpl_out_zero = 1'($urandom);
      // second completion port: a different pending entry
      if (cmpl_en) pend.delete(pend.find_first_index(x) with (x == ci)[0]);
      cmpl2_en = (pend.size() > 0) && 1'($urandom);
      ci2 = cmpl2_en ? pend[$urandom_range(0, pend.size()-1)] : 0;
      cmpl2_idx = cmpl2_en ? RW'(q[ci2].idx) : '0;
      cmpl2_trivial = 1'($urandom);
      cmpl2_to_code = 3'($urandom);
      cmpl2_out_zero = 1'($urandom);
      #1;
      chk("full", full, q.size() == SIZE);
      chk("empty", empty, q.size() == 0);
      if (full) nfull++;
      chk("alloc idx", alloc_idx, next_idx);
      chk("commit valid", commit_valid, q.size() > 0 && q[0].done);
      if (commit_valid && q.size() > 0) begin
        chk("pc", commit_pc, q[0].pc);
        chk("has_dst", commit_has_dst, q[0].has_dst);
        chk("dst_arch", commit_dst_arch, q[0].dst_arch);
        chk("dst_phys", commit_dst_phys, q[0].dst_phys);
        chk("prev_phys", commit_prev_phys, q[0].prev_phys);
        chk("trivial", commit_trivial, q[0].triv);
        chk("code", commit_to_code, q[0].code);
        chk("oz", commit_out_zero, q[0].oz);
      end
      @(posedge clk);
      if (cmpl_en) begin
        q[ci].triv = cmpl_trivial; q[ci].code = cmpl_to_code; q[ci].oz = cmpl_out_zero;
      end
      if (cmpl2_en) begin
        q[ci2].triv = cmpl2_trivial; q[ci2].code = cmpl2_to_code; q[ci2].oz = cmpl2_out_zero;
      end
      if (commit_en && q.size() > 0 && q[0].done) begin
        void'(q.pop_front());
        ncommit++;
        ci--;
        ci2--;
      end
      if (cmpl_en) q[ci].done = 1;
      if (cmpl2_en) q[ci2].done = 1;
      if (alloc_en) begin
        q.push_back('{next_idx, alloc_pc, alloc_has_dst, alloc_dst_arch, alloc_dst_phys,
                      alloc_prev_phys, alloc_done, alloc_trivial, alloc_to_code, alloc_out_zero});
        next_idx = (next_idx + 1) % SIZE;
        pcn++;
      end
    end
    checks++; if (ncommit < 500) failures++;
    checks++; if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
