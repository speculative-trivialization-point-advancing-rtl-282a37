// phys_regfile_tb: self-checking test of the physical register file and its
// reference-counted free list. A reference model tracks values, ready bits
// and mapping counts. Random cycles allocate, share (trivial remap), release
// and write registers; the test checks read data and ready bits, that the
// offered register is the lowest free one, that register 0 reads zero and is
// never offered, and that a register shared by a remap is not offered again
// until both of its mappings are released.
module phys_regfile_tb;
  import tp_pkg::*;
  localparam int NARCH = 8, NPHYS = 24;
  localparam int PW = $clog2(NPHYS);

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] rd_a_idx, rd_b_idx, rd_c_idx, wb_idx, free_idx, share_idx, release_idx;
  word_t rd_a_data, rd_b_data, rd_c_data, wb_data;
  logic rd_a_ready, rd_b_ready, wb_en, free_valid, alloc_en, share_en, release_en;
  int checks = 0, failures = 0;

  phys_regfile #(.NARCH(NARCH), .NPHYS(NPHYS)) dut (.*);

  always #5 clk = ~clk;

  word_t m_data [NPHYS];
  bit    m_rdy  [NPHYS];
  int    m_cnt  [NPHYS];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic int m_free();
    for (int i = 1; i < NPHYS; i++) if (m_cnt[i] == 0) return i;
    return -1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, shared;
    for (int i = 0; i < NPHYS; i++) begin
      m_data[i] = 0; m_rdy[i] = (i < NARCH); m_cnt[i] = (i < NARCH) ? 1 : 0;
    end
    {rd_a_idx, rd_b_idx, rd_c_idx, wb_idx, share_idx, release_idx} = '0;
    {wb_en, alloc_en, share_en, release_en} = '0;
    wb_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // directed: share a register, release one mapping, it must stay busy
    @(negedge clk);
    f = m_free();
    chk("first free", free_idx, f);
    alloc_en = 1;
    @(posedge clk); m_cnt[f] = 1; m_rdy[f] = 0;
    @(negedge clk);
    alloc_en = 0; share_en = 1; share_idx = PW'(f);
    @(posedge clk); m_cnt[f]++;
    @(negedge clk);
    share_en = 0; release_en = 1; release_idx = PW'(f);
    @(posedge clk); m_cnt[f]--;
    @(negedge clk);
    release_en = 0;
    #1 chk("shared register not offered", (free_idx == PW'(f)), 0);
    release_en = 1; release_idx = PW'(f);
    @(posedge clk); m_cnt[f]--;
    @(negedge clk);
    release_en = 0;
    #1 chk("released register offered", free_idx, f);

    // random
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      rd_a_idx = PW'($urandom_range(0, NPHYS-1));
      rd_b_idx = PW'($urandom_range(0, NPHYS-1));
      rd_c_idx = PW'($urandom_range(0, NPHYS-1));
      f = m_free();
      alloc_en = (f > 0) && ($urandom_range(0, 2) == 0);
      wb_en = 1'($urandom);
      wb_idx = PW'($urandom_range(0, NPHYS-1));
      if (alloc_en && wb_idx == PW'(f)) wb_en = 0;
      wb_data = $urandom;
      shared = $urandom_range(1, NPHYS-1);
      share_en = (m_cnt[shared] > 0) && ($urandom_range(0, 3) == 0);
      share_idx = PW'(shared);
      release_idx = PW'($urandom_range(1, NPHYS-1));
      release_en = (m_cnt[release_idx] > (share_en && share_idx == release_idx ? 0 : 0)) &&
                   (m_cnt[release_idx] > 0) && ($urandom_range(0, 2) == 0) &&
                   !(alloc_en && release_idx == PW'(f));
      #1;
      chk("a data", rd_a_idx == 0 ? 0 : rd_a_data, rd_a_idx == 0 ? 0 : m_data[rd_a_idx]);
      chk("a rdy",  rd_a_ready, m_rdy[rd_a_idx]);
      chk("b data", rd_b_data, m_data[rd_b_idx]);
      chk("b rdy",  rd_b_ready, m_rdy[rd_b_idx]);
      chk("c data", rd_c_data, m_data[rd_c_idx]);
      chk("free valid", free_valid, f > 0);
      if (f > 0) chk("free idx", free_idx, f);
      @(posedge clk);
      if (wb_en && wb_idx != 0) begin m_data[wb_idx] = wb_data; m_rdy[wb_idx] = 1; end
      if (alloc_en) begin m_rdy[f] = 0; m_cnt[f] = 1; end
      if (share_en && !(alloc_en && share_idx == PW'(f))) m_cnt[share_idx]++;
      if (release_en) m_cnt[release_idx]--;
    end
    @(negedge clk);
    rd_a_idx = 0;
    #1 chk("p0 zero", rd_a_data, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
