// rename_table_tb: self-checking test of the register alias table. Random
// cycles of two reads, one mapping write (including writes to register 0,
// which must be ignored) and one clear of the speculated bit by physical
// register are compared with a reference table kept in this testbench. Reads
// are checked before the clock edge, so they must return the old mapping.
module rename_table_tb;
  localparam int NARCH = 32, NPHYS = 160;
  localparam int AW = $clog2(NARCH), PW = $clog2(NPHYS);

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] rd_a_arch, rd_b_arch, wr_arch;
  logic [PW-1:0] rd_a_phys, rd_b_phys, wr_phys, wr_prev_phys, clr_phys, clr2_phys;
  logic rd_a_spec, rd_b_spec, wr_en, wr_spec, clr_en, clr2_en;
  int checks = 0, failures = 0;

  rename_table #(.NARCH(NARCH), .NPHYS(NPHYS)) dut (.*);

  always #5 clk = ~clk;

  int m_map [NARCH];
  bit m_spec[NARCH];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_remap = 0;
    for (int i = 0; i < NARCH; i++) begin m_map[i] = i; m_spec[i] = 0; end
    {rd_a_arch, rd_b_arch, wr_arch, wr_phys, clr_phys, clr2_phys, wr_en, wr_spec, clr_en, clr2_en} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      rd_a_arch = AW'($urandom);
      rd_b_arch = AW'($urandom);
      wr_en     = 1'($urandom);
      wr_arch   = AW'($urandom);
      // sometimes remap onto another register's physical register (trivial remap)
      if ($urandom_range(0, 3) == 0) begin
        wr_phys = PW'(m_map[$urandom_range(0, NARCH-1)]);
        n_remap++;
      end else
        wr_phys = PW'($urandom_range(0, NPHYS-1));
      wr_spec   = 1'($urandom);
      clr_en    = 1'($urandom);
      clr_phys  = PW'(m_map[$urandom_range(0, NARCH-1)]);
      clr2_en   = 1'($urandom);
      clr2_phys = PW'(m_map[$urandom_range(0, NARCH-1)]);
      #1;
      chk("a_phys", rd_a_phys, m_map[rd_a_arch]);
      chk("a_spec", rd_a_spec, m_spec[rd_a_arch]);
      chk("b_phys", rd_b_phys, m_map[rd_b_arch]);
      chk("b_spec", rd_b_spec, m_spec[rd_b_arch]);
      chk("prev",   wr_prev_phys, m_map[wr_arch]);
      @(posedge clk);
      if (clr_en)
        for (int i = 0; i < NARCH; i++) if (m_map[i] == clr_phys) m_spec[i] = 0;
      if (clr2_en)
        for (int i = 0; i < NARCH; i++) if (m_map[i] == clr2_phys) m_spec[i] = 0;
      if (wr_en && wr_arch != 0) begin
        m_map[wr_arch] = wr_phys;
        m_spec[wr_arch] = wr_spec;
      end
    end
    @(negedge clk);
    rd_a_arch = 0;
    #1 chk("r0 stays on p0", rd_a_phys, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
