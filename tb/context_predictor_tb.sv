// context_predictor_tb: self-checking test of the trivial-operand context
// predictor.
//  1. Directed: a new instruction is allocated by its first trivial commit
//     and is predicted from its fourth identical commit on (the chosen 2-bit
//     counter must exceed the threshold of 2, i.e. reach 3); the zero/NTO
//     bit is returned; non-trivial commits withdraw the prediction; another
//     PC with the same index but a different tag misses.
//  2. Random: commits of a few PCs (some sharing an index) with TO codes
//     following short repeating patterns, checked every cycle against a
//     reference model of the VHT/PHT kept in this testbench.
module context_predictor_tb;
  import tp_pkg::*;

  localparam int ENTRIES = 16;
  localparam int IW = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic lk_hit, lk_predict, lk_out_zero;
  to_code_t lk_to_code, up_to_code;
  logic up_valid, up_trivial, up_out_zero;
  int checks = 0, failures = 0;
  int npred = 0;

  context_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic        m_valid [ENTRIES];
  logic [31:0] m_pcfull[ENTRIES];
  int          m_age   [ENTRIES][4];
  logic [2:0]  m_code  [ENTRIES][4];
  int          m_hist  [ENTRIES][4];   // [0] = newest slot
  logic        m_oz    [ENTRIES];
  int          m_cnt   [ENTRIES][4];

  function automatic int m_pidx(int e, logic [31:0] pc);
    logic [7:0] v, x;
    v = {2'(m_hist[e][3]), 2'(m_hist[e][2]), 2'(m_hist[e][1]), 2'(m_hist[e][0])};
    x = v ^ pc[7:0];
    return int'(x[IW-1:0] ^ IW'(x >> IW));
  endfunction

  task automatic m_reset();
    for (int e = 0; e < ENTRIES; e++) begin
      m_valid[e] = 0; m_oz[e] = 0; m_pcfull[e] = 0;
      for (int s = 0; s < 4; s++) begin
        m_age[e][s] = 0; m_code[e][s] = 0; m_hist[e][s] = 0; m_cnt[e][s] = 0;
      end
    end
  endtask

  task automatic m_lookup(logic [31:0] pc, output logic hit, output logic pred,
                          output logic [2:0] code, output logic oz);
    int e, p, best;
    e = int'(pc % ENTRIES);
    hit = m_valid[e] && (m_pcfull[e] / ENTRIES == pc / ENTRIES);
    p = m_pidx(e, pc);
    best = 0;
    for (int s = 1; s < 4; s++) if (m_cnt[p][s] > m_cnt[p][best]) best = s;
    code = m_code[e][best];
    oz = m_oz[e];
    pred = hit && m_cnt[p][best] > 2 && code[1:0] != 2'd3;
  endtask

  task automatic m_update(logic [31:0] pc, logic triv, logic [2:0] code, logic oz);
    int e, p, k, oldage;
    logic hit;
    e = int'(pc % ENTRIES);
    hit = m_valid[e] && (m_pcfull[e] / ENTRIES == pc / ENTRIES);
    p = m_pidx(e, pc);
    if (!hit) begin
      if (triv) begin
        m_valid[e] = 1; m_pcfull[e] = pc; m_oz[e] = oz;
        for (int s = 0; s < 4; s++) begin
          m_code[e][s] = (s == 0) ? code : 3'b011;
          m_age[e][s] = s;
          m_hist[e][s] = 0;
        end
      end
      return;
    end
    if (!triv) begin
      for (int s = 0; s < 4; s++) if (m_cnt[p][s] > 0) m_cnt[p][s]--;
      return;
    end
    k = -1;
    for (int s = 3; s >= 0; s--) if (m_code[e][s] == code) k = s;
    if (k < 0) for (int s = 0; s < 4; s++) if (m_age[e][s] == 3) k = s;
    m_code[e][k] = code;
    oldage = m_age[e][k];
    for (int s = 0; s < 4; s++) begin
      if (s == k) begin
        if (m_cnt[p][s] < 3) m_cnt[p][s]++;
      end else begin
        if (m_age[e][s] < oldage) m_age[e][s]++;
        if (m_cnt[p][s] > 0) m_cnt[p][s]--;
      end
    end
    m_age[e][k] = 0;
    for (int s = 3; s > 0; s--) m_hist[e][s] = m_hist[e][s-1];
    m_hist[e][0] = k;
    m_oz[e] = oz;
  endtask

  task automatic compare(logic [31:0] pc);
    logic h, pr, oz;
    logic [2:0] c;
    lk_pc = pc;
    #1;
    m_lookup(pc, h, pr, c, oz);
    if (pr) npred++;
    checks++;
    if (lk_hit !== h || lk_predict !== pr || (pr && (lk_to_code !== c || lk_out_zero !== oz))) begin
      failures++;
      if (failures < 10)
        $display("FAIL pc=%h dut hit=%b pred=%b code=%b oz=%b model hit=%b pred=%b code=%b oz=%b",
                 pc, lk_hit, lk_predict, lk_to_code, lk_out_zero, h, pr, c, oz);
    end
  endtask

  task automatic commit(logic [31:0] pc, logic triv, logic [2:0] code, logic oz);
    @(negedge clk);
    up_valid = 1; up_pc = pc; up_trivial = triv; up_to_code = code; up_out_zero = oz;
    @(posedge clk);
    m_update(pc, triv, code, oz);
    #1 up_valid = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pcs [6] = '{32'h40, 32'h41, 32'h52, 32'h1040, 32'h7, 32'h2041};
    int pat [6][3];
    int phase [6];
    logic [2:0] codes [6] = '{3'b000, 3'b100, 3'b001, 3'b101, 3'b110, 3'b010};
    int first_pred;

    up_valid = 0; up_pc = 0; up_trivial = 0; up_to_code = 0; up_out_zero = 0; lk_pc = 0;
    m_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- 1. directed training ----
    first_pred = -1;
    for (int n = 1; n <= 6; n++) begin
      commit(32'h123, 1'b1, 3'b100, 1'b0);
      compare(32'h123);
      if (lk_predict && first_pred < 0) first_pred = n;
    end
    checks++;
    if (first_pred != 4) begin
      failures++;
      $display("FAIL first prediction after %0d commits, expected 4", first_pred);
    end
    checks++;
    if (!(lk_to_code == 3'b100 && lk_out_zero == 1'b0)) failures++;
    compare(32'h123 + ENTRIES);                 // same index, other tag
    checks++;
    if (lk_hit) failures++;
    commit(32'h123, 1'b0, 3'b000, 1'b0);        // non-trivial commit
    compare(32'h123);
    checks++;
    if (lk_predict) begin
      failures++;
      $display("FAIL still predicting after non-trivial commit");
    end

    // ---- 2. random patterns ----
    for (int i = 0; i < 6; i++) begin
      phase[i] = 0;
      for (int j = 0; j < 3; j++) pat[i][j] = $urandom_range(0, 5);
    end
    for (int n = 0; n < 3000; n++) begin
      int i;
      logic triv;
      i = $urandom_range(0, 5);
      compare(pcs[i]);
      triv = ($urandom_range(0, 9) != 0);
      commit(pcs[i], triv, codes[pat[i][phase[i]]], codes[pat[i][phase[i]]][0]);
      phase[i] = (phase[i] + 1) % ((i % 3) + 1);
      compare(pcs[$urandom_range(0, 5)]);
    end
    checks++;
    if (npred < 100) begin
      failures++;
      $display("FAIL only %0d predictions in the random phase", npred);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
