// phys_regfile: physical register file with ready bits and a
// reference-counted free list.
//
// Holds the values of the NPHYS physical registers and a ready bit per
// register, set when any result (speculative or final) is written from the
// result bus. Three combinational read ports serve the two sources at
// dispatch and the committing instruction.
//
// Because a decode-trivial instruction remaps its destination onto an
// existing physical register, a register can be named by several mappings at
// once. Each register therefore carries a count of the mappings that still
// name it: allocation sets it to 1, a trivial remap adds 1 (share_en), and
// the commit of an instruction that overwrote a mapping subtracts 1
// (release_en). A register is free when its count is zero, so it is not
// released while a later trivial mapping still uses it. The document states
// the release rule; the counting scheme is this design's own way of meeting
// it.
//
// Register 0 always reads zero, is always ready and is never freed; registers
// 1..NARCH-1 hold the initial architectural state (zero) after reset. The
// lowest-numbered free register is offered on free_idx; alloc_en takes it at
// the clock edge. All updates happen at the clock edge.
module phys_regfile
  import tp_pkg::*;
#(
  parameter int NARCH = 32,
  parameter int NPHYS = 160,
  localparam int PW = $clog2(NPHYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] rd_a_idx,
  output word_t         rd_a_data,
  output logic          rd_a_ready,
  input  logic [PW-1:0] rd_b_idx,
  output word_t         rd_b_data,
  output logic          rd_b_ready,
  input  logic [PW-1:0] rd_c_idx,
  output word_t         rd_c_data,
  // result write
  input  logic          wb_en,
  input  logic [PW-1:0] wb_idx,
  input  word_t         wb_data,
  // free list
  output logic          free_valid,
  output logic [PW-1:0] free_idx,
  input  logic          alloc_en,
  input  logic          share_en,
  input  logic [PW-1:0] share_idx,
  input  logic          release_en,
  input  logic [PW-1:0] release_idx
);

  localparam int CW = $clog2(NARCH + NPHYS + 1);

  word_t         data  [NPHYS];
  logic          ready [NPHYS];
  logic [CW-1:0] cnt   [NPHYS];

  assign rd_a_data  = data[rd_a_idx];
  assign rd_a_ready = ready[rd_a_idx];
  assign rd_b_data  = data[rd_b_idx];
  assign rd_b_ready = ready[rd_b_idx];
  assign rd_c_data  = data[rd_c_idx];

  always_comb begin
    free_valid = 1'b0;
    free_idx   = '0;
    for (int i = NPHYS - 1; i >= 1; i--)
      if (cnt[i] == '0) begin
        free_valid = 1'b1;
        free_idx   = PW'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) begin
        data[i]  <= '0;
        ready[i] <= (i < NARCH);
        cnt[i]   <= (i < NARCH) ? CW'(1) : '0;
      end
    end else begin
      if (wb_en && wb_idx != '0) begin
        data[wb_idx]  <= wb_data;
        ready[wb_idx] <= 1'b1;
      end
      if (alloc_en && free_valid)
        ready[free_idx] <= 1'b0;
      for (int i = 1; i < NPHYS; i++) begin
        if (alloc_en && free_valid && PW'(i) == free_idx)
          cnt[i] <= CW'(1);
        else
          cnt[i] <= cnt[i]
                    + CW'(share_en && share_idx == PW'(i))
                    - CW'(release_en && release_idx == PW'(i));
      end
    end
  end

endmodule
