// rename_table: register alias table (RAT) with a speculated bit per entry.
//
// Maps each architectural register to a physical register. Two read ports
// serve the sources of the instruction being renamed; one write port installs
// the destination mapping, which is either a newly allocated physical
// register or, for a decode-trivial instruction, the physical register of its
// non-trivializing source or the zero register (physical register 0). The
// mapping replaced by a write is returned on wr_prev_phys so that it can be
// released when the instruction commits.
//
// The speculated bit marks an architectural register whose current value is
// (or will be) produced from a predicted trivializing operand, directly or
// through a chain of dependent instructions. It is written with the mapping
// and cleared, in every entry that maps to that physical register, when a
// final (non-speculative, validated or corrected) result for the register is
// broadcast on the result bus or the validation bus (two clear ports). Keeping the speculated bit in the RAT and
// propagating it from sources to destination at rename follows the document;
// clearing it from the result bus is this design's own choice.
//
// Architectural register 0 reads as physical register 0 and is never written.
// Reads are combinational and see the table before this cycle's write; the
// write and the clear take effect at the clock edge, the write winning for
// its own entry.
module rename_table #(
  parameter int NARCH = 32,
  parameter int NPHYS = 160,
  localparam int AW = $clog2(NARCH),
  localparam int PW = $clog2(NPHYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rd_a_arch,
  output logic [PW-1:0] rd_a_phys,
  output logic          rd_a_spec,
  input  logic [AW-1:0] rd_b_arch,
  output logic [PW-1:0] rd_b_phys,
  output logic          rd_b_spec,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_arch,
  input  logic [PW-1:0] wr_phys,
  input  logic          wr_spec,
  output logic [PW-1:0] wr_prev_phys,
  input  logic          clr_en,
  input  logic [PW-1:0] clr_phys,
  input  logic          clr2_en,
  input  logic [PW-1:0] clr2_phys
);

  logic [PW-1:0] map  [NARCH];
  logic          spec [NARCH];

  assign rd_a_phys    = map[rd_a_arch];
  assign rd_a_spec    = spec[rd_a_arch];
  assign rd_b_phys    = map[rd_b_arch];
  assign rd_b_spec    = spec[rd_b_arch];
  assign wr_prev_phys = map[wr_arch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NARCH; i++) begin
        map[i]  <= PW'(i);
        spec[i] <= 1'b0;
      end
    end else begin
      if (clr_en)
        for (int i = 0; i < NARCH; i++)
          if (map[i] == clr_phys) spec[i] <= 1'b0;
      if (clr2_en)
        for (int i = 0; i < NARCH; i++)
          if (map[i] == clr2_phys) spec[i] <= 1'b0;
      if (wr_en && wr_arch != '0) begin
        map[wr_arch]  <= wr_phys;
        spec[wr_arch] <= wr_spec;
      end
    end
  end

endmodule
