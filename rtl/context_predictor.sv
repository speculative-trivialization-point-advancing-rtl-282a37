// context_predictor: two-level context value predictor for trivializing
// operands (TOs).
//
// Value History Table (VHT), ENTRIES entries indexed by the low PC bits, each
// holding a tag (the remaining PC bits), four 3-bit TO codes (the four most
// recent distinct TOs seen for this instruction; a code also says which
// source operand was trivializing), a 2-bit LRU age per code, an 8-bit value
// history pattern (VHP: the 2-bit slot numbers of the last four TOs, newest
// in bits 1:0) and one bit telling whether the trivial result was zero or
// the non-trivializing operand. Pattern History Table (PHT), ENTRIES entries
// of four 2-bit saturating confidence counters, one per VHT slot, indexed by
// VHP XOR PC. The counter with the highest value is chosen (lowest slot on a
// tie); when it is above CONF_THRESHOLD the code in that slot is predicted.
//
// Lookup is combinational (it runs alongside fetch). Update happens on the
// clock edge when up_valid is high (at commit): for a trivial instruction the
// committed TO code is found in the data field or written over the LRU slot,
// its counter is incremented and the other three decremented, the VHP is
// shifted and the LRU ages refreshed; an instruction that missed is
// allocated. A committed non-trivial instruction that hits decrements all
// four counters of its PHT entry. Table organisation, field widths, the
// threshold, the XOR indexing and the zero/NTO bit follow the document; the
// update rules, the PHT size, the fold of the 8-bit XOR into the index and
// allocating only trivial instructions are this design's own choices.
//
// The pc input is an instruction address in instruction units, so that the
// index plus the tag cover all of its 32 bits.
module context_predictor
  import tp_pkg::*;
#(
  parameter int ENTRIES        = 128,
  parameter int CONF_THRESHOLD = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  // lookup
  input  logic [31:0] lk_pc,
  output logic     lk_hit,        // tag match
  output logic     lk_predict,    // confident prediction available
  output to_code_t lk_to_code,
  output logic     lk_out_zero,
  // update (commit)
  input  logic     up_valid,
  input  logic [31:0] up_pc,
  input  logic     up_trivial,
  input  to_code_t up_to_code,
  input  logic     up_out_zero
);

  localparam int IW    = $clog2(ENTRIES);
  localparam int TAG_W = 32 - IW;
  localparam to_code_t EMPTY = 3'b011;

  typedef logic [1:0] cnt_t;

  typedef struct packed {
    logic                  valid;
    logic [TAG_W-1:0]      tag;
    logic [3:0][1:0]       lru;    // age per slot, 0 = most recent
    logic [3:0][2:0]       data;   // TO codes
    logic [7:0]            vhp;    // slot history, newest in [1:0]
    logic                  oz;     // result is zero (1) or the NTO (0)
  } vht_t;

  vht_t            vht [ENTRIES];
  logic [3:0][1:0] pht [ENTRIES];

  function automatic logic [IW-1:0] pht_index(logic [7:0] vhp, logic [31:0] pc);
    logic [7:0] x;
    x = vhp ^ pc[7:0];
    if (IW >= 8) return IW'(x);
    else         return x[IW-1:0] ^ IW'(x >> IW);
  endfunction

  // ---------------- lookup ----------------
  logic [IW-1:0] lk_idx;
  vht_t          lk_e;
  logic [3:0][1:0] lk_cnt;
  logic [1:0]    lk_best;

  always_comb begin
    lk_idx = lk_pc[IW-1:0];
    lk_e   = vht[lk_idx];
    lk_hit = lk_e.valid && (lk_e.tag == lk_pc[31:IW]);
    lk_cnt = pht[pht_index(lk_e.vhp, lk_pc)];
    lk_best = 2'd0;
    for (int s = 1; s < 4; s++)
      if (lk_cnt[s] > lk_cnt[lk_best]) lk_best = 2'(s);
    lk_to_code  = lk_e.data[lk_best];
    lk_out_zero = lk_e.oz;
    lk_predict  = lk_hit && (int'(lk_cnt[lk_best]) > CONF_THRESHOLD)
                  && to_code_legal(lk_to_code);
  end

  // ---------------- update ----------------
  logic [IW-1:0] up_idx, up_pidx;
  vht_t          up_e, up_n;
  logic          up_hit;
  logic [1:0]    up_slot;
  logic          up_found;
  logic [3:0][1:0] up_cnt_n;

  always_comb begin
    up_idx  = up_pc[IW-1:0];
    up_e    = vht[up_idx];
    up_hit  = up_e.valid && (up_e.tag == up_pc[31:IW]);
    up_pidx = pht_index(up_e.vhp, up_pc);
    up_n    = up_e;
    up_cnt_n = pht[up_pidx];

    // slot holding the committed code, else the least recently used slot
    up_found = 1'b0;
    up_slot  = 2'd0;
    for (int s = 0; s < 4; s++)
      if (!up_found && up_e.data[s] == up_to_code) begin
        up_found = 1'b1;
        up_slot  = 2'(s);
      end
    if (!up_found)
      for (int s = 0; s < 4; s++)
        if (up_e.lru[s] == 2'd3) up_slot = 2'(s);

    if (up_hit && up_trivial) begin
      up_n.data[up_slot] = up_to_code;
      for (int s = 0; s < 4; s++) begin
        if (s == int'(up_slot)) begin
          up_n.lru[s] = 2'd0;
          if (up_cnt_n[s] != 2'd3) up_cnt_n[s] = up_cnt_n[s] + 2'd1;
        end else begin
          if (up_e.lru[s] < up_e.lru[up_slot]) up_n.lru[s] = up_e.lru[s] + 2'd1;
          if (up_cnt_n[s] != 2'd0) up_cnt_n[s] = up_cnt_n[s] - 2'd1;
        end
      end
      up_n.vhp = {up_e.vhp[5:0], up_slot};
      up_n.oz  = up_out_zero;
    end else if (up_hit) begin
      for (int s = 0; s < 4; s++)
        if (up_cnt_n[s] != 2'd0) up_cnt_n[s] = up_cnt_n[s] - 2'd1;
    end else begin
      // allocation of a new instruction
      up_n.valid = 1'b1;
      up_n.tag   = up_pc[31:IW];
      up_n.data  = {EMPTY, EMPTY, EMPTY, up_to_code};
      up_n.lru   = {2'd3, 2'd2, 2'd1, 2'd0};
      up_n.vhp   = 8'd0;
      up_n.oz    = up_out_zero;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        vht[i] <= '0;
        pht[i] <= '0;
      end
    end else if (up_valid) begin
      if (up_hit || up_trivial) vht[up_idx] <= up_n;
      if (up_hit) pht[up_pidx] <= up_cnt_n;
    end
  end

endmodule
