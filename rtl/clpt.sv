// clpt: Cache-Line Prefetching Table.
//
// A small, fully associative table tagged by the PC of pref#/load#
// instructions. Each entry keeps the last effective address produced by its
// instruction and a type bit (pref# or load#). When one of these instructions
// executes, its PC is compared with every tag in parallel:
//   * hit  : the stored last address is returned (the caller computes the
//            stride from it) and the entry takes the new address;
//   * miss : an entry is allocated, an invalid one first, otherwise the least
//            recently used one, and it takes the PC, address and type.
// Either way the entry touched becomes the most recently used.
//
// LRU is kept as an age rank per entry: the ranks are always a permutation of
// 0..ENTRIES-1 (0 = most recent). Touching entry k increments every rank
// below rank(k) and sets rank(k) to 0; the victim is the entry of rank
// ENTRIES-1. Table organisation (fully associative, PC tag, LRU, last
// address, type bit) follows the mechanism as published; the rank encoding,
// the invalid-first fill and the field widths are this design's choices.
//
// Timing: hit, last_ea, hit_type and evict are combinational from the lookup
// inputs; the update happens at the rising clock edge when lk_valid is high.
// rst_n is synchronous and active low; it invalidates every entry.
module clpt #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned ADDR_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lk_valid,
  input  logic [PC_W-1:0]   lk_pc,
  input  logic [ADDR_W-1:0] lk_ea,
  input  logic              lk_type,
  output logic              hit,
  output logic [ADDR_W-1:0] last_ea,
  output logic              hit_type,
  output logic              evict
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0]       valid_q;
  logic [PC_W-1:0]          tag_q  [ENTRIES];
  logic [ADDR_W-1:0]        lea_q  [ENTRIES];
  logic                     type_q [ENTRIES];
  logic [IW-1:0]            rank_q [ENTRIES];

  logic [IW-1:0] hit_idx, vic_idx, use_idx;
  logic          any_invalid;

  // Tag match and victim choice.
  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && tag_q[i] == lk_pc && !hit) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
    any_invalid = 1'b0;
    vic_idx     = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (rank_q[i] == IW'(ENTRIES - 1)) vic_idx = IW'(i);
    end
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        any_invalid = 1'b1;
        vic_idx     = IW'(i);
      end
    end
    use_idx  = hit ? hit_idx : vic_idx;
    last_ea  = lea_q[hit_idx];
    hit_type = type_q[hit_idx];
    evict    = lk_valid && !hit && !any_invalid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        rank_q[i] <= IW'(i);
        tag_q[i]  <= '0;
        lea_q[i]  <= '0;
        type_q[i] <= 1'b0;
      end
    end else if (lk_valid) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (IW'(i) == use_idx)             rank_q[i] <= '0;
        else if (rank_q[i] < rank_q[use_idx]) rank_q[i] <= rank_q[i] + 1'b1;
      end
      valid_q[use_idx] <= 1'b1;
      tag_q[use_idx]   <= lk_pc;
      lea_q[use_idx]   <= lk_ea;
      type_q[use_idx]  <= lk_type;
    end
  end

// The ranks must stay a permutation: exactly one entry is the LRU victim.
  logic [ENTRIES-1:0] lru_vec;
  always_comb
    for (int i = 0; i < ENTRIES; i++) lru_vec[i] = (rank_q[i] == IW'(ENTRIES - 1));
  a_lru_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(lru_vec))
    else $error("clpt: LRU ranks corrupted");
endmodule
