// decoupled_prefetcher: the compiler-controlled hardware prefetch assist.
//
// Only pref# and load# instructions, chosen by the compiler, drive this
// unit, so it needs no filtering. Each time one of them executes, its PC,
// effective address and type enter a two-stage pipeline:
//   stage 1  the Cache-Line Prefetching Table (clpt) is searched by PC and
//            updated with the new address (allocated over the LRU entry on
//            a miss); a hit passes the old address and the entry's type bit
//            on. The type bit selects the prefetch depth N.
//   stage 2  pf_addr_gen computes stride = EA - last EA and the line of
//            EA + N*stride (N = DEPTH_PREF or DEPTH_LOAD by type); a request
//            for a new line is pushed into the prefetch buffer (pf_queue).
// The buffer keeps each line address until l1_port_arb finds an L1 port that
// the core's demand accesses leave free; the prefetch then leaves on
// pf_valid/pf_port/pf_addr and brings the line into the L1 cache only (it is
// non-binding and never touches registers).
//
// The table, the stride and N x stride rule, per-type depths and holding the
// request until a free port follow the published mechanism; the two-stage
// split, the buffer depth and dropping requests when it is full are this
// design's choices.
//
// Timing: an instruction executing in cycle t can issue its prefetch in cycle
// t+2 at the earliest. The stat_* outputs are one-cycle event pulses:
// stat_hit/stat_alloc/stat_evict in stage 1, stat_enq/stat_drop/stat_noline
// in stage 2, stat_wait in each cycle a request waits for a port.
module decoupled_prefetcher #(
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned DEPTH_PREF = 1,
  parameter int unsigned DEPTH_LOAD = 2,
  parameter int unsigned QDEPTH     = 8,
  parameter int unsigned PORTS      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ex_valid,
  input  logic [PC_W-1:0]   ex_pc,
  input  logic [ADDR_W-1:0] ex_ea,
  input  logic              ex_type,      // 0: pref#, 1: load#
  input  logic [PORTS-1:0]  demand_busy,
  output logic              pf_valid,
  output logic [PORTS-1:0]  pf_port,
  output logic [ADDR_W-1:0] pf_addr,
  output logic              stat_hit,
  output logic              stat_alloc,
  output logic              stat_evict,
  output logic              stat_enq,
  output logic              stat_drop,
  output logic              stat_noline,
  output logic              stat_wait
);
  // stage 1
  logic              hit, hit_type, evict;
  logic [ADDR_W-1:0] last_ea;
  // stage 2 registers
  logic              s2_v_q, s2_type_q;
  logic [ADDR_W-1:0] s2_ea_q, s2_last_q;
  logic              s2_req;
  logic [ADDR_W-1:0] s2_addr, s2_stride;
  // buffer
  logic              head_valid, full, drop, grant;
  logic [ADDR_W-1:0] head_addr;
  logic [$clog2(QDEPTH+1)-1:0] qcount;

  clpt #(.ENTRIES(ENTRIES), .PC_W(PC_W), .ADDR_W(ADDR_W)) u_clpt (
    .clk, .rst_n,
    .lk_valid(ex_valid), .lk_pc(ex_pc), .lk_ea(ex_ea), .lk_type(ex_type),
    .hit, .last_ea, .hit_type, .evict
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_v_q <= 1'b0;
    end else begin
      s2_v_q <= ex_valid && hit;
    end
    s2_type_q <= hit_type;   // depth chosen by the entry's type bit
    s2_ea_q   <= ex_ea;
    s2_last_q <= last_ea;
  end

  pf_addr_gen #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES),
                .DEPTH_PREF(DEPTH_PREF), .DEPTH_LOAD(DEPTH_LOAD)) u_agen (
    .in_valid(s2_v_q), .ea(s2_ea_q), .last_ea(s2_last_q), .itype(s2_type_q),
    .req(s2_req), .pf_addr(s2_addr), .stride(s2_stride)
  );

  pf_queue #(.DEPTH(QDEPTH), .ADDR_W(ADDR_W)) u_queue (
    .clk, .rst_n,
    .push(s2_req), .push_addr(s2_addr), .pop(grant),
    .head_valid, .head_addr, .full, .drop, .count(qcount)
  );

  l1_port_arb #(.PORTS(PORTS)) u_arb (
    .demand_busy, .pf_req(head_valid), .pf_grant(grant), .pf_port
  );

  always_comb begin
    pf_valid    = grant;
    pf_addr     = head_addr;
    stat_hit    = ex_valid && hit;
    stat_alloc  = ex_valid && !hit;
    stat_evict  = evict;
    stat_enq    = s2_req && !drop;
    stat_drop   = drop;
    stat_noline = s2_v_q && !s2_req;
    stat_wait   = head_valid && !grant;
  end

  // The stride value, the full flag and the occupancy are not needed by this
  // unit; they are kept on the submodules for observation.
  logic unused_ok;
  assign unused_ok = ^{s2_stride, full, qcount};
endmodule
