// cdpb_top: decoupled prefetching on top of memory instruction bypassing.
//
// The whole mechanism as it sits beside an out-of-order core and its L1 data
// cache. It has two halves that share no state, only a purpose:
//   * Bypassing (binding, in the register file): bypass_rename handles the
//     rename stage. A pref#/load# takes a physical register for each line
//     element the compiler marked and records special mappings for
//     consecutive logical registers; the normal loads that later read those
//     elements are recognised at decode and never reach the load/store unit,
//     their mapping is just moved into the main map table. When the line read
//     by the pref#/load# comes back from the L1 cache, line_binder writes the
//     elements into phys_regfile, whose ready bits make consumers wait if the
//     data is not there yet.
//   * Prefetching (non-binding, into L1): decoupled_prefetcher watches the
//     same pref#/load# instructions as they execute, learns each one's stride
//     in a small PC-tagged table and prefetches the line N strides ahead
//     through an L1 port the core leaves free, so that the next execution of
//     that instruction finds its line in the cache.
// The core (decode, execute, commit), the caches and memory are outside; they
// connect through the ports below. The core carries dec_pregs of a pref#/
// load# to its L1 access and returns them with the line on resp_*; it frees
// dec_old_pdest and the dec_stale_preg registers flagged in dec_stale at
// commit through free_vec, and uses write port wb_* for its own results.
//
// Timing: a decode bundle of DEC_W instructions is renamed per cycle, in
// order, with combinational outputs (see bypass_rename); prefetches
// leave two or more cycles after ex_valid (see decoupled_prefetcher), line
// elements are written one per cycle after the response (see line_binder).
// rst_n is synchronous, active low. Organisation and defaults (4-wide
// decode, 16 table entries, depth 1 for pref# and 2 for load#, two L1 ports)
// follow the published 4-way configuration; widths, register and buffer
// counts are this design's choices.
module cdpb_top
  import cdpb_pkg::*;
#(
  parameter int unsigned DEC_W      = 4,
  parameter int unsigned ENTRIES    = 16,
  parameter int unsigned PORTS      = 2,
  parameter int unsigned QDEPTH     = 8,
  parameter int unsigned DEPTH_PREF = 1,
  parameter int unsigned DEPTH_LOAD = 2,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 64,
  parameter int unsigned LINE_ELEMS = 4,
  parameter int unsigned LOG_REGS   = 32,
  parameter int unsigned PHYS_REGS  = 96,
  localparam int unsigned LINE_BYTES = LINE_ELEMS * DATA_W / 8,
  localparam int unsigned LW  = $clog2(LOG_REGS),
  localparam int unsigned PRW = $clog2(PHYS_REGS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // rename stage
  input  logic [DEC_W-1:0]                            dec_valid,
  input  op_e  [DEC_W-1:0]                            dec_op,
  input  logic [DEC_W-1:0][LW-1:0]                    dec_dest,
  input  logic [DEC_W-1:0][LINE_ELEMS-1:0]            dec_mask,
  input  logic [DEC_W-1:0][1:0][LW-1:0]               dec_src,
  output logic [DEC_W-1:0][1:0][PRW-1:0]              src_preg,
  output logic [DEC_W-1:0]                            dec_stall,
  output logic [DEC_W-1:0]                            dec_bypassed,
  output logic [DEC_W-1:0][PRW-1:0]                   dec_pdest,
  output logic [DEC_W-1:0][PRW-1:0]                   dec_old_pdest,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0][PRW-1:0]   dec_pregs,
  output logic [DEC_W-1:0][$clog2(LINE_ELEMS+1)-1:0]  dec_nregs,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0]            dec_stale,
  output logic [DEC_W-1:0][LINE_ELEMS-1:0][PRW-1:0]   dec_stale_preg,
  input  logic [PHYS_REGS-1:0]              free_vec,
  // pref#/load# execution (drives the hardware prefetcher)
  input  logic                              ex_valid,
  input  logic [PC_W-1:0]                   ex_pc,
  input  logic [ADDR_W-1:0]                 ex_ea,
  input  logic                              ex_type,
  // L1 ports: demand use and prefetch issue
  input  logic [PORTS-1:0]                  demand_busy,
  output logic                              pf_valid,
  output logic [PORTS-1:0]                  pf_port,
  output logic [ADDR_W-1:0]                 pf_addr,
  // line returned for a pref#/load#
  input  logic                              resp_valid,
  output logic                              resp_ready,
  input  logic [LINE_ELEMS-1:0][DATA_W-1:0] resp_line,
  input  logic [LINE_ELEMS-1:0]             resp_mask,
  input  logic [LINE_ELEMS-1:0][PRW-1:0]    resp_pregs,
  // core write-back and operand read
  input  logic                              wb_valid,
  input  logic [PRW-1:0]                    wb_preg,
  input  logic [DATA_W-1:0]                 wb_data,
  input  logic [1:0][PRW-1:0]               rd_preg,
  output logic [1:0][DATA_W-1:0]            rd_data,
  output logic [1:0]                        rd_ready,
  // event pulses
  output logic                              stat_hit,
  output logic                              stat_alloc,
  output logic                              stat_evict,
  output logic                              stat_enq,
  output logic                              stat_drop,
  output logic                              stat_noline,
  output logic                              stat_wait,
  output logic                              stat_bind
);
  logic [PHYS_REGS-1:0] alloc_vec;
  logic                 b_wr_en;
  logic [PRW-1:0]       b_wr_preg;
  logic [DATA_W-1:0]    b_wr_data;

  bypass_rename #(.DEC_W(DEC_W), .LOG_REGS(LOG_REGS), .PHYS_REGS(PHYS_REGS), .LINE_ELEMS(LINE_ELEMS)) u_rename (
    .clk, .rst_n,
    .dec_valid, .dec_op, .dec_dest, .dec_mask, .dec_src, .src_preg,
    .dec_stall, .dec_bypassed, .dec_pdest, .dec_old_pdest,
    .dec_pregs, .dec_nregs, .dec_stale, .dec_stale_preg,
    .alloc_vec, .free_vec
  );

  line_binder #(.LINE_ELEMS(LINE_ELEMS), .DATA_W(DATA_W), .PHYS_REGS(PHYS_REGS)) u_binder (
    .clk, .rst_n,
    .resp_valid, .resp_ready, .resp_line, .resp_mask, .resp_pregs,
    .wr_en(b_wr_en), .wr_preg(b_wr_preg), .wr_data(b_wr_data)
  );

  phys_regfile #(.PHYS_REGS(PHYS_REGS), .DATA_W(DATA_W)) u_prf (
    .clk, .rst_n, .alloc_vec,
    .wr_en({b_wr_en, wb_valid}),
    .wr_preg({b_wr_preg, wb_preg}),
    .wr_data({b_wr_data, wb_data}),
    .rd_preg, .rd_data, .rd_ready
  );

  decoupled_prefetcher #(
    .ENTRIES(ENTRIES), .PC_W(PC_W), .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES),
    .DEPTH_PREF(DEPTH_PREF), .DEPTH_LOAD(DEPTH_LOAD), .QDEPTH(QDEPTH), .PORTS(PORTS)
  ) u_pf (
    .clk, .rst_n, .ex_valid, .ex_pc, .ex_ea, .ex_type, .demand_busy,
    .pf_valid, .pf_port, .pf_addr,
    .stat_hit, .stat_alloc, .stat_evict, .stat_enq, .stat_drop, .stat_noline, .stat_wait
  );

  assign stat_bind = b_wr_en;
endmodule
