// cdpb_top_tb: end-to-end run of the prefetching and bypassing mechanism at
// its default sizes.
//
// The testbench plays the out-of-order core and the L1 cache. It runs
// strided "loops", each the code a compiler emits for one array reference:
//   pref# rD, mask   (or load# rD, mask)   -- binds the marked line elements
//   load  rD / rD+1 / ...                  -- bypassed at decode, in the same
//                                             4-wide bundle or the next one
//   consumer reads of the loaded registers
// An L1 model answers a line read after 1 cycle if the line is present and
// after MISS_LAT cycles if not; lines arrive in it from demand reads and,
// MISS_LAT cycles after issue, from the hardware prefetches on pf_*. Core
// demand traffic occupies random L1 ports. Checked against values computed
// here: bypass decisions and the registers given to the loads, the ready bit
// of a bypassed register before its line arrives, the values the line binder
// writes, and every prefetch address (it must be the line of EA + N x stride
// of an executed pref#/load#). Phases: few streams (table hits, prefetches
// that turn misses into hits), 20 streams in turn (LRU evictions), ports
// held busy (prefetches wait, the buffer overflows), frees held back (rename
// stalls), and a sub-line stride (no prefetch for the same line). Each of
// these mechanisms is counted and must happen at least once.
module cdpb_top_tb
  import cdpb_pkg::*;
;
  localparam int unsigned E = 4, PR = 96, MISS_LAT = 12, NSTR = 20;
  logic clk = 0, rst_n = 0;
  localparam int unsigned W = 4;
  logic [W-1:0] dec_valid = 0;
  op_e  [W-1:0] dec_op;
  logic [W-1:0][4:0] dec_dest = 0;
  logic [W-1:0][E-1:0] dec_mask = 0;
  logic [W-1:0][1:0][4:0] dec_src = 0;
  logic [W-1:0][1:0][6:0] src_preg;
  logic [W-1:0] dec_stall, dec_bypassed;
  logic [W-1:0][6:0] dec_pdest, dec_old_pdest;
  logic [W-1:0][E-1:0][6:0] dec_pregs, dec_stale_preg;
  logic [W-1:0][2:0] dec_nregs;
  logic [W-1:0][E-1:0] dec_stale;
  logic [PR-1:0] free_vec = 0;
  logic ex_valid = 0, ex_type = 0;
  logic [31:0] ex_pc = 0, ex_ea = 0, pf_addr;
  logic [1:0] demand_busy = 0, pf_port;
  logic pf_valid;
  logic resp_valid = 0, resp_ready;
  logic [E-1:0][63:0] resp_line = 0;
  logic [E-1:0] resp_mask = 0;
  logic [E-1:0][6:0] resp_pregs = 0;
  logic wb_valid = 0;
  logic [6:0] wb_preg = 0;
  logic [63:0] wb_data = 0;
  logic [1:0][6:0] rd_preg = 0;
  logic [1:0][63:0] rd_data;
  logic [1:0] rd_ready;
  logic stat_hit, stat_alloc, stat_evict, stat_enq, stat_drop, stat_noline, stat_wait, stat_bind;

  cdpb_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_hit = 0, c_alloc = 0, c_evict = 0, c_enq = 0, c_drop = 0, c_noline = 0, c_wait = 0,
      c_bind = 0, c_pf = 0, c_byp = 0, c_early = 0, c_pfhit = 0, c_stall = 0, c_miss = 0, c_inb = 0;
  longint cyc = 0;
  int busy_mode = 0;            // 0 random, 1 all busy
  bit hold_free = 0;
  logic [PR-1:0] held = 0, to_free = 0;

  longint ready_at[longint];    // L1 line -> cycle it is present
  bit     predicted[longint];   // lines a prefetch may legally target

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s cycle %0d", what, cyc); end
  endtask

  function automatic logic [63:0] mem_word(input logic [31:0] a);
    return {a ^ 32'hA5A5_0000, ~a};
  endfunction

  // clock-edge bookkeeping: counters, prefetch monitor, port traffic, frees
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    c_hit <= c_hit + int'(stat_hit);     c_alloc <= c_alloc + int'(stat_alloc);
    c_evict <= c_evict + int'(stat_evict); c_enq <= c_enq + int'(stat_enq);
    c_drop <= c_drop + int'(stat_drop);  c_noline <= c_noline + int'(stat_noline);
    c_wait <= c_wait + int'(stat_wait);  c_bind <= c_bind + int'(stat_bind);
    if (pf_valid) begin
      c_pf <= c_pf + 1;
      check(predicted.exists(longint'(pf_addr)), "prefetch address predicted");
      check((pf_port & demand_busy) == 0, "prefetch on a free port");
      if (!ready_at.exists(longint'(pf_addr))) ready_at[longint'(pf_addr)] = cyc + MISS_LAT;
    end
  end
  always @(negedge clk) begin
    demand_busy <= (busy_mode == 1) ? 2'b11 : 2'($urandom_range(0, 3));
    if (hold_free) begin held |= to_free; free_vec <= '0; end
    else begin free_vec <= to_free | held; held = '0; end
    to_free = '0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // streams
  logic [31:0] s_pc[NSTR], s_ea[NSTR], s_st[NSTR], s_last[NSTR];
  bit          s_seen[NSTR], s_ld[NSTR];
  logic [E-1:0] s_mask[NSTR];
  int          s_dest[NSTR];

  // Check the covered loads decoded in slots k0.. of the current bundle:
  // bypassed, given the bound register, and that register not yet ready.
  task automatic check_loads(input int k0, input int first, input int n,
                             input logic [E-1:0][6:0] pregs, input bit in_bundle);
    for (int j = first; j < n; j++) begin
      automatic int k = k0 + j - first;
      check(!dec_stall[k], "bypassed load needs no register");
      check(dec_bypassed[k], "load bypassed");
      check(dec_pdest[k] == pregs[j], "bypassed load gets the bound register");
      to_free[dec_old_pdest[k]] = 1;
      c_byp++;
      if (in_bundle) c_inb++;
      // a register allocated in this very cycle is marked not ready at the
      // clock edge; that case is checked in the next cycle (check_not_ready)
      if (!in_bundle) check_not_ready(pregs[j]);
    end
  endtask

  task automatic check_not_ready(input logic [6:0] p);
    rd_preg[0] = p;
    #1;
    if (!rd_ready[0]) c_early++;
    check(rd_ready[0] == 0, "bound register not ready before its line arrives");
  endtask

  // one loop iteration of stream s
  task automatic iterate(input int s);
    logic [E-1:0][6:0] pregs;
    logic [E-1:0] mask;
    logic [31:0] ea, line;
    int n, lat, first;
    longint t_ex;
    bit present, same;
    mask = s_mask[s];
    ea   = s_ea[s];
    line = ea & ~32'h1F;
    // decode: the pref#/load# in slot 0; the loads it covers either in the
    // same bundle or in the next one (retry while the free list is empty)
    first = s_ld[s] ? 1 : 0;
    n = 0;
    for (int e = 0; e < E; e++) n += mask[e];
    same = (s % 2 == 0) && (n - first <= int'(W) - 1);
    @(negedge clk);
    dec_valid = '0;
    dec_valid[0] = 1; dec_op[0] = s_ld[s] ? OP_LOADB : OP_PREFB;
    dec_dest[0] = 5'(s_dest[s]); dec_mask[0] = mask;
    if (same)
      for (int j = first; j < n; j++) begin
        automatic int k = 1 + j - first;
        dec_valid[k] = 1; dec_op[k] = OP_LOAD; dec_dest[k] = 5'((s_dest[s] + j) % 32); dec_mask[k] = '0;
      end
    #1;
    while (dec_stall[0]) begin
      c_stall++;
      hold_free = 0;
      @(negedge clk); #1;
    end
    pregs = dec_pregs[0];
    check(int'(dec_nregs[0]) == n, "registers bound by pref#/load#");
    for (int j = 0; j < E; j++) if (j < n && dec_stale[0][j]) to_free[dec_stale_preg[0][j]] = 1;
    if (s_ld[s]) to_free[dec_old_pdest[0]] = 1;
    if (same) check_loads(1, first, n, pregs, 1);
    // execution: the prefetcher sees PC and EA
    @(negedge clk);
    dec_valid = '0;
    ex_valid = 1; ex_pc = s_pc[s]; ex_ea = ea; ex_type = s_ld[s];
    t_ex = cyc;
    if (same) for (int j = first; j < n; j++) check_not_ready(pregs[j]);
    if (s_seen[s]) begin
      longint tgt = (longint'(ea) + (s_ld[s] ? 2 : 1) * (longint'($signed(ea)) - longint'($signed(s_last[s])))) & 64'hFFFF_FFE0;
      predicted[tgt] = 1;
    end
    s_seen[s] = 1; s_last[s] = ea;
    present = ready_at.exists(longint'(line)) && ready_at[longint'(line)] <= cyc;
    if (present && ready_at[longint'(line)] > 0) begin
      // present thanks to a prefetch (demand-filled lines are stored as 0)
      c_pfhit++;
    end
    if (!present) c_miss++;
    lat = present ? 1 : MISS_LAT;
    if (!same) begin
      // the covered loads, one bundle, decoded while the line is on its way
      @(negedge clk);
      ex_valid = 0;
      for (int j = first; j < n; j++) begin
        automatic int k = j - first;
        dec_valid[k] = 1; dec_op[k] = OP_LOAD; dec_dest[k] = 5'((s_dest[s] + j) % 32); dec_mask[k] = '0;
      end
      #1;
      check_loads(0, first, n, pregs, 0);
    end
    @(negedge clk);
    dec_valid = 0; ex_valid = 0;
    // L1 answers the pref#/load# line read
    while (cyc < t_ex + lat) @(negedge clk);
    resp_valid = 1; resp_mask = mask; resp_pregs = pregs;
    for (int e = 0; e < E; e++) resp_line[e] = mem_word(line + 32'(8 * e));
    #1;
    while (!resp_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    resp_valid = 0;
    if (!ready_at.exists(longint'(line))) ready_at[longint'(line)] = 0;
    repeat (n + 1) @(negedge clk);
    // consumers read the bound values
    begin
      int r = 0;
      for (int e = 0; e < E; e++) if (mask[e]) begin
        rd_preg[1] = pregs[r];
        #1;
        check(rd_ready[1], "bound register ready");
        check(rd_data[1] == mem_word(line + 32'(8 * e)), "bound value");
        r++;
      end
    end
    s_ea[s] = ea + s_st[s];
  endtask

  initial begin
    for (int s = 0; s < NSTR; s++) begin
      s_pc[s]   = 32'h0040_1000 + 32'(s * 64);
      s_ea[s]   = 32'h1000_0000 + 32'(s) * 32'h0010_0000;
      s_st[s]   = (s == 3) ? 32'd8 : (s % 4 == 1) ? 32'd64 : (s % 4 == 2) ? -32'd32 : 32'd32;
      s_ld[s]   = (s % 2 == 1);
      s_mask[s] = (s == 3) ? 4'b0001 : (s % 3 == 0) ? 4'b1111 : 4'b0111;
      s_dest[s] = 4 * (s % 6);
      s_seen[s] = 0;
    end
    for (int k = 0; k < W; k++) dec_op[k] = OP_OTHER;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: six streams, random port traffic
    for (int k = 0; k < 60; k++) iterate(k % 6);
    // phase 2: twenty streams round robin (more than the table holds)
    for (int k = 0; k < 60; k++) iterate(k % NSTR);
    // phase 3: ports held by demand traffic
    busy_mode = 1;
    for (int k = 0; k < 24; k++) iterate(k % 6);
    busy_mode = 0;
    // phase 4: commit delayed, registers run out
    hold_free = 1;
    for (int k = 0; k < 30; k++) iterate(k % 6);
    hold_free = 0;
    for (int k = 0; k < 30; k++) iterate(k % 6);
    repeat (40) @(negedge clk);
    check(c_hit > 0,    "table hit happened");
    check(c_alloc > 0,  "table allocation happened");
    check(c_evict > 0,  "LRU eviction happened");
    check(c_enq > 0 && c_pf > 0, "prefetch issued");
    check(c_wait > 0,   "prefetch waited for a port");
    check(c_drop > 0,   "prefetch buffer overflow happened");
    check(c_noline > 0, "same-line prefetch suppressed");
    check(c_byp > 0,    "load bypassed");
    check(c_early > 0,  "bypassed load decoded before its data");
    check(c_bind > 0,   "line elements bound into registers");
    check(c_pfhit > 0,  "prefetched line found in L1");
    check(c_stall > 0,  "rename stalled on an empty free list");
    check(c_inb > 0,    "load bypassed inside the bundle of its pref#/load#");
    $display("hits=%0d allocs=%0d evicts=%0d enq=%0d pf=%0d wait=%0d drop=%0d sameline=%0d",
             c_hit, c_alloc, c_evict, c_enq, c_pf, c_wait, c_drop, c_noline);
    $display("bypassed=%0d (in bundle %0d) early=%0d bind_writes=%0d l1_hits_by_prefetch=%0d l1_misses=%0d stalls=%0d cycles=%0d",
             c_byp, c_inb, c_early, c_bind, c_pfhit, c_miss, c_stall, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
