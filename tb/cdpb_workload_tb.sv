// cdpb_workload_tb: prefetch coverage of strided loop kernels.
//
// Loop kernels are modelled by their pref# instructions only: a kernel with R
// array references executes, every iteration, R pref# instructions at R
// different PCs, each walking its array one 32-byte line per iteration. The
// same stimulus drives two copies of the design: one at the default 16-entry
// table and one with 32 entries. For every pref# execution the testbench
// records whether its line was prefetched earlier (coverage). Expected, and
// checked:
//   * 8 references: both tables hold every stream; after warm-up nearly all
//     lines are covered.
//   * 20 references: visited in turn, they defeat LRU in a 16-entry table
//     (every lookup misses, nothing is prefetched) but fit in 32 entries.
//   * A stride of 8 bytes (four pref# per line) prefetches each new line
//     once, as the line changes.
// Coverage counts a line as prefetched once the prefetch has been issued;
// memory latency is not modelled here (cdpb_top_tb does that).
module cdpb_workload_tb
  import cdpb_pkg::*;
;
  logic clk = 0, rst_n = 0;
  logic ex_valid = 0;
  logic [31:0] ex_pc = 0, ex_ea = 0;
  logic [1:0] demand_busy = 0;
  int checks = 0, failures = 0;

  // outputs of the two copies
  logic        pf_v [2];
  logic [31:0] pf_a [2];
  logic [1:0]  pf_p [2];
  bit          seen [2][longint];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic [3:0][1:0][6:0] src_preg;
    logic [1:0][6:0] rd_preg;
    logic [3:0] dec_stall, dec_bypassed;
    logic resp_ready;
    logic [3:0][6:0] dec_pdest, dec_old_pdest;
    logic [3:0][3:0][6:0] dec_pregs, dec_stale_preg;
    logic [3:0][2:0] dec_nregs;
    logic [3:0][3:0] dec_stale;
    op_e  [3:0] no_op;
    assign no_op = {4{OP_OTHER}};
    logic [1:0][63:0] rd_data;
    logic [1:0] rd_ready;
    logic s0, s1, s2, s3, s4, s5, s6, s7;
    assign rd_preg = '0;
    cdpb_top #(.ENTRIES(g == 0 ? 16 : 32)) dut (
      .clk, .rst_n,
      .dec_valid('0), .dec_op(no_op), .dec_dest('0), .dec_mask('0), .dec_src('0),
      .src_preg, .dec_stall, .dec_bypassed, .dec_pdest, .dec_old_pdest, .dec_pregs,
      .dec_nregs, .dec_stale, .dec_stale_preg, .free_vec('0),
      .ex_valid, .ex_pc, .ex_ea, .ex_type(1'b0), .demand_busy,
      .pf_valid(pf_v[g]), .pf_port(pf_p[g]), .pf_addr(pf_a[g]),
      .resp_valid(1'b0), .resp_ready, .resp_line('0), .resp_mask('0), .resp_pregs('0),
      .wb_valid(1'b0), .wb_preg('0), .wb_data('0), .rd_preg, .rd_data, .rd_ready,
      .stat_hit(s0), .stat_alloc(s1), .stat_evict(s2), .stat_enq(s3), .stat_drop(s4),
      .stat_noline(s5), .stat_wait(s6), .stat_bind(s7)
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) for (int g = 0; g < 2; g++) if (pf_v[g]) seen[g][longint'(pf_a[g])] = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run a kernel; return the percentage of pref# lines (after the first two
  // iterations) that were prefetched before they were touched.
  task automatic kernel(input int refs, input int iters, input int stride, input int base_id,
                        output int cov[2]);
    int touched = 0, hit[2] = '{0, 0};
    logic [31:0] ea[32];
    for (int r = 0; r < refs; r++) ea[r] = 32'h2000_0000 + 32'((base_id + r) << 20);
    for (int i = 0; i < iters; i++)
      for (int r = 0; r < refs; r++) begin
        @(negedge clk);
        ex_valid = 1;
        ex_pc = 32'h0050_0000 + 32'((base_id + r) * 4);
        ex_ea = ea[r];
        demand_busy = 2'($urandom_range(0, 2));  // core traffic keeps one port free
        if (i >= 2) begin
          touched++;
          for (int g = 0; g < 2; g++) if (seen[g].exists(longint'(ea[r] & ~32'h1F))) hit[g]++;
        end
        ea[r] = ea[r] + 32'(stride);
        @(negedge clk);
        ex_valid = 0;   // one pref# every other cycle
      end
    @(negedge clk);
    repeat (10) @(negedge clk);
    for (int g = 0; g < 2; g++) cov[g] = (touched == 0) ? 0 : (100 * hit[g]) / touched;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c8[2], c20[2], cs[2];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    kernel(8, 40, 32, 0, c8);
    kernel(20, 40, 32, 100, c20);
    kernel(2, 64, 8, 200, cs);
    $display("coverage %%: 8 refs: 16e=%0d 32e=%0d | 20 refs: 16e=%0d 32e=%0d | stride 8: 16e=%0d 32e=%0d",
             c8[0], c8[1], c20[0], c20[1], cs[0], cs[1]);
    check(c8[0] >= 90 && c8[1] >= 90, "8 references covered by both tables");
    check(c20[0] == 0, "20 references in turn thrash a 16-entry LRU table");
    check(c20[1] >= 90, "20 references covered by a 32-entry table");
    // stride 8: each line is prefetched when the last element of the line
    // before it executes, so every touch after warm-up finds it
    check(cs[0] >= 90, "sub-line stride covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
