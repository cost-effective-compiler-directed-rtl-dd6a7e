// decoupled_prefetcher_tb: cycle-accurate check of the prefetch assist.
//
// A reference model, written independently of the RTL, keeps an LRU table of
// PC -> (last address), the stage-2 register and the request buffer. Each
// cycle it predicts whether a prefetch leaves, on which port and for which
// line, and the test compares this with pf_valid/pf_port/pf_addr. Part 1 is
// directed: one pref# and one load# stream on an idle cache, checking the
// N x stride target and the two-cycle latency. Part 2 is random: 20 strided
// instruction streams (more than the 16 table entries) over busy ports, so
// table hits, allocations, evictions, sub-line strides, waits for a port and
// buffer overflow all occur; each is counted and must occur.
module decoupled_prefetcher_tb;
  localparam int unsigned ENTRIES = 16, QDEPTH = 8, PORTS = 2;
  logic clk = 0, rst_n = 0;
  logic ex_valid = 0, ex_type = 0;
  logic [31:0] ex_pc = 0, ex_ea = 0, pf_addr;
  logic [PORTS-1:0] demand_busy = 0, pf_port;
  logic pf_valid, stat_hit, stat_alloc, stat_evict, stat_enq, stat_drop, stat_noline, stat_wait;
  int checks = 0, failures = 0;
  int c_hit = 0, c_alloc = 0, c_evict = 0, c_enq = 0, c_drop = 0, c_noline = 0, c_wait = 0, c_issue = 0;

  decoupled_prefetcher #(.ENTRIES(ENTRIES), .QDEPTH(QDEPTH), .PORTS(PORTS)) dut (.*);
  always #5 clk = ~clk;

  // ---- model ----
  bit          t_v [ENTRIES];
  logic [31:0] t_pc[ENTRIES], t_ea[ENTRIES];
  longint      t_use[ENTRIES], now = 0;
  bit          m_s2v; logic [31:0] m_s2addr;
  logic [31:0] mq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s at cycle %0d", what, now); end
  endtask

  // Evaluate one cycle with inputs already applied (called between edges).
  task automatic model_cycle();
    int h, v, idx;
    bit grant, popd, exp_evict;
    logic [1:0] port;
    // issue from the buffer head
    grant = 0; port = 0;
    if (mq.size() != 0) begin
      if (!demand_busy[0]) begin grant = 1; port = 2'b01; end
      else if (!demand_busy[1]) begin grant = 1; port = 2'b10; end
    end
    check(pf_valid == grant, "pf_valid");
    if (grant) begin
      check(pf_port == port, "pf_port");
      check(pf_addr == mq[0], "pf_addr");
      c_issue++;
    end
    if (mq.size() != 0 && !grant) c_wait++;
    check(stat_wait == (mq.size() != 0 && !grant), "stat_wait");
    // stage 2 pushes
    popd = grant;
    if (grant) void'(mq.pop_front());
    if (m_s2v) begin
      if (mq.size() < QDEPTH) begin mq.push_back(m_s2addr); c_enq++; end
      else c_drop++;
    end
    // stage 1 table
    now++;
    m_s2v = 0;
    if (ex_valid) begin
      h = -1; v = -1;
      for (int i = 0; i < ENTRIES; i++) if (t_v[i] && t_pc[i] == ex_pc) h = i;
      for (int i = ENTRIES - 1; i >= 0; i--) if (!t_v[i]) v = i;
      exp_evict = (h < 0 && v < 0);
      check(stat_hit == (h >= 0), "stat_hit");
      check(stat_evict == exp_evict, "stat_evict");
      if (h >= 0) begin
        longint s, tgt;
        s   = longint'($signed(ex_ea)) - longint'($signed(t_ea[h]));
        tgt = (longint'(ex_ea) + (ex_type ? 2 : 1) * s) & 64'hFFFF_FFE0;
        if (tgt != (longint'(ex_ea) & 64'hFFFF_FFE0)) begin m_s2v = 1; m_s2addr = 32'(tgt); end
        else c_noline++;
        c_hit++; idx = h;
      end else begin
        c_alloc++;
        if (v >= 0) idx = v;
        else begin
          c_evict++;
          idx = 0;
          for (int i = 1; i < ENTRIES; i++) if (t_use[i] < t_use[idx]) idx = i;
        end
      end
      t_v[idx] = 1; t_pc[idx] = ex_pc; t_ea[idx] = ex_ea; t_use[idx] = now;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] s_pc[20], s_ea[20], s_st[20];
  int lat_start, lat;

  initial begin
    for (int i = 0; i < ENTRIES; i++) t_v[i] = 0;
    m_s2v = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- part 1: directed, idle ports ----
    // pref# at PC 0x100, stride 64: second execution prefetches EA+64.
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      ex_valid = 1; ex_pc = 32'h100; ex_ea = 32'h8000 + 64 * k; ex_type = 0;
      #1 model_cycle();
    end
    @(negedge clk); ex_valid = 0; #1 model_cycle();
    // latency of one load# (stride 32, depth 2): exec in cycle c, issue in c+2
    @(negedge clk); ex_valid = 1; ex_pc = 32'h200; ex_ea = 32'h9000; ex_type = 1; #1 model_cycle();
    repeat (3) begin @(negedge clk); ex_valid = 0; #1 model_cycle(); end
    @(negedge clk); ex_valid = 1; ex_ea = 32'h9020; #1 model_cycle();
    lat_start = int'(now);
    lat = -1;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); ex_valid = 0; #1;
      if (pf_valid && lat < 0) begin
        lat = int'(now) - lat_start + 1;
        check(pf_addr == 32'h9060, "load# depth-2 target");
      end
      model_cycle();
    end
    check(lat == 2, "two-cycle issue latency");
    $display("issue latency = %0d cycles", lat);
    // ---- part 2: random streams over busy ports ----
    for (int i = 0; i < 20; i++) begin
      s_pc[i] = 32'h0040_0000 + 16 * i;
      s_ea[i] = $urandom & 32'hFFFF_FFF8;
      s_st[i] = (i % 5 == 0) ? 32'd8 : 32'(8 * $urandom_range(1, 40)) * ((i % 3 == 0) ? -1 : 1);
    end
    for (int n = 0; n < 6000; n++) begin
      int k;
      @(negedge clk);
      k = (n / 2000 == 1) ? $urandom_range(0, 19) : $urandom_range(0, 11);
      ex_valid = ($urandom_range(0, 3) != 0);
      ex_pc    = s_pc[k];
      ex_ea    = s_ea[k];
      ex_type  = k[0];
      if (ex_valid) s_ea[k] = s_ea[k] + s_st[k];
      demand_busy = (n / 1000 == 4) ? 2'b11 : 2'($urandom_range(0, 3));
      #1 model_cycle();
    end
    @(negedge clk); ex_valid = 0; demand_busy = 0;
    repeat (20) begin #1 model_cycle(); @(negedge clk); end
    check(c_hit > 0 && c_alloc > 0 && c_evict > 0, "table hit/alloc/evict exercised");
    check(c_enq > 0 && c_issue > 0 && c_wait > 0 && c_drop > 0 && c_noline > 0, "buffer enq/issue/wait/drop and same-line suppression exercised");
    $display("hits=%0d allocs=%0d evicts=%0d enq=%0d issued=%0d wait=%0d drop=%0d sameline=%0d",
             c_hit, c_alloc, c_evict, c_enq, c_issue, c_wait, c_drop, c_noline);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
