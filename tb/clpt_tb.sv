// clpt_tb: self-checking test of the Cache-Line Prefetching Table.
//
// Drives random lookups with PCs drawn from a pool larger than the table, so
// hits, invalid-entry fills and LRU evictions all happen, and compares hit,
// last_ea, hit_type and evict every cycle with a reference model that keeps a
// last-use time stamp per entry (the LRU entry is the oldest stamp).
module clpt_tb;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned NPC     = 22;

  logic        clk = 0, rst_n = 0;
  logic        lk_valid = 0, lk_type = 0;
  logic [31:0] lk_pc = 0, lk_ea = 0;
  logic        hit, hit_type, evict;
  logic [31:0] last_ea;
  int checks = 0, failures = 0, n_hit = 0, n_evict = 0;

  clpt #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  bit          m_v   [ENTRIES];
  logic [31:0] m_tag [ENTRIES], m_ea [ENTRIES];
  bit          m_ty  [ENTRIES];
  longint      m_use [ENTRIES];
  longint      now = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s pc=%h", what, lk_pc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < ENTRIES; i++) m_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      int idx, h, v;
      @(negedge clk);
      lk_valid = ($urandom_range(0, 9) != 0);
      lk_pc    = 32'h0040_0000 + 4 * $urandom_range(0, NPC - 1);
      lk_ea    = $urandom;
      lk_type  = lk_pc[2];
      #1;
      h = -1;
      for (int i = 0; i < ENTRIES; i++) if (m_v[i] && m_tag[i] == lk_pc) h = i;
      if (lk_valid) begin
        check(hit == (h >= 0), "hit");
        if (h >= 0) begin
          check(last_ea == m_ea[h], "last_ea");
          check(hit_type == m_ty[h], "hit_type");
          n_hit++;
        end
        v = -1;
        for (int i = 0; i < ENTRIES; i++) if (!m_v[i] && v < 0) v = i;
        check(evict == (h < 0 && v < 0), "evict");
        if (h < 0 && v < 0) n_evict++;
        if (h >= 0) idx = h;
        else if (v >= 0) idx = v;
        else begin
          idx = 0;
          for (int i = 1; i < ENTRIES; i++) if (m_use[i] < m_use[idx]) idx = i;
        end
        m_v[idx] = 1; m_tag[idx] = lk_pc; m_ea[idx] = lk_ea; m_ty[idx] = lk_type;
        m_use[idx] = ++now;
      end else begin
        check(evict == 0, "evict idle");
      end
    end
    check(n_hit > 100, "enough hits");
    check(n_evict > 100, "enough evictions");
    $display("clpt_tb: hits=%0d evictions=%0d", n_hit, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
