// phys_regfile_tb: random allocations, writes on both ports and reads,
// compared with an array model of values and ready bits (allocation clears
// ready, a write sets it, allocation wins when both hit one register).
module phys_regfile_tb;
  localparam int unsigned PR = 96, DW = 64;
  logic clk = 0, rst_n = 0;
  logic [PR-1:0] alloc_vec = 0;
  logic [1:0] wr_en = 0;
  logic [1:0][6:0] wr_preg = 0, rd_preg = 0;
  logic [1:0][DW-1:0] wr_data = 0, rd_data;
  logic [1:0] rd_ready;
  int checks = 0, failures = 0, n_notready = 0;

  phys_regfile dut (.*);
  always #5 clk = ~clk;

  logic [DW-1:0] m_val[PR];
  bit            m_rdy[PR];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < PR; i++) begin m_val[i] = 0; m_rdy[i] = 1; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      alloc_vec = '0;
      if ($urandom_range(0, 1)) alloc_vec[$urandom_range(0, PR - 1)] = 1;
      if ($urandom_range(0, 3) == 0) alloc_vec[$urandom_range(0, PR - 1)] = 1;
      wr_en = 2'($urandom);
      wr_preg[0] = 7'($urandom_range(0, PR - 1));
      do wr_preg[1] = 7'($urandom_range(0, PR - 1)); while (wr_preg[1] == wr_preg[0]);
      wr_data[0] = {$urandom, $urandom}; wr_data[1] = {$urandom, $urandom};
      rd_preg[0] = 7'($urandom_range(0, PR - 1)); rd_preg[1] = 7'($urandom_range(0, PR - 1));
      #1;
      for (int r = 0; r < 2; r++) begin
        check(rd_data[r] == m_val[rd_preg[r]], "rd_data");
        check(rd_ready[r] == m_rdy[rd_preg[r]], "rd_ready");
        if (!m_rdy[rd_preg[r]]) n_notready++;
      end
      for (int w = 0; w < 2; w++) if (wr_en[w]) begin m_val[wr_preg[w]] = wr_data[w]; m_rdy[wr_preg[w]] = 1; end
      for (int i = 0; i < PR; i++) if (alloc_vec[i]) m_rdy[i] = 0;
    end
    check(n_notready > 100, "not-ready registers observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
