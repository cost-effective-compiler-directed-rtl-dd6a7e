// line_binder_tb: random line responses with random masks and register
// lists; checks that every requested element is written once, in element
// order, to the register at its rank in the list, that nothing else is
// written, and that a line with k requested elements is written in exactly
// the k cycles after it is accepted.
module line_binder_tb;
  localparam int unsigned E = 4, DW = 64, PR = 96;
  logic clk = 0, rst_n = 0;
  logic resp_valid = 0, resp_ready;
  logic [E-1:0][DW-1:0] resp_line = 0;
  logic [E-1:0] resp_mask = 0;
  logic [E-1:0][6:0] resp_pregs = 0;
  logic wr_en;
  logic [6:0] wr_preg;
  logic [DW-1:0] wr_data;
  int checks = 0, failures = 0, n_lines = 0;

  line_binder dut (.*);
  always #5 clk = ~clk;

  // expected writes, one entry per cycle after acceptance
  logic [6:0]    exp_p[$];
  logic [DW-1:0] exp_d[$];

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
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit accept;
      // outputs of this cycle: ready only when no write is pending
      check(wr_en == (exp_p.size() != 0), "wr_en");
      check(resp_ready == (exp_p.size() == 0), "resp_ready");
      if (exp_p.size() != 0) begin
        check(wr_preg == exp_p[0], "wr_preg");
        check(wr_data == exp_d[0], "wr_data");
        void'(exp_p.pop_front()); void'(exp_d.pop_front());
      end
      accept = resp_valid && resp_ready;
      if (accept) begin
        automatic int r = 0;
        n_lines++;
        for (int e = 0; e < E; e++)
          if (resp_mask[e]) begin exp_p.push_back(resp_pregs[r]); exp_d.push_back(resp_line[e]); r++; end
      end
      @(negedge clk);
      if (accept || !resp_valid) begin
        resp_valid = ($urandom_range(0, 2) != 0);
        resp_mask  = 4'($urandom);
        for (int e = 0; e < E; e++) begin
          resp_line[e]  = {$urandom, $urandom};
          resp_pregs[e] = 7'($urandom_range(0, PR - 1));
        end
      end
      #1;
    end
    check(n_lines > 200, "lines accepted");
    $display("lines=%0d", n_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
