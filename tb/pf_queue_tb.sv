// pf_queue_tb: random push/pop traffic against a SystemVerilog queue model.
// Checks head order, occupancy, full and the drop flag on overflow.
module pf_queue_tb;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] push_addr = 0, head_addr;
  logic head_valid, full, drop;
  logic [3:0] count;
  int checks = 0, failures = 0, n_drop = 0, n_full = 0;
  logic [31:0] model[$];

  pf_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5000; n++) begin
      bit exp_drop;
      @(negedge clk);
      // phases: fill-heavy, then drain-heavy
      push      = ($urandom_range(0, 99) < ((n / 500) % 2 ? 30 : 80));
      push_addr = $urandom;
      pop       = ($urandom_range(0, 99) < ((n / 500) % 2 ? 80 : 30)) && (model.size() != 0);
      #1;
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_addr == model[0], "head_addr");
      check(count == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      exp_drop = push && model.size() == DEPTH && !pop;
      check(drop == exp_drop, "drop");
      if (full) n_full++;
      if (exp_drop) n_drop++;
      if (pop) void'(model.pop_front());
      if (push && !exp_drop) model.push_back(push_addr);
    end
    check(n_drop > 10, "overflow exercised");
    $display("pf_queue_tb: full cycles=%0d drops=%0d", n_full, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
