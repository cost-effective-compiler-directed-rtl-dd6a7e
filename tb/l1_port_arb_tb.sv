// l1_port_arb_tb: exhaustive check of the free-port grant for 2 and 4 ports.
module l1_port_arb_tb;
  int checks = 0, failures = 0;
  logic [1:0] busy2, port2; logic req2, g2;
  logic [3:0] busy4, port4; logic req4, g4;

  l1_port_arb #(.PORTS(2)) dut2 (.demand_busy(busy2), .pf_req(req2), .pf_grant(g2), .pf_port(port2));
  l1_port_arb #(.PORTS(4)) dut4 (.demand_busy(busy4), .pf_req(req4), .pf_grant(g4), .pf_port(port4));

  function automatic logic [3:0] lowest_free(input logic [3:0] busy, input int n);
    for (int i = 0; i < n; i++) if (!busy[i]) return 4'(1 << i);
    return '0;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int b = 0; b < 16; b++) begin
        logic [3:0] e2, e4;
        busy2 = 2'(b); req2 = r[0]; busy4 = 4'(b); req4 = r[0];
        #1;
        e2 = r ? lowest_free(4'(b) | 4'b1100, 2) : '0;
        e4 = r ? lowest_free(4'(b), 4) : '0;
        checks += 4;
        if (port2 !== e2[1:0]) begin failures++; $display("FAIL port2 b=%b r=%0d", b, r); end
        if (g2 !== (e2 != 0))  begin failures++; $display("FAIL g2 b=%b r=%0d", b, r); end
        if (port4 !== e4)      begin failures++; $display("FAIL port4 b=%b r=%0d", b, r); end
        if (g4 !== (e4 != 0))  begin failures++; $display("FAIL g4 b=%b r=%0d", b, r); end
        // a granted port is never one a demand access uses
        checks++;
        if ((port4 & busy4) != 0) begin failures++; $display("FAIL conflict"); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
