// pf_addr_gen_tb: checks the stride / N x stride prefetch address against
// directed cases (positive and negative strides, sub-line strides, both
// instruction types) and random ones computed with plain integer arithmetic.
module pf_addr_gen_tb;
  logic        in_valid, itype, req;
  logic [31:0] ea, last_ea, pf_addr, stride;
  int checks = 0, failures = 0;

  pf_addr_gen dut (.*);

  task automatic one(input logic [31:0] e, input logic [31:0] l, input bit t, input bit v);
    longint s, tgt;
    bit exp_req;
    in_valid = v; ea = e; last_ea = l; itype = t;
    #1;
    s   = longint'($signed(e)) - longint'($signed(l));
    tgt = (longint'(e) + (t ? 2 : 1) * s) & 64'hFFFF_FFFF;
    exp_req = v && ((tgt >> 5) != (longint'(e) >> 5));
    checks += 3;
    if (stride !== 32'(s))             begin failures++; $display("FAIL stride e=%h l=%h", e, l); end
    if (req !== exp_req)               begin failures++; $display("FAIL req e=%h l=%h t=%0d", e, l, t); end
    if (exp_req && pf_addr !== (32'(tgt) & ~32'h1F)) begin failures++; $display("FAIL addr e=%h l=%h", e, l); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // pref#, stride one line: next line
    one(32'h1000, 32'h0FE0, 0, 1); if (pf_addr !== 32'h1020) begin failures++; $display("FAIL pref +32"); end
    // load#, depth 2: two lines ahead
    one(32'h1000, 32'h0FE0, 1, 1); if (pf_addr !== 32'h1040) begin failures++; $display("FAIL load +64"); end
    // negative stride
    one(32'h2008, 32'h2048, 0, 1); if (pf_addr !== 32'h1FC0) begin failures++; $display("FAIL neg"); end
    // 8-byte stride stays in the same line for pref#: no request
    one(32'h3000, 32'h2FF8, 0, 1); if (req !== 0) begin failures++; $display("FAIL sub-line"); end
    // zero stride: no request
    one(32'h3000, 32'h3000, 1, 1); if (req !== 0) begin failures++; $display("FAIL zero"); end
    // invalid input: no request
    one(32'h1000, 32'h0FE0, 0, 0); if (req !== 0) begin failures++; $display("FAIL invalid"); end
    checks += 6;
    for (int n = 0; n < 2000; n++) begin
      automatic logic [31:0] e = $urandom;
      automatic logic [31:0] d = (n % 2) ? 32'($urandom_range(0, 512)) - 32'd256 : $urandom;
      one(e, e - d, n[2], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
