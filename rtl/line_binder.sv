// line_binder: writes the bound elements of a returned cache line into the
// physical register file.
//
// When a pref# or load# reads its line from the L1 cache, the response
// carries the whole line, the mask of requested elements and, in element
// order, the physical registers that renaming assigned to them (the j-th
// requested element goes to resp_pregs[j]). The binder takes the response
// when idle (valid/ready handshake), then writes one requested element per
// cycle, lowest element first, through a single register-file write port.
// Each write also sets that register's ready bit in the register file, which
// wakes up instructions waiting on a bypassed load. Bringing the requested
// elements into the register file is the published mechanism; the handshake,
// one element per cycle and the single write port are this design's choices.
//
// Timing: a response accepted at edge t gives its first write in the cycle
// after t; a line with k requested elements keeps the binder busy k cycles
// (resp_ready low). A response with an empty mask is taken and ignored.
module line_binder #(
  parameter int unsigned LINE_ELEMS = 4,
  parameter int unsigned DATA_W     = 64,
  parameter int unsigned PHYS_REGS  = 96,
  localparam int unsigned PRW = $clog2(PHYS_REGS)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                resp_valid,
  output logic                                resp_ready,
  input  logic [LINE_ELEMS-1:0][DATA_W-1:0]   resp_line,
  input  logic [LINE_ELEMS-1:0]               resp_mask,
  input  logic [LINE_ELEMS-1:0][PRW-1:0]      resp_pregs,
  output logic                                wr_en,
  output logic [PRW-1:0]                      wr_preg,
  output logic [DATA_W-1:0]                   wr_data
);
  localparam int unsigned EW = (LINE_ELEMS > 1) ? $clog2(LINE_ELEMS) : 1;

  logic [LINE_ELEMS-1:0]              left_q;   // elements still to write
  logic [LINE_ELEMS-1:0][DATA_W-1:0]  line_q;
  logic [LINE_ELEMS-1:0][PRW-1:0]     epreg_q;  // register of each element
  logic [LINE_ELEMS-1:0][PRW-1:0]     epreg_d;
  logic [EW-1:0]                      cur;
  logic [EW-1:0]                      rank;

  always_comb begin
    resp_ready = (left_q == '0);
    // Spread the compact register list over the element positions.
    rank = '0;
    for (int e = 0; e < LINE_ELEMS; e++) begin
      epreg_d[e] = resp_pregs[rank];
      if (resp_mask[e]) rank = rank + 1'b1;
    end
    cur = '0;
    for (int e = LINE_ELEMS - 1; e >= 0; e--) if (left_q[e]) cur = EW'(e);
    wr_en   = (left_q != '0);
    wr_preg = epreg_q[cur];
    wr_data = line_q[cur];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left_q <= '0;
    end else if (resp_ready) begin
      if (resp_valid) begin
        left_q  <= resp_mask;
        line_q  <= resp_line;
        epreg_q <= epreg_d;
      end
    end else begin
      left_q[cur] <= 1'b0;
    end
  end
endmodule
