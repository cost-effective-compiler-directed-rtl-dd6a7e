// phys_regfile: physical register file with a scoreboard.
//
// PHYS_REGS registers of DATA_W bits, two write ports (port 0 for the core's
// write-back, port 1 for the line binder) and two combinational read ports.
// Every register has a ready bit: it is cleared when renaming allocates the
// register (alloc_vec) and set when the register is written. A consumer of a
// bypassed load whose line has not arrived yet therefore sees rd_ready low and
// waits, exactly as if the load were still executing. The need for this
// scoreboarding follows the published mechanism; port counts, reset contents
// and the rule that an allocation in the same cycle as a write leaves the
// register not ready are this design's choices.
//
// Timing: writes and ready updates at the rising edge; reads are
// combinational and do not see a write of the same cycle. rst_n is
// synchronous, active low: all registers zero and ready.
module phys_regfile #(
  parameter int unsigned PHYS_REGS = 96,
  parameter int unsigned DATA_W    = 64,
  localparam int unsigned PRW = $clog2(PHYS_REGS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PHYS_REGS-1:0]        alloc_vec,
  input  logic [1:0]                  wr_en,
  input  logic [1:0][PRW-1:0]         wr_preg,
  input  logic [1:0][DATA_W-1:0]      wr_data,
  input  logic [1:0][PRW-1:0]         rd_preg,
  output logic [1:0][DATA_W-1:0]      rd_data,
  output logic [1:0]                  rd_ready
);
  logic [DATA_W-1:0]    regs_q [PHYS_REGS];
  logic [PHYS_REGS-1:0] ready_q;
  logic [PHYS_REGS-1:0] written;

  always_comb begin
    written = '0;
    for (int w = 0; w < 2; w++) if (wr_en[w]) written[wr_preg[w]] = 1'b1;
    for (int r = 0; r < 2; r++) begin
      rd_data[r]  = regs_q[rd_preg[r]];
      rd_ready[r] = ready_q[rd_preg[r]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready_q <= '1;
      for (int i = 0; i < PHYS_REGS; i++) regs_q[i] <= '0;
    end else begin
      ready_q <= (ready_q | written) & ~alloc_vec;
      for (int w = 0; w < 2; w++) if (wr_en[w]) regs_q[wr_preg[w]] <= wr_data[w];
    end
  end

  a_no_double_write: assert property (@(posedge clk) disable iff (!rst_n)
      !(wr_en == 2'b11 && wr_preg[0] == wr_preg[1]))
    else $error("phys_regfile: both ports write the same register");
endmodule
