// pf_queue: buffer of prefetch requests waiting for a free L1 port.
//
// A prefetch, once decided, is kept until a cache port is free to carry it;
// this circular FIFO holds those line addresses in order. The head is shown
// on head_valid/head_addr and leaves when pop is high (the port arbiter
// granted it). A push to a full buffer is refused and flagged on drop for one
// cycle, unless a pop frees a slot in the same cycle. Keeping requests until
// a port is free follows the published mechanism; the depth and the
// drop-on-overflow rule are this design's choices.
//
// Timing: push/pop take effect at the rising edge; head, full and count are
// registered state. rst_n is synchronous, active low.
module pf_queue #(
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [ADDR_W-1:0]          push_addr,
  input  logic                       pop,
  output logic                       head_valid,
  output logic [ADDR_W-1:0]          head_addr,
  output logic                       full,
  output logic                       drop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [ADDR_W-1:0] mem_q [DEPTH];
  logic [PW-1:0]     rd_q, wr_q;
  logic [CW-1:0]     cnt_q;
  logic              do_pop, do_push;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    head_valid = (cnt_q != '0);
    head_addr  = mem_q[rd_q];
    full       = (cnt_q == CW'(DEPTH));
    count      = cnt_q;
    do_pop     = pop && head_valid;
    do_push    = push && (!full || do_pop);
    drop       = push && !do_push;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) begin
        mem_q[wr_q] <= push_addr;
        wr_q        <= nxt(wr_q);
      end
      if (do_pop) rd_q <= nxt(rd_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) !(pop && !head_valid))
    else $error("pf_queue: pop while empty");
endmodule
