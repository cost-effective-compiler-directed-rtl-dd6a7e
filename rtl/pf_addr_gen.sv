// pf_addr_gen: stride and prefetch-address computation.
//
// Given the effective address EA of an executing pref#/load# and the last
// effective address the prefetch table held for it, the stride is
// EA - last_EA and the line to prefetch is the one holding EA + N*stride,
// where N is the prefetch depth: DEPTH_PREF for pref#, DEPTH_LOAD for load#
// (the published best setting is 1 and 2). The output address is aligned to
// its cache line. A request is raised only when the target line differs from
// the line EA itself is in, so a zero or very small stride issues nothing:
// one prefetch per new line. That rule and the line alignment are this
// design's reading of "one prefetch per cache line"; the stride and N x
// stride formula follow the published mechanism.
//
// The low log2(LINE_BYTES) bits of pf_addr are therefore always zero.
// Purely combinational. All arithmetic wraps modulo 2^ADDR_W, so negative
// strides work in two's complement.
module pf_addr_gen #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned DEPTH_PREF = 1,
  parameter int unsigned DEPTH_LOAD = 2
) (
  input  logic              in_valid,
  input  logic [ADDR_W-1:0] ea,
  input  logic [ADDR_W-1:0] last_ea,
  input  logic              itype,     // 0: pref#, 1: load#
  output logic              req,
  output logic [ADDR_W-1:0] pf_addr,
  output logic [ADDR_W-1:0] stride
);
  localparam logic [ADDR_W-1:0] LINE_MASK = ~(ADDR_W'(LINE_BYTES) - 1'b1);

  logic [ADDR_W-1:0] depth, target;

  always_comb begin
    stride  = ea - last_ea;
    depth   = itype ? ADDR_W'(DEPTH_LOAD) : ADDR_W'(DEPTH_PREF);
    target  = ea + depth * stride;
    pf_addr = target & LINE_MASK;
    req     = in_valid && (pf_addr != (ea & LINE_MASK));
  end
endmodule
