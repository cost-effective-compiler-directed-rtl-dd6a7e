// l1_port_arb: lends a free L1 data-cache port to a waiting prefetch.
//
// The core's own loads and stores (demand accesses) always have the ports
// they ask for; demand_busy shows which are taken this cycle. If a prefetch
// waits and some port is left free, the lowest-numbered free port is granted
// to it (one-hot pf_port) and pf_grant tells the prefetch buffer to release
// its head. Giving prefetches only free ports follows the published
// mechanism; one grant per cycle and lowest-index priority are this design's
// choices. Purely combinational.
module l1_port_arb #(
  parameter int unsigned PORTS = 2
) (
  input  logic [PORTS-1:0] demand_busy,
  input  logic             pf_req,
  output logic             pf_grant,
  output logic [PORTS-1:0] pf_port
);
  logic [PORTS-1:0] free_ports;
  always_comb begin
    free_ports = ~demand_busy;
    // isolate the lowest set bit of the free-port mask
    pf_port  = pf_req ? (free_ports & (~free_ports + 1'b1)) : '0;
    pf_grant = |pf_port;
  end
endmodule
