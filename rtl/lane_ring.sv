// lane_ring: the inter-lane interconnect, NL ring_node routers in a ring.
//
// Node i's outgoing link feeds node i+1 (clockwise) and node i-1
// (counter-clockwise); dir_cw, set per instruction by the vector control
// unit, tells every node which neighbour it listens to, so all traffic moves
// one way.  A packet needs one cycle per hop, so the latency from lane s to
// lane d is (d - s) mod NL clockwise or (s - d) mod NL counter-clockwise; with
// the direction picked from the slide offset the worst case is NL/2 hops.
// Each lane can inject one packet and receive one packet per cycle, so the
// ring carries up to NL 64-bit elements per cycle.
module lane_ring
  import vpu_pkg::*;
#(
  parameter int unsigned NL = NUM_LANES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dir_cw,
  input  logic      inj_valid [NL],
  input  ring_pkt_t inj_pkt   [NL],
  output logic      inj_ready [NL],
  output logic      ej_valid  [NL],
  output ring_pkt_t ej_pkt    [NL],
  input  logic      ej_ready  [NL]
);
  logic      lv [NL];
  ring_pkt_t lp [NL];

  for (genvar i = 0; i < NL; i++) begin : g_node
    localparam int unsigned PREV = (i + NL - 1) % NL;
    localparam int unsigned NEXT = (i + 1) % NL;
    ring_node #(.ID(i)) u_node (
      .clk, .rst_n, .dir_cw,
      .in_cw_valid (lv[PREV]), .in_cw (lp[PREV]),
      .in_ccw_valid(lv[NEXT]), .in_ccw(lp[NEXT]),
      .out_valid(lv[i]), .out_pkt(lp[i]),
      .inj_valid(inj_valid[i]), .inj_pkt(inj_pkt[i]), .inj_ready(inj_ready[i]),
      .ej_valid(ej_valid[i]), .ej_pkt(ej_pkt[i]), .ej_ready(ej_ready[i])
    );
  end
endmodule
