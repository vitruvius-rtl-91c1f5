// ring_node: one router of the unidirectional, reconfigurable inter-lane ring.
//
// The node has no buffers.  Each cycle it looks at the packet arriving on the
// link from its upstream neighbour (the lane below it when the ring turns
// clockwise, the lane above it when it turns counter-clockwise, chosen by
// dir_cw): a packet addressed to this lane is handed to the lane (eject),
// any other packet is passed on.  The lane may inject a packet only when no
// packet is being passed on, so traffic already in the ring always wins.  The
// output link is a register: one hop costs one cycle.  A packet the lane
// cannot take (ej_ready low) is passed on and comes round again.  A packet the
// lane addresses to itself is delivered straight back through the eject port
// when that port is free.  Behaviour from the document (single-cycle hops,
// no buffers, accept-or-pass routers, switchable direction); the
// self-addressed shortcut and the retry on a busy lane are this design's.
module ring_node
  import vpu_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dir_cw,
  input  logic      in_cw_valid,    // from lane ID-1 (clockwise traffic)
  input  ring_pkt_t in_cw,
  input  logic      in_ccw_valid,   // from lane ID+1 (counter-clockwise traffic)
  input  ring_pkt_t in_ccw,
  output logic      out_valid,      // the node's single outgoing link
  output ring_pkt_t out_pkt,
  input  logic      inj_valid,
  input  ring_pkt_t inj_pkt,
  output logic      inj_ready,
  output logic      ej_valid,
  output ring_pkt_t ej_pkt,
  input  logic      ej_ready
);
  logic      in_v;
  ring_pkt_t in_p;
  logic      eject_in, fwd, inj_local, inj_fire;

  always_comb begin
    in_v      = dir_cw ? in_cw_valid : in_ccw_valid;
    in_p      = dir_cw ? in_cw : in_ccw;
    eject_in  = in_v && (in_p.dst == LANE_W'(ID)) && ej_ready;
    fwd       = in_v && !eject_in;
    inj_local = inj_pkt.dst == LANE_W'(ID);
    inj_ready = inj_local ? (!eject_in && ej_ready) : !fwd;
    inj_fire  = inj_valid && inj_ready;
    ej_valid  = eject_in || (inj_fire && inj_local);
    ej_pkt    = eject_in ? in_p : inj_pkt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= fwd || (inj_fire && !inj_local);
    end
  end

  always_ff @(posedge clk) out_pkt <= fwd ? in_p : inj_pkt;
endmodule
