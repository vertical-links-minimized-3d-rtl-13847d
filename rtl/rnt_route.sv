// rnt_route: 3D routing function of the Recursive Network Topology.
//
// Given the switch's own node ID (layer x, cluster y, node z) and a packet's
// destination ID, picks the output port in three steps, in this order:
//   1. Destination layer. If it differs, the packet goes to the switch's
//      cluster head (intra-cluster port of node y) and from there along the
//      vertical links (UP towards layer 0, DOWN towards layer 2).
//   2. Destination cluster. If it differs, the packet goes to node dy of the
//      current cluster (intra-cluster port), whose inter-cluster link leads
//      straight into cluster dy (to its node y).
//   3. Destination node. Inside the destination cluster every node is
//      linked to every other, so one intra-cluster hop reaches it.
// A packet at its destination leaves through the LOCAL port. The longest
// path has six hops (to the head, two vertical, to the gateway node,
// inter-cluster, to the destination).
//
// The three-step order follows the routing algorithm's description and the
// paths drawn in the data-flow graph; how each step is carried out is derived
// from the link pattern of the topology. Purely combinational.
module rnt_route
  import rnt_pkg::*;
(
  input  node_id_t          cur_id,
  input  node_id_t          dst_id,
  output logic [PORT_W-1:0] out_port
);

  function automatic logic [PORT_W-1:0] intra(input logic [1:0] z);
    return PORT_W'(PORT_INTRA) + PORT_W'(z);
  endfunction

  always_comb begin
    if (dst_id.layer != cur_id.layer) begin
      if (cur_id.node == cur_id.cluster)
        out_port = (dst_id.layer < cur_id.layer) ? PORT_W'(PORT_UP) : PORT_W'(PORT_DOWN);
      else
        out_port = intra(cur_id.cluster);
    end else if (dst_id.cluster != cur_id.cluster) begin
      if (cur_id.node == dst_id.cluster)
        out_port = PORT_W'(PORT_INTER);
      else
        out_port = intra(dst_id.cluster);
    end else if (dst_id.node != cur_id.node) begin
      out_port = intra(dst_id.node);
    end else begin
      out_port = PORT_W'(PORT_LOCAL);
    end
  end

endmodule
