// rnt_pkg: types and constants shared by the 3D Recursive Network Topology (3D RNT).
//
// The network has NLAYERS=3 layers, each holding NCLUSTERS=4 clusters of
// NNODES=4 nodes (48 nodes in all). A node is named by three base-4 digits
// x y z: layer x, cluster y, node z. Node z == y of a cluster is its cluster
// head (CH): 000, 011, 022, 033 in layer 0. These sizes, the naming and the
// link pattern follow the topology figure; the flit width of 10 bytes follows
// the analytical model and the packet simulation. The port numbering, the
// flit sideband (head/tail flags) and the placement of the destination in
// the head flit are this design's own choices.
//
// Every switch has NPORTS=8 ports, some of them unused depending on where the
// node sits:
//   0      LOCAL    the module attached to the switch
//   1..4   node z   intra-cluster link to node z of the same cluster (1+z);
//                   the port of the node's own z is unused
//   5      INTER    inter-cluster link; node (x,y,z), z!=y, is wired to
//                   node (x,z,y) (unused at a cluster head)
//   6      UP       vertical link to the cluster head of layer x-1
//   7      DOWN     vertical link to the cluster head of layer x+1
//                   (UP/DOWN exist only at cluster heads)
package rnt_pkg;

  localparam int NLAYERS   = 3;
  localparam int NCLUSTERS = 4;
  localparam int NNODES    = 4;
  localparam int NUM_NODES = NLAYERS * NCLUSTERS * NNODES;   // 48
  localparam int NPORTS    = 8;
  localparam int PORT_W    = $clog2(NPORTS);

  // Flit payload width: 10 bytes.
  localparam int FLIT_W    = 80;

  localparam int PORT_LOCAL = 0;
  localparam int PORT_INTRA = 1;   // 1 + z
  localparam int PORT_INTER = 5;
  localparam int PORT_UP    = 6;
  localparam int PORT_DOWN  = 7;

  // Node identifier: three base-4 digits (layer, cluster, node).
  typedef struct packed {
    logic [1:0] layer;
    logic [1:0] cluster;
    logic [1:0] node;
  } node_id_t;

  localparam int ID_W = $bits(node_id_t);   // 6

  // Head flit payload layout: bits [5:0] destination, [11:6] source.
  localparam int DST_LSB = 0;
  localparam int SRC_LSB = ID_W;

  // Flit on a link: payload plus head/tail sideband. A single-flit packet
  // has both flags set.
  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Linear index of a node: 16*layer + 4*cluster + node.
  function automatic int node_index(input int layer, input int cluster, input int node);
    return layer * NCLUSTERS * NNODES + cluster * NNODES + node;
  endfunction

  function automatic node_id_t index_to_id(input int idx);
    node_id_t id;
    id.layer   = 2'(idx / (NCLUSTERS * NNODES));
    id.cluster = 2'((idx / NNODES) % NCLUSTERS);
    id.node    = 2'(idx % NNODES);
    return id;
  endfunction

  // Whether port p of node idx is wired to a neighbour.
  function automatic bit port_exists(input int idx, input int p);
    int l, c, n;
    l = idx / (NCLUSTERS * NNODES);
    c = (idx / NNODES) % NCLUSTERS;
    n = idx % NNODES;
    if (p == PORT_LOCAL)                      return 1'b1;
    if (p >= PORT_INTRA && p < PORT_INTER)    return (p - PORT_INTRA) != n;
    if (p == PORT_INTER)                      return n != c;
    if (p == PORT_UP)                         return (n == c) && (l > 0);
    if (p == PORT_DOWN)                       return (n == c) && (l < NLAYERS - 1);
    return 1'b0;
  endfunction

  // Node at the far end of port p of node idx (meaningful if port_exists).
  function automatic int neighbour(input int idx, input int p);
    int l, c, n;
    l = idx / (NCLUSTERS * NNODES);
    c = (idx / NNODES) % NCLUSTERS;
    n = idx % NNODES;
    if (p >= PORT_INTRA && p < PORT_INTER) return node_index(l, c, p - PORT_INTRA);
    if (p == PORT_INTER)                   return node_index(l, n, c);
    if (p == PORT_UP)                      return node_index(l - 1, c, c);
    if (p == PORT_DOWN)                    return node_index(l + 1, c, c);
    return idx;
  endfunction

  // Port of the neighbour through which the link comes back.
  function automatic int back_port(input int idx, input int p);
    int n;
    n = idx % NNODES;
    if (p >= PORT_INTRA && p < PORT_INTER) return PORT_INTRA + n;
    if (p == PORT_INTER)                   return PORT_INTER;
    if (p == PORT_UP)                      return PORT_DOWN;
    if (p == PORT_DOWN)                    return PORT_UP;
    return PORT_LOCAL;
  endfunction

endpackage
