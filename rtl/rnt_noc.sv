// rnt_noc: the 3D Recursive Network Topology, 48 switches in three layers.
//
// Each layer holds four clusters of four nodes. Inside a cluster every node
// is linked to every other one (six links). Node z of cluster y (z != y) is
// linked to node y of cluster z, which gives every pair of clusters one
// direct link, diagonal pairs included (six links per layer, thirty links
// per layer in all). Node y of cluster y is the cluster head; only the
// cluster heads are linked vertically to the cluster heads above and below,
// so a quarter of the nodes carry vertical links (eight vertical links
// instead of the 32 of a fully vertically connected 4x4x3 mesh).
//
// Each node is one rnt_router; the module attached to it is outside this
// block and reaches the network through the LOCAL port, brought out here as
// inj_* (module to network) and ej_* (network to module), indexed by the
// linear node index 16*layer + 4*cluster + node. Every link is a pair of
// unidirectional valid/ready channels. A head flit names its destination
// in data[5:0] (layer, cluster, node, two bits each).
//
// The topology follows the document's figure of the network; the local
// interface is this design's choice. Reset is synchronous and active high.
module rnt_noc
  import rnt_pkg::*;
#(
  parameter int BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  reset,
  input  flit_t inj_flit [NUM_NODES],
  input  logic  inj_valid[NUM_NODES],
  output logic  inj_ready[NUM_NODES],
  output flit_t ej_flit  [NUM_NODES],
  output logic  ej_valid [NUM_NODES],
  input  logic  ej_ready [NUM_NODES]
);

  // Output side of every switch port.
  flit_t o_flit [NUM_NODES][NPORTS];
  logic  o_valid[NUM_NODES][NPORTS];
  logic  o_ready[NUM_NODES][NPORTS];
  // Input side of every switch port.
  flit_t i_flit [NUM_NODES][NPORTS];
  logic  i_valid[NUM_NODES][NPORTS];
  logic  i_ready[NUM_NODES][NPORTS];

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    rnt_router #(.NODE(n), .BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk       (clk),
      .reset     (reset),
      .in_flit   (i_flit[n]),
      .in_valid  (i_valid[n]),
      .in_ready  (i_ready[n]),
      .out_flit  (o_flit[n]),
      .out_valid (o_valid[n]),
      .out_ready (o_ready[n])
    );

    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      if (p == PORT_LOCAL) begin : g_local
        assign i_flit[n][p]  = inj_flit[n];
        assign i_valid[n][p] = inj_valid[n];
        assign inj_ready[n]  = i_ready[n][p];
        assign ej_flit[n]    = o_flit[n][p];
        assign ej_valid[n]   = o_valid[n][p];
        assign o_ready[n][p] = ej_ready[n];
      end else if (port_exists(n, p)) begin : g_link
        localparam int NB = neighbour(n, p);
        localparam int BP = back_port(n, p);
        assign i_flit[n][p]  = o_flit[NB][BP];
        assign i_valid[n][p] = o_valid[NB][BP];
        assign o_ready[n][p] = i_ready[NB][BP];
      end else begin : g_unused
        assign i_flit[n][p]  = '0;
        assign i_valid[n][p] = 1'b0;
        assign o_ready[n][p] = 1'b0;
      end
    end
  end

endmodule
