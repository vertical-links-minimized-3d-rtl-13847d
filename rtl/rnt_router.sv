// rnt_router: wormhole switch of one 3D RNT node.
//
// The switch has the four parts of an on-chip router: input ports (one flit
// buffer each), a crossbar scheduler (one Programmable Prefix Arbiter per
// output port), output ports and the crossbar itself. Eight ports are
// provided (see rnt_pkg for their meaning); the ports a node does not use
// are tied off outside.
//
// Operation, per input port:
//   * the flit at the head of the buffer, if it is a head flit, is routed by
//     rnt_route (destination in data[5:0]) and requests that output;
//   * each free output arbitrates among its requests with its PPA; the
//     winner locks the output and the input (wormhole): both stay bound to
//     each other until the tail flit has passed, and the arbiter's priority
//     moves past the winner;
//   * a bound input sends one flit per cycle while its buffer has one and
//     the next switch is ready.
// Timing: a head flit written into an input buffer at edge t is arbitrated
// at edge t+1 and written into the next buffer at edge t+2, so each switch
// adds two cycles to the head of a packet; body flits follow one per cycle.
// Flow control on every link is valid/ready: a flit moves when both are
// high. ready is "buffer not full" and does not depend on valid.
//
// Wormhole switching, input buffering, the router's four parts and the PPA as
// scheduler follow the document; the two-cycle pipeline, valid/ready links
// and the lock-until-tail rule are this design's choices.
module rnt_router
  import rnt_pkg::*;
#(
  parameter int NODE      = 0,   // linear node index 16*layer + 4*cluster + node
  parameter int BUF_DEPTH = 4
) (
  input  logic  clk,
  input  logic  reset,
  input  flit_t in_flit  [NPORTS],
  input  logic  in_valid [NPORTS],
  output logic  in_ready [NPORTS],
  output flit_t out_flit [NPORTS],
  output logic  out_valid[NPORTS],
  input  logic  out_ready[NPORTS]
);

  localparam node_id_t MY_ID = index_to_id(NODE);

  flit_t             head     [NPORTS];
  logic              hv       [NPORTS];   // buffer not empty
  logic              full     [NPORTS];
  logic              pop      [NPORTS];
  logic [PORT_W-1:0] rport    [NPORTS];   // route of the flit at the head
  logic              in_busy  [NPORTS];
  logic [PORT_W-1:0] in_out   [NPORTS];   // output bound to input
  logic              out_busy [NPORTS];
  logic [PORT_W-1:0] out_owner[NPORTS];   // input bound to output
  logic [NPORTS-1:0] req      [NPORTS];   // req[o][i]
  logic [NPORTS-1:0] gnt      [NPORTS];   // gnt[o][i]
  logic [NPORTS-1:0] gnt_raw  [NPORTS];
  logic [PORT_W-1:0] ptr_unused[NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic empty;
    logic [$clog2(BUF_DEPTH+1)-1:0] cnt_unused;

    rnt_fifo #(.WIDTH($bits(flit_t)), .DEPTH(BUF_DEPTH)) u_buf (
      .clk   (clk),
      .reset (reset),
      .push  (in_valid[i] && !full[i]),
      .din   (in_flit[i]),
      .pop   (pop[i]),
      .dout  (head[i]),
      .full  (full[i]),
      .empty (empty),
      .count (cnt_unused)
    );
    assign hv[i]       = !empty;
    assign in_ready[i] = !full[i];

    rnt_route u_route (
      .cur_id   (MY_ID),
      .dst_id   (node_id_t'(head[i].data[DST_LSB +: ID_W])),
      .out_port (rport[i])
    );
  end

  // Requests from unbound inputs holding a head flit.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = hv[i] && head[i].head && !in_busy[i] && (rport[i] == PORT_W'(o));
      end
    end
  end

  // Crossbar scheduler: one PPA per output, active while the output is free.
  for (genvar o = 0; o < NPORTS; o++) begin : g_arb
    ppa_arbiter #(.N(NPORTS)) u_arb (
      .clk       (clk),
      .reset     (reset),
      .active    (!out_busy[o]),
      .update    (1'b1),
      .prio_load (1'b0),
      .prio_in   ('0),
      .req_pr    (req[o]),
      .grt_pr    (gnt_raw[o]),
      .grt       (gnt[o]),
      .prio_ptr  (ptr_unused[o])
    );
  end

  // Crossbar and flow control.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = in_busy[i] && hv[i] && out_ready[in_out[i]];
    end
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = out_busy[o] && hv[out_owner[o]];
      out_flit[o]  = head[out_owner[o]];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_busy[p]   <= 1'b0;
        in_out[p]    <= '0;
        out_busy[p]  <= 1'b0;
        out_owner[p] <= '0;
      end
    end else begin
      // Release on the tail flit.
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i] && head[i].tail) begin
          in_busy[i]          <= 1'b0;
          out_busy[in_out[i]] <= 1'b0;
        end
      end
      // Bind winners (only free outputs grant, only free inputs request).
      for (int o = 0; o < NPORTS; o++) begin
        for (int i = 0; i < NPORTS; i++) begin
          if (gnt[o][i]) begin
            out_busy[o]  <= 1'b1;
            out_owner[o] <= PORT_W'(i);
            in_busy[i]   <= 1'b1;
            in_out[i]    <= PORT_W'(o);
          end
        end
      end
    end
  end

  // An unbound input must see a head flit at its buffer head, and a route
  // must name a port that is wired at this node.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_head_first: assert property (@(posedge clk) disable iff (reset)
                                   (hv[i] && !in_busy[i]) |-> head[i].head)
      else $error("rnt_router %0d: body flit without a head on input %0d", NODE, i);
    a_route_ok: assert property (@(posedge clk) disable iff (reset)
                                 (hv[i] && head[i].head && !in_busy[i])
                                 |-> port_exists(NODE, int'(rport[i])))
      else $error("rnt_router %0d: route to an unwired port from input %0d", NODE, i);
  end

endmodule
