// tb_rnt_route: checks the 3D RNT routing function over all 48 x 48 pairs.
//
// For every source/destination pair the testbench walks the packet hop by
// hop, asking the routing block for the port at each switch and following
// the link with its own copy of the topology: intra-cluster links between
// all nodes of a cluster, node (x,y,z) to (x,z,y) between clusters, and
// vertical links between cluster heads. It checks that every chosen port is
// wired, that the destination is reached in at most six hops, that the
// layer is settled before the cluster and the cluster before the node, and
// that the nine interlayer (IL) flows follow exactly the paths of the
// data-flow graph.
module tb_rnt_route;
  import rnt_pkg::*;

  int checks = 0, failures = 0;

  node_id_t          cur_id, dst_id;
  logic [PORT_W-1:0] out_port;

  rnt_route dut (.*);

  // Own model of the links: returns the node reached through port p, or -1.
  function automatic int follow(input int l, input int c, input int n, input int p);
    if (p >= 1 && p <= 4) return (p - 1 == n) ? -1 : 16*l + 4*c + (p - 1);
    if (p == 5) return (n == c) ? -1 : 16*l + 4*n + c;
    if (p == 6) return (n == c && l > 0) ? 16*(l-1) + 4*c + c : -1;
    if (p == 7) return (n == c && l < 2) ? 16*(l+1) + 4*c + c : -1;
    return -1;
  endfunction

  function automatic int dec(input int id);   // "xyz" in decimal digits -> index
    return 16*(id / 100) + 4*((id / 10) % 10) + (id % 10);
  endfunction

  // Walk from s to d; returns the list of visited node indices.
  task automatic walk(input int s, input int d, output int path[$], output bit ok);
    int cur, nxt, phase, ph;
    path = {s};
    ok = 1;
    cur = s;
    phase = 0;
    for (int h = 0; h < 8; h++) begin
      cur_id = index_to_id(cur);
      dst_id = index_to_id(d);
      #1;
      if (out_port == 0) begin
        if (cur != d) ok = 0;
        return;
      end
      nxt = follow(cur / 16, (cur / 4) % 4, cur % 4, int'(out_port));
      if (nxt < 0) begin ok = 0; return; end
      // Progress phase: 0 layer, 1 cluster, 2 node. Must never go back.
      ph = (cur / 16 != d / 16) ? 0 : (((cur / 4) % 4 != (d / 4) % 4) ? 1 : 2);
      if (ph < phase) ok = 0;
      phase = ph;
      cur = nxt;
      path.push_back(cur);
    end
    ok = 0;   // more than 8 hops
  endtask

  initial begin
    int path[$];
    bit ok;
    int il_src[9] = '{231, 0, 223, 113, 101, 233, 130, 2, 122};
    int il_path[9][7] = '{
      '{231, 233, 133,  33,  31,  13,  11},
      '{  0, 100, 200, 202, 220, 222,  -1},
      '{223, 222, 122,  22,  21,  12,  10},
      '{113, 111, 211, 212, 221, 222,  -1},
      '{101, 100, 200, 201, 210, 211,  -1},
      '{233, 133, 131, 113, 111,  -1,  -1},
      '{130, 133,  33,  32,  23,  20,  -1},
      '{  2,   0, 100, 102, 120, 123,  -1},
      '{122,  22,  21,  12,  11,  -1,  -1}};

    for (int s = 0; s < NUM_NODES; s++) begin
      for (int d = 0; d < NUM_NODES; d++) begin
        walk(s, d, path, ok);
        checks++;
        if (!ok || path.size() > 7) begin
          failures++;
          if (failures < 10) $display("FAIL %0d -> %0d (ok=%0d, %0d nodes)", s, d, ok, path.size());
        end
      end
    end

    for (int f = 0; f < 9; f++) begin
      int n;
      n = 0;
      while (n < 7 && il_path[f][n] >= 0) n++;
      walk(dec(il_src[f]), dec(il_path[f][n-1]), path, ok);
      checks++;
      if (!ok || path.size() != n) begin
        failures++;
        $display("FAIL IL flow f%0d: %0d nodes, expected %0d", f + 1, path.size(), n);
      end else begin
        for (int k = 0; k < n; k++) begin
          if (path[k] != dec(il_path[f][k])) begin
            failures++;
            $display("FAIL IL flow f%0d hop %0d: node index %0d, expected %0d",
                     f + 1, k, path[k], dec(il_path[f][k]));
            break;
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
