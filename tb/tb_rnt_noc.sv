// tb_rnt_noc: end-to-end test of the 48-node 3D RNT at its default sizes.
//
// Each node's module is modelled by a traffic source and a sink on the
// local port. Phase 1 sends one single-flit packet at a time along the nine
// interlayer (IL) flows and checks that the head latency is two cycles per
// switch passed, i.e. 2*(hops+1), with the hop counts of the paths in the
// data-flow graph (6,5,6,5,5,4,5,5,4). Phase 2 runs the five synthetic
// traffic patterns (nearest neighbour, hot spot, digit reversal, transpose,
// interlayer), nine source/destination flows each, sending NPKT packets of
// five flits per flow at one flit per four cycles per source, while the
// sinks refuse a flit one cycle in four. Every flit must reach the right
// node, the flits of a packet must arrive back to back, the packets of a
// flow in order, and every packet must arrive.
//
// Counted and required at least once: output contention (two inputs
// requesting one output), a full input buffer stalling a link, flits on
// vertical, inter-cluster and intra-cluster links, and sink back-pressure.
module tb_rnt_noc;
  import rnt_pkg::*;

  localparam int NPKT   = 8;     // packets per flow and pattern
  localparam int PKTLEN = 5;     // flits per packet
  localparam int NPAT   = 5;

  int checks = 0, failures = 0;

  logic  clk = 0, reset = 1;
  flit_t inj_flit [NUM_NODES];
  logic  inj_valid[NUM_NODES];
  logic  inj_ready[NUM_NODES];
  flit_t ej_flit  [NUM_NODES];
  logic  ej_valid [NUM_NODES];
  logic  ej_ready [NUM_NODES];

  rnt_noc dut (.*);

  always #5 clk = ~clk;

  // Source/destination pairs, IDs written as digits xyz.
  int pat_src[NPAT][9] = '{
    '{213, 131,  30, 213, 222, 211, 102, 222,  20},   // NN
    '{213, 220, 200,   3,  10, 231,   2, 210,  10},   // HS
    '{201, 210, 100, 200, 122, 120, 211, 122, 220},   // DR
    '{ 20,  33,  23, 102, 112, 100,  10,  11, 203},   // TP
    '{231,   0, 223, 113, 101, 233, 130,   2, 122}};  // IL
  int pat_dst[NPAT][9] = '{
    '{211, 113,  32, 233, 200, 100, 222,   0, 233},
    '{231, 200, 130, 130, 130,   0, 122, 101, 113},
    '{102,  12,   1,   2, 221,  21, 112, 221,  22},
    '{213, 200, 210, 131, 121, 133, 223, 222,  30},
    '{ 11, 222,  10, 222, 211, 111,  20, 123,  11}};
  string pat_name[NPAT] = '{"NN", "HS", "DR", "TP", "IL"};
  int il_hops[9] = '{6, 5, 6, 5, 5, 4, 5, 5, 4};

  function automatic int dec(input int id);
    return 16*(id / 100) + 4*((id / 10) % 10) + (id % 10);
  endfunction

  // ---- traffic sources -------------------------------------------------
  int  cycle = 0;
  int  pat = 0;
  bit  run = 0;
  int  rate_pct = 25;                // flit injection probability in percent
  int  npkt_flow = NPKT;
  int  pkt_len = PKTLEN;
  int  sent[9];                      // packets started per flow
  int  s_flow[NUM_NODES], s_k[NUM_NODES];
  bit  s_busy[NUM_NODES];
  int  s_rr[NUM_NODES];

  // ---- sinks -------------------------------------------------------------
  int  recv[9];
  int  last_seq[9];
  bit  k_inpkt[NUM_NODES];
  int  k_flow[NUM_NODES], k_seq[NUM_NODES], k_k[NUM_NODES];
  int  last_lat;
  bit  sink_stall = 0;
  bit  abort = 0;                    // a pattern did not complete

  // ---- mechanism counters -------------------------------------------------
  int n_contention = 0, n_link_stall = 0, n_vert = 0, n_inter = 0, n_intra = 0, n_sink_stall = 0;

  function automatic flit_t mk(input int f, input int seq, input int k);
    flit_t x;
    x.head = (k == 0);
    x.tail = (k == pkt_len - 1);
    x.data = '0;
    x.data[5:0]   = 6'(dec(pat_dst[pat][f]));
    x.data[11:6]  = 6'(dec(pat_src[pat][f]));
    x.data[15:12] = 4'(f);
    x.data[31:16] = 16'(seq);
    x.data[39:32] = 8'(k);
    x.data[79:48] = 32'(cycle);
    return x;
  endfunction

  always_comb begin
    for (int n = 0; n < NUM_NODES; n++) begin
      inj_valid[n] = run && s_busy[n];
      inj_flit[n]  = mk(s_flow[n], sent[s_flow[n]] - 1, s_k[n]);
      ej_ready[n]  = !sink_stall;
    end
  end

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (!reset && run) begin
      // Sources.
      for (int n = 0; n < NUM_NODES; n++) begin
        if (s_busy[n]) begin
          if (inj_ready[n]) begin
            if (s_k[n] == pkt_len - 1) s_busy[n] <= 0;
            s_k[n] <= s_k[n] + 1;
          end
        end else if (($urandom % 100) < rate_pct) begin
          // Start the next packet of one of this node's flows, round robin.
          for (int j = 0; j < 9; j++) begin
            int f;
            f = (s_rr[n] + j) % 9;
            if (dec(pat_src[pat][f]) == n && sent[f] < npkt_flow) begin
              s_busy[n] <= 1; s_flow[n] <= f; s_k[n] <= 0;
              sent[f] = sent[f] + 1;
              s_rr[n] <= f + 1;
              break;
            end
          end
        end
      end
      // Sinks.
      for (int n = 0; n < NUM_NODES; n++) begin
        if (ej_valid[n] && ej_ready[n]) begin
          flit_t x;
          int f, q, k;
          x = ej_flit[n];
          f = int'(x.data[15:12]); q = int'(x.data[31:16]); k = int'(x.data[39:32]);
          checks++;
          if (int'(x.data[5:0]) != n || f > 8 || dec(pat_dst[pat][f]) != n) begin
            failures++;
            if (failures < 10) $display("FAIL flit for %0d ejected at node %0d", x.data[5:0], n);
          end else if (x.head) begin
            if (k_inpkt[n] || k != 0 || q != last_seq[f] + 1) begin
              failures++;
              if (failures < 10) $display("FAIL %s flow %0d: head seq %0d after %0d", pat_name[pat], f, q, last_seq[f]);
            end
            last_seq[f] = q;
            last_lat = cycle - int'(x.data[79:48]);
            k_inpkt[n] <= !x.tail; k_flow[n] <= f; k_seq[n] <= q; k_k[n] <= 1;
            if (x.tail) recv[f]++;
          end else begin
            if (!k_inpkt[n] || f != k_flow[n] || q != k_seq[n] || k != k_k[n]) begin
              failures++;
              if (failures < 10) $display("FAIL %s flow %0d: body flit %0d out of place", pat_name[pat], f, k);
            end
            k_k[n] <= k_k[n] + 1;
            if (x.tail) begin k_inpkt[n] <= 0; recv[f]++; end
          end
        end
        if (ej_valid[n] && !ej_ready[n]) n_sink_stall++;
      end
    end
  end

  // Link activity: flits moved on each kind of link, stalls on full buffers.
  always_ff @(posedge clk) begin
    if (!reset) begin
      for (int n = 0; n < NUM_NODES; n++) begin
        for (int p = 1; p < NPORTS; p++) begin
          if (dut.o_valid[n][p] && dut.o_ready[n][p]) begin
            if (p == PORT_UP || p == PORT_DOWN) n_vert++;
            else if (p == PORT_INTER)           n_inter++;
            else                                n_intra++;
          end
          if (dut.o_valid[n][p] && !dut.o_ready[n][p]) n_link_stall++;
        end
      end
    end
  end

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_mon
    always_ff @(posedge clk) begin
      if (!reset) begin
        for (int o = 0; o < NPORTS; o++) begin
          if ($countones(dut.g_node[n].u_router.req[o]) >= 2) n_contention++;
        end
      end
    end
  end

  task automatic clear_flows();
    for (int f = 0; f < 9; f++) begin sent[f] = 0; recv[f] = 0; last_seq[f] = -1; end
  endtask

  function automatic bit all_received();
    for (int f = 0; f < 9; f++) if (recv[f] < npkt_flow) return 0;
    return 1;
  endfunction

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < NUM_NODES; n++) begin
      s_busy[n] = 0; s_k[n] = 0; s_flow[n] = 0; s_rr[n] = 0;
      k_inpkt[n] = 0; k_flow[n] = 0; k_seq[n] = 0; k_k[n] = 0;
    end
    clear_flows();
    repeat (3) @(posedge clk);
    reset <= 0;

    // Phase 1: zero-load latency of the nine IL flows, one flow at a time.
    pat = 4; pkt_len = 1; npkt_flow = 1; rate_pct = 100;
    for (int f = 0; f < 9; f++) begin
      int t0;
      @(negedge clk);
      for (int g = 0; g < 9; g++) begin sent[g] = (g == f) ? 0 : 1; recv[g] = (g == f) ? 0 : 1; end
      last_seq[f] = -1;
      run = 1;
      t0 = cycle;
      while (recv[f] == 0 && cycle - t0 < 60) @(negedge clk);
      run = 0;
      checks++;
      if (recv[f] != 1 || last_lat != 2 * (il_hops[f] + 1)) begin
        failures++;
        $display("FAIL IL flow f%0d: latency %0d cycles, expected %0d", f + 1, last_lat, 2 * (il_hops[f] + 1));
      end
    end

    // Phase 2: the five traffic patterns with five-flit packets.
    pkt_len = PKTLEN; npkt_flow = NPKT; rate_pct = 25;
    for (int p = 0; p < NPAT; p++) begin
      int t0;
      @(negedge clk);
      pat = p;
      clear_flows();
      run = 1;
      t0 = cycle;
      while (!all_received() && cycle - t0 < 3000) begin
        @(negedge clk);
        sink_stall = ($urandom % 4) == 0;
      end
      sink_stall = 0;
      checks++;
      if (!all_received()) begin
        failures++;
        $display("FAIL pattern %s did not complete", pat_name[p]);
        abort = 1;
        break;
      end
      $display("pattern %s: %0d packets in %0d cycles", pat_name[p], 9 * NPKT, cycle - t0);
      repeat (20) @(negedge clk);
      run = 0;
    end

    if (!abort) begin
      require("output contention", n_contention);
      require("full input buffer", n_link_stall);
      require("vertical link flit", n_vert);
      require("inter-cluster link flit", n_inter);
      require("intra-cluster link flit", n_intra);
      require("sink back-pressure", n_sink_stall);
    end
    $display("contention %0d, link stalls %0d, vertical %0d, inter %0d, intra %0d, sink stalls %0d",
             n_contention, n_link_stall, n_vert, n_inter, n_intra, n_sink_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
