// tb_rnt_router: checks one wormhole switch, a middle-layer cluster head
// (node 111, which has seven wired ports: local, three intra-cluster, up,
// down, and the unused inter-cluster port).
//
// Phase 1 measures the zero-load latency: a single-flit packet pushed at
// one edge must be taken from the output two edges later.
// Phase 2 sends random packets of 1 to 5 flits from every wired input to
// random destinations while the outputs apply random back-pressure. Every
// head flit must leave on the port the testbench's own reference route
// names, the flits of one packet must leave one output back to back with no
// other packet in between (wormhole), the packets of one input must arrive
// in order, and all packets must arrive. The run must see output contention
// (two inputs waiting for one output) and full input buffers.
module tb_rnt_router;
  import rnt_pkg::*;

  localparam int NODE = 16*1 + 4*1 + 1;   // node 111
  localparam int NPKT = 60;               // packets per input

  int checks = 0, failures = 0;
  int n_contention = 0, n_full = 0;

  logic  clk = 0, reset = 1;
  flit_t in_flit  [NPORTS];
  logic  in_valid [NPORTS];
  logic  in_ready [NPORTS];
  flit_t out_flit [NPORTS];
  logic  out_valid[NPORTS];
  logic  out_ready[NPORTS];

  rnt_router #(.NODE(NODE), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  bit wired[NPORTS] = '{1, 1, 0, 1, 1, 0, 1, 1};   // ports of node 111

  // Reference route at node 111 (layer 1, cluster 1, head).
  function automatic int ref_port(input int d);
    int dl, dc, dn;
    dl = d / 16; dc = (d / 4) % 4; dn = d % 4;
    if (dl == 0) return 6;
    if (dl == 2) return 7;
    if (dc != 1) return 1 + dc;
    if (dn != 1) return 1 + dn;
    return 0;
  endfunction

  function automatic flit_t mk(input int i, input int seq, input int k, input int len, input int d);
    flit_t f;
    f.head = (k == 0);
    f.tail = (k == len - 1);
    f.data = '0;
    f.data[5:0]   = 6'(d);
    f.data[10:8]  = 3'(i);
    f.data[31:16] = 16'(seq);
    f.data[39:32] = 8'(k);
    f.data[47:40] = 8'(len);
    return f;
  endfunction

  // Sources.
  int   sent_pkts[NPORTS];
  int   src_seq[NPORTS], src_k[NPORTS], src_len[NPORTS], src_dst[NPORTS];
  // Sinks.
  bit   o_inpkt[NPORTS];
  int   o_src[NPORTS], o_seq[NPORTS], o_k[NPORTS];
  int   last_seq[NPORTS][NPORTS];
  int   recv_pkts;
  bit   phase2 = 0;

  always_ff @(posedge clk) begin
    if (!reset && phase2) begin
      int busy;
      for (int i = 0; i < NPORTS; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          if (src_k[i] == src_len[i] - 1) begin
            src_seq[i]++;
            src_k[i] <= 0;
            src_len[i] <= 1 + ($urandom % 5);
            src_dst[i] <= $urandom % NUM_NODES;
          end else src_k[i] <= src_k[i] + 1;
        end
        if (in_valid[i] && !in_ready[i]) n_full++;
      end
      for (int o = 0; o < NPORTS; o++) begin
        busy = 0;
        for (int i = 0; i < NPORTS; i++) busy += int'(dut.req[o][i]);
        if (busy >= 2) n_contention++;
        if (out_valid[o] && out_ready[o]) begin
          flit_t f;
          int s, q, k;
          f = out_flit[o];
          s = int'(f.data[10:8]); q = int'(f.data[31:16]); k = int'(f.data[39:32]);
          checks++;
          if (f.head) begin
            if (o_inpkt[o] || ref_port(int'(f.data[5:0])) != o || q <= last_seq[s][o] || k != 0) begin
              failures++;
              if (failures < 10) $display("FAIL head on %0d: src %0d seq %0d dst %0d", o, s, q, f.data[5:0]);
            end
            last_seq[s][o] = q;
            o_inpkt[o] <= !f.tail;
            o_src[o] <= s; o_seq[o] <= q; o_k[o] <= 1;
          end else begin
            if (!o_inpkt[o] || s != o_src[o] || q != o_seq[o] || k != o_k[o]) begin
              failures++;
              if (failures < 10) $display("FAIL body on %0d: src %0d seq %0d k %0d", o, s, q, k);
            end
            o_k[o] <= o_k[o] + 1;
            if (f.tail) o_inpkt[o] <= 0;
          end
          if (f.tail) recv_pkts++;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = phase2 && wired[i] && (src_seq[i] < NPKT);
      in_flit[i]  = mk(i, src_seq[i], src_k[i], src_len[i], src_dst[i]);
    end
  end

  initial begin
    int lat, total;
    for (int i = 0; i < NPORTS; i++) begin
      src_seq[i] = 0; src_k[i] = 0; src_len[i] = 1 + (i % 5); src_dst[i] = (7 * i + 3) % NUM_NODES;
      o_inpkt[i] = 0; out_ready[i] = 1;
      for (int j = 0; j < NPORTS; j++) last_seq[i][j] = -1;
    end
    recv_pkts = 0;
    repeat (3) @(posedge clk);
    reset <= 0;

    // Phase 1: zero-load latency, local input to the UP port (destination 011).
    @(negedge clk);
    force in_flit[0] = mk(0, 0, 0, 1, 16'd5);
    force in_valid[0] = 1'b1;
    @(posedge clk);            // pushed here
    #1;
    release in_valid[0];
    release in_flit[0];
    lat = 0;
    while (!(out_valid[6] && out_ready[6]) && lat < 10) begin
      @(posedge clk); lat++; #1;
    end
    @(posedge clk); lat++;     // taken at this edge
    checks++;
    if (lat != 2) begin
      failures++;
      $display("FAIL zero-load latency %0d cycles, expected 2", lat);
    end
    repeat (3) @(posedge clk);

    // Phase 2: random traffic with back-pressure.
    phase2 = 1;
    total = 0;
    for (int i = 0; i < NPORTS; i++) if (wired[i]) total += NPKT;
    while (recv_pkts < total) begin
      @(negedge clk);
      for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom % 4) != 0;
    end
    checks++;
    if (n_contention == 0 || n_full == 0) begin
      failures++;
      $display("FAIL mechanisms: contention %0d, full buffers %0d", n_contention, n_full);
    end
    $display("packets %0d, contention cycles %0d, full-buffer cycles %0d", recv_pkts, n_contention, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d packets received", recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
