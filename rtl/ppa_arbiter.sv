// ppa_arbiter: Programmable Prefix Arbiter with its priority register.
//
// The grant is computed combinationally by ppa_prefix from the requests and
// a one-hot priority vector. The priority is kept as a binary pointer of
// log2(N) flip-flops (one flip-flop for 2 ports, four for 16 ports) and
// decoded to one-hot. The pointer can be programmed (prio_load/prio_in) and
// it moves on by itself: when update is high in a cycle in which a grant is
// issued, the input just after the granted one gets the highest priority in
// the next cycle, so every requester is served within N grants.
//
// Interface (signal names follow the arbiter's simulation trace):
//   reset    synchronous, active high; pointer := 0 (input 0 first)
//   active   enables the arbiter; grt is zero while it is low
//   req_pr   request vector
//   grt_pr   grant of the prefix network (independent of active)
//   grt      issued grant: grt_pr while active, else zero
//   update   advance the pointer past the input granted this cycle
//   prio_load/prio_in  program the pointer (takes precedence over update)
// Timing: req_pr -> grt is combinational; the pointer changes at the clock edge.
//
// The log2(N)-bit pointer matches the flip-flop counts reported for the
// 2/4/8/16-port arbiters; the meaning of active and update, the
// programming port and the round-robin update rule are this design's choices.
module ppa_arbiter #(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 active,
  input  logic                 update,
  input  logic                 prio_load,
  input  logic [$clog2(N)-1:0] prio_in,
  input  logic [N-1:0]         req_pr,
  output logic [N-1:0]         grt_pr,
  output logic [N-1:0]         grt,
  output logic [$clog2(N)-1:0] prio_ptr
);

  localparam int PW = $clog2(N);

  logic [N-1:0]  prio_onehot;
  logic [N-1:0]  x_unused;
  logic [PW-1:0] gnt_idx;

  always_comb begin
    prio_onehot = '0;
    prio_onehot[prio_ptr] = 1'b1;
  end

  ppa_prefix #(.N(N)) u_prefix (
    .req  (req_pr),
    .prio (prio_onehot),
    .x    (x_unused),
    .gnt  (grt_pr)
  );

  assign grt = active ? grt_pr : '0;

  // Index of the (one-hot) grant.
  always_comb begin
    gnt_idx = '0;
    for (int i = 0; i < N; i++) begin
      if (grt_pr[i]) gnt_idx = PW'(i);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      prio_ptr <= '0;
    end else if (prio_load) begin
      prio_ptr <= prio_in;
    end else if (update && active && (|req_pr)) begin
      prio_ptr <= (gnt_idx == PW'(N - 1)) ? '0 : gnt_idx + 1'b1;
    end
  end

  // At most one grant, and a grant whenever there is a request.
  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(grt_pr))
    else $error("ppa_arbiter: more than one grant");
  a_work_conserving: assert property (@(posedge clk) disable iff (reset)
                                      (|req_pr) |-> (|grt_pr))
    else $error("ppa_arbiter: requests but no grant");

endmodule
