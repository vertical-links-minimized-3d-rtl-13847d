// ppa_prefix: combinational core of the Programmable Prefix Arbiter (PPA).
//
// The arbiter borrows the carry-lookahead recurrence C_i = G_i | (P_i & C_{i-1}):
// the carry-generate bit becomes the priority bit prio[i] and the carry-
// propagate bit becomes the inverted request ~req[i-1]. The resulting
// "priority transfer" signal
//     x[i] = prio[i] | (~req[i-1] & x[i-1])        (indices modulo N)
// is high at the input that holds the priority, and travels on to the next
// input for as long as the inputs it passes have no request. The grant is
// gnt[i] = req[i] & x[i]. For N = 2 this is exactly the two-gate-per-side
// circuit of the two-bit PPA:
//     x1 = p1 | (~r0 & p0),  x0 = p0 | (~r1 & p1).
// For wider arbiters the ring recurrence is evaluated as a parallel prefix
// (Kogge-Stone) over the ring unrolled twice, so the depth is log2(2N)
// (g,t) combine levels; x[i] is read at position N+i of the unrolled ring.
//
// Interface: prio must be one-hot (the input that has the highest priority);
// gnt is then one-hot when any request is set, and zero otherwise. Purely
// combinational, no clock.
//
// The recurrence and the two-bit circuit follow the arbiter's description;
// the Kogge-Stone evaluation for N > 2 is this design's choice, since only the
// two-bit circuit is given in detail.
module ppa_prefix #(
  parameter int N = 16
) (
  input  logic [N-1:0] req,    // request R_i
  input  logic [N-1:0] prio,   // one-hot priority P_i
  output logic [N-1:0] x,      // priority transfer X_i
  output logic [N-1:0] gnt     // grant Gr_i = R_i & X_i
);

  localparam int M      = 2 * N;
  localparam int LEVELS = $clog2(M);

  logic [M-1:0] g [LEVELS+1];
  logic [M-1:0] t [LEVELS+1];

  always_comb begin
    // Level 0: generate = priority, transfer into k = no request at k-1.
    for (int k = 0; k < M; k++) begin
      g[0][k] = prio[k % N];
      t[0][k] = (k == 0) ? 1'b0 : ~req[(k - 1) % N];
    end
    // Kogge-Stone prefix: (g,t)_k o (g,t)_{k-d}.
    for (int l = 0; l < LEVELS; l++) begin
      for (int k = 0; k < M; k++) begin
        if (k >= (1 << l)) begin
          g[l+1][k] = g[l][k] | (t[l][k] & g[l][k - (1 << l)]);
          t[l+1][k] = t[l][k] & t[l][k - (1 << l)];
        end else begin
          g[l+1][k] = g[l][k];
          t[l+1][k] = t[l][k];
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      x[i] = g[LEVELS][N + i];
    end
    gnt = req & x;
  end

endmodule
