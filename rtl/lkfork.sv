// lkfork: lazy fork LKFork, 1-to-N, with a separately gated valid per branch.
// Branch i sees a valid token when the stem is valid and no *other* branch
// stalls; the stem stalls when any branch stalls:
//   vr[i] = vl & AND_{j != i} !sr[j]
//   sl    = OR_i sr[i]
// A token therefore transfers on all branches in the same cycle, as in any lazy
// fork, but a stalled branch still sees its valid (it is in Retry). Purely
// combinational.
module lkfork #(
  parameter int unsigned N = 2
) (
  input  logic         vl,
  output logic         sl,
  output logic [N-1:0] vr,
  input  logic [N-1:0] sr
);
  assign sl = |sr;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      vr[i] = vl;
      for (int j = 0; j < N; j++)
        if (j != i) vr[i] = vr[i] & ~sr[j];
    end
  end
endmodule
