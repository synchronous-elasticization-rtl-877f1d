// lfork: lazy fork LFork, 1-to-N, with one valid shared by all branches.
// The stem token is offered to the branches only when no branch stalls, and the
// stem stalls whenever any branch stalls:
//   sl    = OR(sr[i])
//   vr[i] = vl & !sl
// Purely combinational. Because every branch valid depends on every branch
// stall, an LFork whose branch reconverges into a lazy join forms a
// combinational loop (with an LJoin it has an odd number of inversions and can
// oscillate, with an LKJoin it can latch up); see the README.
module lfork #(
  parameter int unsigned N = 2
) (
  input  logic         vl,
  output logic         sl,
  output logic [N-1:0] vr,
  input  logic [N-1:0] sr
);
  assign sl = |sr;
  assign vr = {N{vl & ~sl}};
endmodule
