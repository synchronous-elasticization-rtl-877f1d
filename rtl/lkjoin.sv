// lkjoin: lazy join LKJoin, N-to-1.
// Like LJoin, the output is valid only when all inputs are valid, but every
// input receives the same stall, without the per-input AND with its own valid:
//   vr    = AND_i vl[i]
//   sl[i] = sr | !vr
// An input with no token may thus see a stall, which SELF allows. Purely
// combinational; saves one gate per input compared with LJoin.
module lkjoin #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] vl,
  output logic [N-1:0] sl,
  output logic         vr,
  input  logic         sr
);
  assign vr = &vl;
  assign sl = {N{sr | ~vr}};
endmodule
