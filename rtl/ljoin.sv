// ljoin: lazy join LJoin, N-to-1.
// The output is valid only when all inputs are valid. An input is stalled only
// if it carries a valid token and the output does not transfer it; inputs
// without a token never see a stall (one AND gate per input stall):
//   vr    = AND_i vl[i]
//   sl[i] = vl[i] & (sr | !vr)
// Purely combinational.
module ljoin #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] vl,
  output logic [N-1:0] sl,
  output logic         vr,
  input  logic         sr
);
  assign vr = &vl;
  assign sl = vl & {N{sr | ~vr}};
endmodule
