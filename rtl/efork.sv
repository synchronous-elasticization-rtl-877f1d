// efork: eager fork EFork, 1-to-N.
// The stem token is passed to every branch that is ready, independently of the
// others, and the stem is stalled until all branches have taken it. One
// flip-flop per branch, r[i], records that branch i still owes the current
// token (1 after reset):
//   vr[i]   = vl & r[i]
//   sl      = OR_i (r[i] & sr[i])
//   r[i]'   = (vl & sl) ? (r[i] & sr[i]) : 1
// A branch that took the token while another stalled sees no valid until the
// stem moves on; a branch that is ready gets the token in the first cycle
// (early start). The flip-flops cut every combinational loop that passes
// through the fork's valid path.
module efork #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vl,
  output logic         sl,
  output logic [N-1:0] vr,
  input  logic [N-1:0] sr
);
  logic [N-1:0] r;

  assign vr = {N{vl}} & r;
  assign sl = |(r & sr);

  always_ff @(posedge clk) begin
    if (!rst_n)        r <= '1;
    else if (vl && sl) r <= r & sr;
    else               r <= '1;
  end
endmodule
