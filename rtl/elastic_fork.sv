// elastic_fork: selects the fork implementation of a control network.
// KIND = FORK_EAGER builds an EFork, FORK_LK an LKFork, FORK_L an LFork, all
// 1-to-N with the same channel ports. 'early' flags a cycle in which at least
// one branch takes the stem token while the stem is still stalled by another
// branch (the early start that only an eager fork gives). clk and rst_n are
// used by the eager fork only.
module elastic_fork
  import elastic_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter fork_kind_e  KIND = FORK_EAGER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         vl,
  output logic         sl,
  output logic [N-1:0] vr,
  input  logic [N-1:0] sr,
  output logic         early
);
  generate
    if (KIND == FORK_EAGER) begin : g_eager
      efork #(.N(N)) u_fork (.clk, .rst_n, .vl, .sl, .vr, .sr);
    end else if (KIND == FORK_LK) begin : g_lk
      lkfork #(.N(N)) u_fork (.vl, .sl, .vr, .sr);
    end else begin : g_l
      lfork #(.N(N)) u_fork (.vl, .sl, .vr, .sr);
    end
  endgenerate

  assign early = sl & |(vr & ~sr);
endmodule
