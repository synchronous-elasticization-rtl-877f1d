// elastic_join: selects the join implementation of a control network.
// KIND = JOIN_L builds an LJoin, JOIN_LK an LKJoin, both N-to-1. 'wait_any'
// flags a cycle in which some but not all inputs carry a token, i.e. the join
// holds back tokens that have arrived until the late ones come.
module elastic_join
  import elastic_pkg::*;
#(
  parameter int unsigned N    = 2,
  parameter join_kind_e  KIND = JOIN_L
) (
  input  logic [N-1:0] vl,
  output logic [N-1:0] sl,
  output logic         vr,
  input  logic         sr,
  output logic         wait_any
);
  generate
    if (KIND == JOIN_L) begin : g_l
      ljoin #(.N(N)) u_join (.vl, .sl, .vr, .sr);
    end else begin : g_lk
      lkjoin #(.N(N)) u_join (.vl, .sl, .vr, .sr);
    end
  endgenerate

  assign wait_any = (|vl) & ~vr;
endmodule
