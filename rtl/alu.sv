// alu: the MiniMIPS ALU. Combinational; computes and, or, add, subtract and
// set-less-than (signed) on WIDTH-bit operands and flags a zero result on Z
// (used by beq through PCWriteCond). The operation set is the usual one of a
// multicycle MIPS and is this design's choice.
module alu
  import minimips_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          alucont,
  output logic [WIDTH-1:0] y,
  output logic             zero
);
  logic [WIDTH-1:0] diff;

  assign diff = a - b;

  always_comb begin
    unique case (alucont)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = diff;
      ALU_SLT: y = WIDTH'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);
endmodule
