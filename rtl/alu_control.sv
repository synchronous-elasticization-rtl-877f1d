// alu_control: ALU Control of the MiniMIPS. Combinational. ALUOp selects add
// (address and PC arithmetic), subtract (beq compare) or the instruction's
// function field (R-type). Encodings are the standard MIPS ones.
module alu_control
  import minimips_pkg::*;
(
  input  logic [1:0] aluop,
  input  logic [5:0] funct,
  output alu_op_e    alucont
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: alucont = ALU_ADD;
      ALUOP_SUB: alucont = ALU_SUB;
      default: begin
        unique case (funct)
          FN_ADD:  alucont = ALU_ADD;
          FN_SUB:  alucont = ALU_SUB;
          FN_AND:  alucont = ALU_AND;
          FN_OR:   alucont = ALU_OR;
          FN_SLT:  alucont = ALU_SLT;
          default: alucont = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
