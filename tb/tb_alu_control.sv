// tb_alu_control: checks the ALU operation chosen for each ALUOp and for every
// function code of the R-type instructions.
module tb_alu_control;
  import minimips_pkg::*;
  logic [1:0] aluop;
  logic [5:0] funct;
  alu_op_e    alucont;
  int checks = 0, failures = 0;

  alu_control dut (.aluop, .funct, .alucont);

  task automatic expect_op(input logic [1:0] ao, input logic [5:0] fn, input alu_op_e e);
    aluop = ao; funct = fn;
    #1;
    checks++;
    if (alucont != e) begin
      failures++;
      $display("aluop=%b funct=%b -> %s, expected %s", ao, fn, alucont.name(), e.name());
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      expect_op(2'b00, 6'(f), ALU_ADD);
      expect_op(2'b01, 6'(f), ALU_SUB);
    end
    expect_op(2'b10, 6'b100000, ALU_ADD);
    expect_op(2'b10, 6'b100010, ALU_SUB);
    expect_op(2'b10, 6'b100100, ALU_AND);
    expect_op(2'b10, 6'b100101, ALU_OR);
    expect_op(2'b10, 6'b101010, ALU_SLT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
